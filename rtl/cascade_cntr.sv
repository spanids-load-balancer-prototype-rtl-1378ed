// cascade_cntr: W-bit building-block counter with N_EN enable inputs and a
// synchronous clear, used to build wider counters by cascading.
//
// The counter advances by one only when every enable input is high, and
// clears when clr is high (clear wins). ovfl is high while the count is
// all ones (terminal count); feeding it to the enables of the next stage
// makes the next stage advance exactly when this one rolls over.
module cascade_cntr #(
  parameter int W    = 8,
  parameter int N_EN = 4
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            clr,
  input  logic [N_EN-1:0] en,
  output logic [W-1:0]    q,
  output logic            ovfl
);
  assign ovfl = &q;
  always_ff @(posedge clk or posedge reset) begin
    if (reset)      q <= '0;
    else if (clr)   q <= '0;
    else if (&en)   q <= q + 1'b1;
  end
endmodule
