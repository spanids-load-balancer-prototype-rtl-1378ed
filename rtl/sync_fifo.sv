// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the flow-control index FIFO of the flow control receiver and the
// command FIFO of the hot list. rd_data shows the oldest entry whenever
// empty is low; rd_en removes it. Writes to a full FIFO are dropped.
module sync_fifo #(
  parameter int W  = 8,
  parameter int AW = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp - rp) == (AW+1)'(2**AW);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
