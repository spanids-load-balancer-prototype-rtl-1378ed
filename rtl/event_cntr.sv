// event_cntr: 32-bit edge-sensitive event counter.
//
// An event controller turns each low-to-high transition of ev (while
// enable is high) into a one-cycle increment pulse and then waits for ev
// to return low, so events longer than a cycle (frames) count once. The
// 32-bit count is four cascaded 8-bit counters: stage k advances when the
// increment pulse and the terminal-count outputs of all lower stages are
// high; unused enable inputs are tied high. clear is synchronous, reset
// asynchronous. count changes one cycle after the rising edge of ev is
// sampled. carry marks the increment that wraps the count, for cascading.
// Structure as in the specification.
module event_cntr (
  input  logic        clk,
  input  logic        reset,
  input  logic        clear,
  input  logic        ev,
  input  logic        enable,
  output logic [31:0] count,
  output logic        carry     // increment that wraps the count to zero
);
  logic armed, inc;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) armed <= 1'b1;
    else       armed <= ~ev;
  end
  assign inc = ev & armed & enable;
  assign carry = inc & (&count) & ~clear;

  logic [3:0] ov;
  cascade_cntr #(.W(8), .N_EN(4)) c0 (.clk, .reset, .clr(clear), .en({3'b111, inc}),               .q(count[7:0]),   .ovfl(ov[0]));
  cascade_cntr #(.W(8), .N_EN(4)) c1 (.clk, .reset, .clr(clear), .en({2'b11, ov[0], inc}),         .q(count[15:8]),  .ovfl(ov[1]));
  cascade_cntr #(.W(8), .N_EN(4)) c2 (.clk, .reset, .clr(clear), .en({1'b1, ov[1], ov[0], inc}),   .q(count[23:16]), .ovfl(ov[2]));
  cascade_cntr #(.W(8), .N_EN(4)) c3 (.clk, .reset, .clr(clear), .en({ov[2], ov[1], ov[0], inc}),  .q(count[31:24]), .ovfl(ov[3]));
endmodule
