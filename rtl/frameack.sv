// frameack: frame acknowledgement LED driver.
//
// Makes short events (frames) visible: a rising valid moves the two-state
// controller from idle to count, which enables a CNT_W-bit counter (20
// bits: 16.77 ms at 62.5 MHz) built from four cascaded CNT_W/4-bit
// counters. Further events are ignored until the counter rolls over, which
// returns the controller to idle. The active-low led output is on while
// counting and at least one of the two most significant counter bits is
// low, i.e. for the first three quarters of the period (12.6 ms), and off
// for the last quarter, so that a steady stream of frames blinks the LED.
// The specification's counters use active-low enables; here they are
// active high with the same cascade.
module frameack #(
  parameter int CNT_W = 20
) (
  input  logic clk,
  input  logic reset,
  input  logic valid,
  output logic led
);
  localparam int SW = CNT_W / 4;
  logic counting;
  logic [CNT_W-1:0] q;
  logic [3:0] ov;

  cascade_cntr #(.W(SW), .N_EN(4)) c0 (.clk, .reset, .clr(1'b0), .en({3'b111, counting}),               .q(q[SW-1:0]),      .ovfl(ov[0]));
  cascade_cntr #(.W(SW), .N_EN(4)) c1 (.clk, .reset, .clr(1'b0), .en({2'b11, ov[0], counting}),         .q(q[2*SW-1:SW]),   .ovfl(ov[1]));
  cascade_cntr #(.W(SW), .N_EN(4)) c2 (.clk, .reset, .clr(1'b0), .en({1'b1, ov[1], ov[0], counting}),   .q(q[3*SW-1:2*SW]), .ovfl(ov[2]));
  cascade_cntr #(.W(SW), .N_EN(4)) c3 (.clk, .reset, .clr(1'b0), .en({ov[2], ov[1], ov[0], counting}),  .q(q[4*SW-1:3*SW]), .ovfl(ov[3]));

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                 counting <= 1'b0;
    else if (!counting)        counting <= valid;
    else if (&ov)              counting <= 1'b0;   // roll-over
  end

  assign led = ~(counting & ~(q[4*SW-1] & q[4*SW-2]));
endmodule
