// event_cntr64_async: 64-bit edge-sensitive event counter with an output
// latch in a second clock domain.
//
// Two 32-bit event counters are cascaded: the upper one counts a pulse
// formed when the lower counter wraps. clear_l (active low, synchronous to
// clk) clears the count and enable_l (active low) enables counting.
// latch_l (active low, sampled on clk_out) copies the running count into
// the count output register; the value then stays stable for reading.
// A clear also zeroes the latched value: the falling edge of clear_l
// toggles a flag that is synchronized into clk_out with two flip-flops,
// and a change of the synchronized flag clears count (two to three clk_out
// cycles after the clear). The count is sampled from clk into clk_out directly; latch_l is expected to
// be issued while the event rate is low or to tolerate one stale word,
// which is this design's simplification (the specification does not
// describe the crossing).
module event_cntr64_async (
  input  logic        clk,
  input  logic        clk_out,
  input  logic        reset,
  input  logic        clear_l,
  input  logic        event0,
  input  logic        enable_l,
  input  logic        latch_l,
  output logic [63:0] count
);
  logic [31:0] lo, hi;
  logic wrap;
  logic unused_carry;
  event_cntr u_lo (.clk, .reset, .clear(~clear_l), .ev(event0), .enable(~enable_l), .count(lo), .carry(wrap));
  // the upper half counts the one-cycle wrap pulse of the lower half
  event_cntr u_hi (.clk, .reset, .clear(~clear_l), .ev(wrap), .enable(1'b1), .count(hi), .carry(unused_carry));

  // clear request crossing: toggle on the falling edge of clear_l
  logic clr_d, clr_tgl;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      clr_d <= 1'b1; clr_tgl <= 1'b0;
    end else begin
      clr_d <= clear_l;
      if (clr_d && !clear_l) clr_tgl <= ~clr_tgl;
    end
  end

  logic [63:0] run_s;
  logic [2:0]  clr_s;
  always_ff @(posedge clk_out or posedge reset) begin
    if (reset) begin
      run_s <= '0; count <= '0; clr_s <= '0;
    end else begin
      run_s <= {hi, lo};
      clr_s <= {clr_s[1:0], clr_tgl};
      if (clr_s[2] != clr_s[1]) count <= '0;
      else if (!latch_l) count <= run_s;
    end
  end
endmodule
