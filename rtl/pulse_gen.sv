// pulse_gen: periodic pulse that turns packet counts into rates.
//
// A prescaler divides the clock into UNIT_CYCLES-cycle base units
// (250 ms at 62.5 MHz = 15,625,000 cycles); a unit counter then emits a
// one-cycle pulse every `period` units (6 bits, default 4 = 1 s). A new
// period value is taken over only when the current period ends. A period
// of 0 is treated as 1. The base unit, width, default and update rule
// follow the specification's register description; the prescaler
// structure is this design's.
module pulse_gen #(
  parameter int UNIT_CYCLES = 15_625_000
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [5:0] period,
  output logic       pulse
);
  localparam int PW = $clog2(UNIT_CYCLES + 1);
  logic [PW-1:0] pre;
  logic [5:0] units, cur;
  logic tick;
  assign tick = (pre == PW'(UNIT_CYCLES - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      pre <= '0; units <= '0; cur <= 6'd4; pulse <= 1'b0;
    end else begin
      pulse <= 1'b0;
      pre   <= tick ? '0 : pre + 1'b1;
      if (tick) begin
        if (units + 6'd1 >= cur || cur == 6'd0) begin
          units <= '0;
          pulse <= 1'b1;
          cur   <= period;
        end else begin
          units <= units + 1'b1;
        end
      end
    end
  end
endmodule
