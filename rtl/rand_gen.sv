// rand_gen: pseudo-random value between two programmable 5-bit bounds,
// both included.
//
// The value rotates through lo..hi, advancing by a step taken from a
// free-running 16-bit LFSR (1 to 4 per cycle), wrapping back to lo when it
// would pass hi. The bounds are re-sampled only at a wrap, so after a
// bound is changed the old range is used until the current rotation ends,
// as the specification's register description says. Users sample the
// value at unrelated times (packet arrivals, flow control), which makes it
// effectively random. If lo > hi the value stays at lo. The rotating
// structure is this design's reading of the specification.
module rand_gen (
  input  logic       clk,
  input  logic       reset,
  input  logic [4:0] lo,
  input  logic [4:0] hi,
  output logic [4:0] value
);
  logic [15:0] lfsr;
  logic [4:0]  cur_lo, cur_hi;
  logic [5:0]  nxt;
  assign nxt = {1'b0, value} + {4'b0, lfsr[1:0]} + 6'd1;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      lfsr <= 16'hACE1; value <= '0; cur_lo <= '0; cur_hi <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (nxt > {1'b0, cur_hi} || value < cur_lo) begin
        value  <= lo;
        cur_lo <= lo;
        cur_hi <= hi;
      end else begin
        value <= nxt[4:0];
      end
    end
  end
endmodule
