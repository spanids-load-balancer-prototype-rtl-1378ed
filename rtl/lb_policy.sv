// lb_policy: datapath of the intensity-based promote/demote decision.
//
// Decides whether a bucket is hot compared with its sensor's average:
//     rate > (threshold/4) * total / buckets
// rearranged without a divider (threshold counts in units of 0.25) as
//     4 * rate * buckets > threshold * total.
// Stage 1 registers the operands (rate 24 bits, buckets 12, total 24,
// threshold 8), stage 2 registers the two products (multiplier 0: rate x
// buckets, multiplier 1: total x threshold), stage 3 registers the
// comparison into `hot`. hot is thus valid three cycles after the operands
// are presented and follows them every cycle. The latched operands and
// products are also outputs for debugging over PCI. The datapath follows
// the specification's figure; the policy-mode selection and which source
// drives the operands (feedback index or a scanned bucket) are done by
// the caller.
module lb_policy (
  input  logic        clk,
  input  logic        reset,
  input  logic [23:0] rate,
  input  logic [11:0] buckets,
  input  logic [23:0] total,
  input  logic [7:0]  threshold,
  output logic        hot,
  output logic [31:0] mult0_op0,
  output logic [31:0] mult0_op1,
  output logic [63:0] mult0_res,
  output logic [31:0] mult1_op0,
  output logic [31:0] mult1_op1,
  output logic [63:0] mult1_res
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mult0_op0 <= '0; mult0_op1 <= '0; mult1_op0 <= '0; mult1_op1 <= '0;
      mult0_res <= '0; mult1_res <= '0; hot <= 1'b0;
    end else begin
      mult0_op0 <= {8'h0, rate};
      mult0_op1 <= {20'h0, buckets};
      mult1_op0 <= {8'h0, total};
      mult1_op1 <= {24'h0, threshold};
      mult0_res <= mult0_op0 * mult0_op1;
      mult1_res <= mult1_op0 * mult1_op1;
      hot       <= {mult0_res[61:0], 2'b00} > mult1_res;
    end
  end
endmodule
