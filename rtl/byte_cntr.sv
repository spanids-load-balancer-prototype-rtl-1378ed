// byte_cntr: packet byte counter, measures the length in bytes of each
// frame in the internal format (preamble and checksum excluded).
//
// The count is 14 bits (frames up to 9000 bytes). Bits 13..1 come from a
// 7-bit counter cascaded with a 6-bit counter that advances once per data
// word; bit 0 is set by the controller for odd-size frames. The
// controller skips the four preamble words, counts while valid is high,
// and at the last word (valid low) either counts one more word and
// latches (be high, even frame) or latches at once with bit 0 set (be low,
// odd frame). done is high for one cycle when count holds the new length;
// it also clears the counters. count holds its value until the next frame
// ends. reset_l is asynchronous and active low. Follows the specification.
module byte_cntr (
  input  logic        clk,
  input  logic        reset_l,
  input  logic        valid,
  input  logic        be,
  output logic [13:0] count,
  output logic        done
);
  typedef enum logic [1:0] {B_IDLE, B_PRE, B_CNT, B_LAST} state_e;
  state_e st;
  logic [1:0] pcnt;
  logic en, clr, ov7, ov6;
  logic [12:0] q;
  logic reset;
  assign reset = ~reset_l;

  cascade_cntr #(.W(7), .N_EN(1)) c7 (.clk, .reset, .clr, .en(en),            .q(q[6:0]),  .ovfl(ov7));
  cascade_cntr #(.W(6), .N_EN(2)) c6 (.clk, .reset, .clr, .en({ov7, en}),     .q(q[12:7]), .ovfl(ov6));

  always_comb begin
    en  = 1'b0;
    clr = 1'b0;
    case (st)
      B_CNT:  en  = valid | be;
      B_LAST: clr = 1'b1;
      default: ;
    endcase
    if (st == B_CNT && !valid && !be) clr = 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st <= B_IDLE; pcnt <= '0; count <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        B_IDLE: if (valid) begin pcnt <= 2'd1; st <= B_PRE; end
        B_PRE: begin
          pcnt <= pcnt + 1'b1;
          if (pcnt == 2'd3) st <= B_CNT;
        end
        B_CNT: if (!valid) begin
          if (be) st <= B_LAST;
          else begin
            count <= {q, 1'b1}; done <= 1'b1; st <= B_IDLE;
          end
        end
        B_LAST: begin
          count <= {q, 1'b0}; done <= 1'b1; st <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
