// afifo: synchronization FIFO between the tap PHY receive clock (clk_i)
// and the core clock (clk_o).
//
// Write side: the PHY frame (valid high for the whole frame including the
// 4-byte checksum, be low in the last cycle of an odd-size frame) passes
// three delay registers. The internal valid is the 3rd delayed valid ANDed
// with the undelayed valid (frame shortened by three cycles, so valid is
// low in the last data word and the checksum is stripped); be is the 3rd
// delayed be ANDed with the 1st delayed be (shortened by two cycles); the
// FIFO write strobe is the 3rd delayed valid ANDed with the 2nd delayed
// valid (shortened by one), which stores one extra, invalid word after
// each frame. An overflow controller samples the free space at the start
// of each frame: with fewer than MIN_FREE free entries the whole frame is
// skipped and `overrun` pulses for one clk_i cycle.
//
// Read side: once START_LEVEL entries are buffered the controller reads
// out, discarding the separator word first, forwards data with regenerated
// valid/be one cycle after the FIFO output, stops at the word whose stored
// valid is low (the last data word, be giving its parity), and then holds
// GAP idle cycles so that frames leave with the inter-packet gap.
// Output timing follows the internal frame format (valid low in the last
// data cycle). All of this follows the specification; the FIFO itself is a
// Gray-pointer dual-clock FIFO of this design (the original used a
// generated vendor core of 1023 entries).
module afifo #(
  parameter int DEPTH_LOG2  = 10,
  parameter int START_LEVEL = 32,
  parameter int MIN_FREE    = 64,
  parameter int GAP         = 5
) (
  input  logic        reset,
  input  logic        clk_i,
  input  logic        clk_o,
  input  logic [15:0] data_i,
  input  logic        valid_i,
  input  logic        be_i,
  output logic [15:0] data_o,
  output logic        valid_o,
  output logic        be_o,
  output logic        overrun
);
  // ---------------- write side ----------------
  logic [15:0] d1, d2, d3;
  logic v1, v2, v3, b1, b2, b3;
  logic vin, bin;          // registered PHY inputs
  logic [15:0] din;

  always_ff @(posedge clk_i or posedge reset) begin
    if (reset) begin
      din <= '0; vin <= 1'b0; bin <= 1'b0;
      d1 <= '0; d2 <= '0; d3 <= '0;
      {v1, v2, v3, b1, b2, b3} <= '0;
    end else begin
      din <= data_i; vin <= valid_i; bin <= be_i;
      d1 <= din; d2 <= d1; d3 <= d2;
      v1 <= vin; v2 <= v1; v3 <= v2;
      b1 <= bin; b2 <= b1; b3 <= b2;
    end
  end

  logic int_valid, int_be, shift;
  assign int_valid = v3 & vin;
  assign int_be    = b3 & b1;
  assign shift     = v3 & v2;

  logic [DEPTH_LOG2:0] wr_level;
  logic full, shift_en, shift_d;

  // Overflow controller: decides per frame, only in the gap.
  always_ff @(posedge clk_i or posedge reset) begin
    if (reset) begin
      shift_en <= 1'b1; shift_d <= 1'b0; overrun <= 1'b0;
    end else begin
      shift_d <= shift;
      overrun <= 1'b0;
      if (!shift) begin
        shift_en <= ((2**DEPTH_LOG2) - int'(wr_level)) >= MIN_FREE;
      end
      if (shift && !shift_d && !shift_en) overrun <= 1'b1;
    end
  end

  logic [17:0] rd_word;
  logic [DEPTH_LOG2:0] rd_level;
  logic empty, rd_en;

  async_fifo_core #(.W(18), .AW(DEPTH_LOG2)) u_fifo (
    .wclk(clk_i), .wreset(reset), .wr_en(shift & shift_en),
    .wr_data({int_valid, int_be, d3}), .wr_level(wr_level), .full(full),
    .rclk(clk_o), .rreset(reset), .rd_en(rd_en), .rd_data(rd_word),
    .rd_level(rd_level), .empty(empty)
  );

  // ---------------- read side ----------------
  typedef enum logic [2:0] {R_IDLE, R_DISCARD, R_FIRST, R_FRAME, R_GAP} rstate_e;
  rstate_e st;
  logic [3:0] gap_cnt;
  logic q_valid, q_be;
  logic primed;            // a separator word precedes the next frame
  assign q_valid = rd_word[17];
  assign q_be    = rd_word[16];

  always_comb begin
    rd_en = 1'b0;
    case (st)
      R_IDLE:    rd_en = (int'(rd_level) >= START_LEVEL);
      R_DISCARD: rd_en = 1'b1;
      R_FIRST:   rd_en = 1'b1;
      R_FRAME:   rd_en = q_valid;
      default:   rd_en = 1'b0;
    endcase
  end

  always_ff @(posedge clk_o or posedge reset) begin
    if (reset) begin
      st <= R_IDLE; gap_cnt <= '0; primed <= 1'b0;
      data_o <= '0; valid_o <= 1'b0; be_o <= 1'b0;
    end else begin
      data_o  <= rd_word[15:0];
      valid_o <= 1'b0;
      be_o    <= 1'b0;
      case (st)
        R_IDLE:    if (rd_en) st <= primed ? R_DISCARD : R_FIRST;
        R_DISCARD: st <= R_FIRST;                // separator at output, dropped
        R_FIRST:   begin                         // first preamble word at output
          valid_o <= 1'b1; be_o <= 1'b1; st <= R_FRAME;
        end
        R_FRAME: begin
          if (q_valid) begin
            valid_o <= 1'b1; be_o <= 1'b1;
          end else begin
            valid_o <= 1'b0; be_o <= q_be;       // last data word
            gap_cnt <= 4'(GAP);
            primed  <= 1'b1;
            st <= R_GAP;
          end
        end
        R_GAP: begin
          if (gap_cnt <= 4'd1) st <= R_IDLE;
          gap_cnt <= gap_cnt - 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
