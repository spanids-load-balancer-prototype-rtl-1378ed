// transmit: transmit control, appends the Ethernet frame check sequence.
//
// Takes a frame in the internal format (preamble included, no checksum,
// valid low in the last data word, be giving that word's parity) and
// produces the external PHY format: valid high for the whole frame, the
// 4-byte CRC-32 appended right after the last data byte, and be low in
// the last cycle when the total length is odd.
//
// Inputs are registered. The first four words (preamble) pass through and
// initialise the checksum; from the fifth word on a running CRC is updated
// with both bytes per word. In the last data word both the 16-bit (even
// frame) and 8-bit (odd frame, high byte only) updates are formed and be
// selects one of them. Checksum bytes are the complement of the reflected
// CRC register, least significant byte first, as Ethernet requires.
// Even frame: ..., Dn, {C0,C1}, {C2,C3}. Odd frame: ..., {Dn,C0},
// {C1,C2}, {C3,--} with be low. Latency from data_i to data_o: 2 cycles.
// This follows the specification; register placement is this design's.
module transmit
  import spanids_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data_i,
  input  logic        valid_i,
  input  logic        be_i,
  output logic [15:0] data_o,
  output logic        valid_o,
  output logic        be_o
);
  logic [15:0] d1;
  logic v1, b1;
  typedef enum logic [2:0] {T_IDLE, T_PRE, T_DATA, T_C1, T_C2} state_e;
  state_e st;
  logic [1:0]  pcnt;
  logic [31:0] crc, crc16, crc8, fcs;
  logic        odd;

  assign crc8  = crc32_byte(crc, d1[15:8]);
  assign crc16 = crc32_byte(crc8, d1[7:0]);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      d1 <= '0; v1 <= 1'b0; b1 <= 1'b0;
      st <= T_IDLE; pcnt <= '0; crc <= '1; fcs <= '0; odd <= 1'b0;
      data_o <= '0; valid_o <= 1'b0; be_o <= 1'b0;
    end else begin
      d1 <= data_i; v1 <= valid_i; b1 <= be_i;
      valid_o <= 1'b0; be_o <= 1'b0; data_o <= d1;
      case (st)
        T_IDLE: if (v1) begin
          valid_o <= 1'b1; be_o <= 1'b1;
          crc <= '1; pcnt <= 2'd1; st <= T_PRE;
        end
        T_PRE: begin
          valid_o <= 1'b1; be_o <= 1'b1;
          pcnt <= pcnt + 1'b1;
          if (pcnt == 2'd3) st <= T_DATA;
        end
        T_DATA: begin
          valid_o <= 1'b1; be_o <= 1'b1;
          if (v1) begin
            crc <= crc16;
          end else if (b1) begin             // last word, even frame
            fcs <= ~crc16; odd <= 1'b0; st <= T_C1;
          end else begin                     // last word, odd frame
            fcs <= ~crc8; odd <= 1'b1; st <= T_C1;
            data_o <= {d1[15:8], ~crc8[7:0]};
          end
        end
        T_C1: begin
          valid_o <= 1'b1; be_o <= 1'b1;
          data_o <= odd ? {fcs[15:8], fcs[23:16]} : {fcs[7:0], fcs[15:8]};
          st <= T_C2;
        end
        T_C2: begin
          valid_o <= 1'b1; be_o <= ~odd;
          data_o <= odd ? {fcs[31:24], 8'h00} : {fcs[23:16], fcs[31:24]};
          st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
