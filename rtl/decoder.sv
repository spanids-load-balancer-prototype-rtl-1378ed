// decoder: packet header decoder of the load balancer.
//
// Follows each frame in the internal format word by word. After the four
// preamble words and the two MAC addresses it examines the Ethernet type;
// a VLAN tag (0x8100) or an 802.3 length with LLC/SNAP header is skipped
// and the type behind it is examined. A frame that is not IPv4 raises
// packet_ignore for one cycle and is ignored until it ends. For IPv4 the
// header length (IHL) is noted, the source and destination addresses (IP
// header words 3 and 4) are latched, option words are skipped, and the
// first payload word (TCP/UDP source and destination ports) is latched.
// packet_valid then pulses for one cycle, one cycle after the destination
// port half-word was on data_i, with packet_header =
// {src IP, dst IP, src port, dst port}. A frame that ends before that is
// dropped without a pulse. Follows the specification; the SNAP skip of
// three words (LLC/SNAP header) is this design's reading of it.
module decoder (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data_i,
  input  logic        valid_i,
  input  logic        be_i,
  output logic [95:0] packet_header,
  output logic        packet_valid,
  output logic        packet_ignore
);
  typedef enum logic [2:0] {D_IDLE, D_PRE, D_TYPE, D_SKIP, D_IP, D_WAIT} state_e;
  state_e st;
  logic [3:0] cnt;          // generic word counter
  logic [5:0] hw;           // half-word index inside the IP header/payload
  logic [3:0] ihl;
  logic [95:0] hdr;
  logic unused_be;
  assign unused_be = be_i;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st <= D_IDLE; cnt <= '0; hw <= '0; ihl <= '0; hdr <= '0;
      packet_header <= '0; packet_valid <= 1'b0; packet_ignore <= 1'b0;
    end else begin
      packet_valid  <= 1'b0;
      packet_ignore <= 1'b0;
      case (st)
        D_IDLE: if (valid_i) begin st <= D_PRE; cnt <= 4'd1; end
        D_PRE: begin                       // preamble 1..3, MAC 4..9
          cnt <= cnt + 1'b1;
          if (cnt == 4'd9) st <= D_TYPE;
          if (!valid_i) st <= D_IDLE;
        end
        D_TYPE: begin
          if (data_i == 16'h0800) begin
            st <= D_IP; hw <= '0;
          end else if (data_i == 16'h8100) begin
            st <= D_SKIP; cnt <= 4'd1;    // tag control word
          end else if (data_i <= 16'h05DC) begin
            st <= D_SKIP; cnt <= 4'd3;    // LLC/SNAP header
          end else begin
            packet_ignore <= 1'b1; st <= D_WAIT;
          end
          if (!valid_i) st <= D_IDLE;
        end
        D_SKIP: begin
          cnt <= cnt - 1'b1;
          if (cnt == 4'd1) st <= D_TYPE;
          if (!valid_i) st <= D_IDLE;
        end
        D_IP: begin
          hw <= hw + 1'b1;
          if (hw == 6'd0) begin
            ihl <= data_i[11:8];
            if (data_i[15:12] != 4'd4 || data_i[11:8] < 4'd5) begin
              packet_ignore <= 1'b1; st <= D_WAIT;
            end
          end
          if (hw == 6'd6) hdr[95:80] <= data_i;
          if (hw == 6'd7) hdr[79:64] <= data_i;
          if (hw == 6'd8) hdr[63:48] <= data_i;
          if (hw == 6'd9) hdr[47:32] <= data_i;
          if (hw == {1'b0, ihl, 1'b0})       hdr[31:16] <= data_i;
          if (hw == {1'b0, ihl, 1'b0} + 6'd1 && hw > 6'd9) begin
            packet_header <= {hdr[95:16], data_i};
            packet_valid  <= 1'b1;
            st <= D_WAIT;
          end
          if (!valid_i) st <= D_IDLE;
        end
        D_WAIT: if (!valid_i) st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
