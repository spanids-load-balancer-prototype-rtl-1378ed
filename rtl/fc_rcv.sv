// fc_rcv: flow control receiver.
//
// Receives init-reply and flow-control frames from the sensors on the
// receive side of the sensor PHY (external format, data_f/valid_f). An
// align stage finds the start-frame delimiter 0xD5; when it appears in the
// upper (even) byte the byte lanes are swapped with the odd byte delayed
// one cycle, so that frame data always starts on a half-word boundary.
// The frame is then checked half-word by half-word: destination MAC and IP
// must be the load balancer's, Ethernet type IPv4, IP protocol UDP,
// source and destination UDP port 0x1BCD. The opcode, sender MAC and
// sender IP are collected in a 96-bit register.
//
// Init-reply (opcode 1, accepted while accept_reply is high): the sender
// MAC is written into the next entry of a 64-entry sensor table with its
// valid bit set, the sensor counter advances, and in the next 5 cycles the
// MAC (3 half-words) and IP (2 half-words) are written into that sensor's
// performance record (perfmon_cmd WRITE, half-word addresses idx*16+1..5).
// Flow control (opcode 2): a two-stage associative lookup compares the
// sender MAC with all valid entries (stage 1: match vector, stage 2:
// encoder) and pushes the index into a 16-entry FIFO: fc_idx/fc_valid show
// its head, fc_ack removes it. lu_idx looks up a sensor's MAC: lu_mac and
// lu_valid are registered (valid one cycle later). sensor_count is 7 bits
// so that 64 sensors can be represented. The structure follows the
// specification; FIFO depth, the accept window and the duplicate-free
// assumption (a sensor replying twice gets two entries) are this design's.
module fc_rcv
  import spanids_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data_f,
  input  logic        valid_f,
  input  logic        accept_reply,
  output logic [6:0]  sensor_count,
  output logic [5:0]  fc_idx,
  output logic        fc_valid,
  input  logic        fc_ack,
  input  logic [5:0]  lu_idx,
  output logic [47:0] lu_mac,
  output logic        lu_valid,
  output logic [1:0]  perfmon_cmd,
  output logic [9:0]  perfmon_addr,
  output logic [15:0] perfmon_data,
  output logic        perfmon_load
);
  // ---------------- align ----------------
  typedef enum logic [1:0] {A_HUNT, A_EVEN, A_SWAP} astate_e;
  astate_e ast;
  logic [7:0]  held;
  logic [15:0] aw;     // aligned word
  logic        av;     // aligned word valid
  logic        aend;   // frame ended (one pulse)

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ast <= A_HUNT; held <= '0; aw <= '0; av <= 1'b0; aend <= 1'b0;
    end else begin
      av <= 1'b0; aend <= 1'b0;
      case (ast)
        A_HUNT: if (valid_f) begin
          if (data_f[7:0] == 8'hD5 && data_f[15:8] == 8'h55) ast <= A_EVEN;
          else if (data_f[15:8] == 8'hD5) begin ast <= A_SWAP; held <= data_f[7:0]; end
        end
        A_EVEN: begin
          aw <= data_f; av <= valid_f;
          if (!valid_f) begin ast <= A_HUNT; aend <= 1'b1; end
        end
        A_SWAP: begin
          aw <= {held, data_f[15:8]}; av <= valid_f; held <= data_f[7:0];
          if (!valid_f) begin ast <= A_HUNT; aend <= 1'b1; end
        end
        default: ast <= A_HUNT;
      endcase
    end
  end

  // ---------------- decode ----------------
  logic [4:0]  wi;        // aligned half-word index
  logic        ok;
  logic [95:0] fc_header; // {opcode, sender MAC, sender IP}
  logic        got_all;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      wi <= '0; ok <= 1'b1; fc_header <= '0; got_all <= 1'b0;
    end else if (aend) begin
      wi <= '0; ok <= 1'b1; got_all <= 1'b0;
    end else if (av) begin
      if (wi != 5'd31) wi <= wi + 1'b1;
      case (wi)
        5'd0:  if (aw != LB_MAC[47:32]) ok <= 1'b0;
        5'd1:  if (aw != LB_MAC[31:16]) ok <= 1'b0;
        5'd2:  if (aw != LB_MAC[15:0])  ok <= 1'b0;
        5'd6:  if (aw != ETH_IP)        ok <= 1'b0;
        5'd7:  if (aw[15:8] != 8'h45)   ok <= 1'b0;
        5'd11: if (aw[7:0] != 8'h11)    ok <= 1'b0;
        5'd15: if (aw != LB_IP[31:16])  ok <= 1'b0;
        5'd16: if (aw != LB_IP[15:0])   ok <= 1'b0;
        5'd17: if (aw != UDP_PORT)      ok <= 1'b0;
        5'd18: if (aw != UDP_PORT)      ok <= 1'b0;
        5'd21: fc_header[95:80] <= aw;
        5'd22: fc_header[79:64] <= aw;
        5'd23: fc_header[63:48] <= aw;
        5'd24: fc_header[47:32] <= aw;
        5'd25: fc_header[31:16] <= aw;
        5'd26: begin fc_header[15:0] <= aw; got_all <= 1'b1; end
        default: ;
      endcase
    end
  end

  logic frame_ok;
  assign frame_ok = aend & ok & got_all;

  // ---------------- sensor table ----------------
  logic [47:0] mac_tab [64];
  logic [63:0] vld;
  logic [5:0]  wr_idx;
  logic        is_reply, is_fc;
  assign is_reply = frame_ok && fc_header[95:80] == OP_REPLY && accept_reply && sensor_count < 7'd64;
  assign is_fc    = frame_ok && fc_header[95:80] == OP_FC;
  assign wr_idx   = sensor_count[5:0];

  always_ff @(posedge clk) begin
    if (is_reply) mac_tab[wr_idx] <= fc_header[79:32];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      vld <= '0; sensor_count <= '0; lu_mac <= '0; lu_valid <= 1'b0;
    end else begin
      if (is_reply) begin
        vld[wr_idx]  <= 1'b1;
        sensor_count <= sensor_count + 1'b1;
      end
      lu_mac   <= mac_tab[lu_idx];
      lu_valid <= vld[lu_idx];
    end
  end

  // ---------------- performance monitor writes ----------------
  logic [2:0]  pm_step;
  logic [5:0]  pm_idx;
  logic [79:0] pm_val;     // MAC and IP of the reply
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      pm_step <= '0; pm_idx <= '0; pm_val <= '0;
    end else if (is_reply) begin
      pm_step <= 3'd1; pm_idx <= wr_idx; pm_val <= fc_header[79:0];
    end else if (pm_step != 3'd0) begin
      pm_step <= (pm_step == 3'd5) ? 3'd0 : pm_step + 1'b1;
      pm_val  <= {pm_val[63:0], 16'h0};
    end
  end
  assign perfmon_load = (pm_step != 3'd0);
  assign perfmon_cmd  = PM_WRITE;
  assign perfmon_addr = {pm_idx, 1'b0, pm_step};
  assign perfmon_data = pm_val[79:64];

  // ---------------- associative lookup and FC FIFO ----------------
  logic [63:0] match;
  logic        m_v, e_v;
  logic [5:0]  e_idx;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      match <= '0; m_v <= 1'b0; e_v <= 1'b0; e_idx <= '0;
    end else begin
      m_v <= is_fc;
      for (int i = 0; i < 64; i++) match[i] <= vld[i] && (mac_tab[i] == fc_header[79:32]);
      e_v   <= m_v && (match != '0);
      e_idx <= '0;
      for (int i = 0; i < 64; i++) if (match[i]) e_idx <= 6'(i);
    end
  end

  logic fifo_empty, fifo_full;
  sync_fifo #(.W(6), .AW(4)) u_fcfifo (
    .clk, .reset, .wr_en(e_v), .wr_data(e_idx), .rd_en(fc_ack),
    .rd_data(fc_idx), .empty(fifo_empty), .full(fifo_full)
  );
  assign fc_valid = ~fifo_empty;
endmodule
