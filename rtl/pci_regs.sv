// pci_regs: PCI backside agent with the load balancer's register map.
//
// Sits behind pci_target on pci_clk. Every backside read or write is
// acknowledged by a pci_ack instance three cycles after the strobe; writes
// take effect in the acknowledgement cycle, read data is multiplexed and
// registered every cycle so memory-backed locations (one-cycle read
// latency) are settled when the acknowledgement is given.
// Region 0 (word offsets are byte offsets / 4):
//   00 magic 0xDEADBEEF            04 init: R {~init_reset, init_start,
//   init_done}, W pulses init_l    08 mode {no_frames, no_routing}
//   0C perf monitor {snapshot, clear2..0}: W requests, R request|busy
//   10/14, 18/1C  packet and non-IP counters   20 sensor count
//   24 init latency   28 rate period   2C random bounds {hi[12:8], lo[4:0]}
//   30 threshold   34 bucket count   38 heuristic
//   40..7C moved, promoted, demoted, route level 0..4 counters
//   80/84/88 last received/transmitted/flow control frame length
//   90..9C last hash index 0..3   A0..BC multiplier operands and results
//   C0/C4 overflow counter   100..17C init packet (write only)
//   6000.., A000.., E000.. received, transmitted, flow control frames
//   10000..1FFFC hash tables 0..3
// Region 1: performance monitor records (address passed through).
// 64-bit counters: a write to the upper (8-byte aligned) word pulses the
// counter's latch_l, a write to the lower word pulses its clear_l; reads
// return the latched value, upper word first. Counter order in
// counters/cnt_latch_l/cnt_clear_l: 0 packets, 1 non-IP, 2 moved,
// 3 promoted, 4 demoted, 5..9 route levels 0..4, 10 overflow.
// Performance monitor requests are held until the monitor's acknowledge
// rises, then dropped; the status read is request OR acknowledge.
// init_reset/init_start/init_done come from the logic clock domain and are
// synchronized with two flip-flops; the other inputs are quasi-static
// debug values and are sampled directly. The map and the reset values
// (mode 0, period 4) follow the specification; the other reset values
// (random bounds 2..8, threshold 8 = 2.0, 4 buckets, intensity heuristic)
// and the random-bound bit positions are this design's.
module pci_regs (
  input  logic        pci_clk,
  input  logic        reset_l,
  input  logic [17:0] addr_offset,
  input  logic        addr_region,
  input  logic [3:0]  be,
  input  logic [31:0] data_wr,
  output logic [31:0] data_rd,
  input  logic        wr_l,
  input  logic        rd_l,
  output logic        wr_ack_l,
  output logic        rd_ack_l,
  input  logic        init_reset,
  input  logic        init_start,
  input  logic        init_done,
  output logic        init_l,
  output logic        no_routing,
  output logic        no_frames,
  output logic [2:0]  pm_clear,
  output logic        pm_snapshot,
  input  logic        pm_clear_ack,
  input  logic        pm_snapshot_ack,
  input  logic [10:0][63:0] counters,
  output logic [10:0] cnt_latch_l,
  output logic [10:0] cnt_clear_l,
  input  logic [6:0]  sensor_count,
  input  logic [31:0] init_latency,
  output logic [5:0]  period,
  output logic [4:0]  rnd_lo,
  output logic [4:0]  rnd_hi,
  output logic [7:0]  threshold,
  output logic [3:0]  bucket_count,
  output logic [2:0]  lb_mode,
  input  logic [31:0] len_rx,
  input  logic [31:0] len_tx,
  input  logic [31:0] len_fc,
  input  logic [3:0][11:0] last_hash,
  input  logic [31:0] mult0_op0,
  input  logic [31:0] mult0_op1,
  input  logic [63:0] mult0_res,
  input  logic [31:0] mult1_op0,
  input  logic [31:0] mult1_op1,
  input  logic [63:0] mult1_res,
  output logic [4:0]  init_addr,
  output logic [31:0] init_data,
  output logic        init_wr_l,
  output logic [11:0] fl_addr,
  input  logic [31:0] fl_rx_data,
  input  logic [31:0] fl_tx_data,
  input  logic [31:0] fl_fc_data,
  output logic [11:0] ht_addr,
  input  logic [3:0][31:0] ht_data,
  output logic [17:0] pm_addr,
  input  logic [31:0] pm_data
);
  pci_ack u_ack (.clk(pci_clk), .reset_l, .rd_l, .wr_l, .rd_ack_l, .wr_ack_l);

  logic [2:0] s1, s2;   // init_reset, init_start, init_done synchronizers
  always_ff @(posedge pci_clk or negedge reset_l) begin
    if (!reset_l) begin s1 <= '0; s2 <= '0; end
    else begin s1 <= {init_reset, init_start, init_done}; s2 <= s1; end
  end

  logic [17:0] w;
  assign w       = addr_offset;
  assign fl_addr = {1'b0, w[10:0]};
  assign ht_addr = w[11:0];
  assign pm_addr = w;

  // counter slot of a word offset, or 15 for none
  function automatic logic [3:0] cnt_slot(input logic [17:0] a);
    if (a[17:6] != '0) return 4'd15;
    case (a[5:1])
      5'h02:   return 4'd0;   // 10-14
      5'h03:   return 4'd1;   // 18-1C
      5'h08:   return 4'd2;   // 40-44
      5'h09:   return 4'd3;   // 48-4C
      5'h0A:   return 4'd4;   // 50-54
      5'h0B:   return 4'd5;   // 58-5C
      5'h0C:   return 4'd6;   // 60-64
      5'h0D:   return 4'd7;   // 68-6C
      5'h0E:   return 4'd8;   // 70-74
      5'h0F:   return 4'd9;   // 78-7C
      5'h18:   return 4'd10;  // C0-C4
      default: return 4'd15;
    endcase
  endfunction

  logic       wr_now;
  logic [3:0] slot;
  assign wr_now = !wr_l && !wr_ack_l && !addr_region;
  assign slot   = cnt_slot(w);

  always_ff @(posedge pci_clk or negedge reset_l) begin
    if (!reset_l) begin
      init_l <= 1'b1; no_routing <= 1'b0; no_frames <= 1'b0; pm_clear <= '0; pm_snapshot <= 1'b0;
      cnt_latch_l <= '1; cnt_clear_l <= '1;
      period <= 6'd4; rnd_lo <= 5'd2; rnd_hi <= 5'd8; threshold <= 8'd8; bucket_count <= 4'd4;
      lb_mode <= 3'b011; init_addr <= '0; init_data <= '0; init_wr_l <= 1'b1;
    end else begin
      init_l <= 1'b1; init_wr_l <= 1'b1; cnt_latch_l <= '1; cnt_clear_l <= '1;
      if (pm_clear_ack)    pm_clear    <= '0;
      if (pm_snapshot_ack) pm_snapshot <= 1'b0;
      if (wr_now) begin
        if (slot != 4'd15) begin
          if (!w[0]) cnt_latch_l[slot] <= 1'b0;
          else       cnt_clear_l[slot] <= 1'b0;
        end
        if (w[17:5] == 13'h2) begin      // 100-17C
          init_addr <= w[4:0]; init_data <= data_wr; init_wr_l <= 1'b0;
        end
        if (w[17:6] == '0) begin
          case (w[5:0])
            6'h01: init_l <= 1'b0;
            6'h02: if (be[0]) {no_frames, no_routing} <= data_wr[1:0];
            6'h03: if (be[0]) begin pm_snapshot <= data_wr[3]; pm_clear <= data_wr[2:0]; end
            6'h0A: if (be[0]) period <= data_wr[5:0];
            6'h0B: begin
              if (be[0]) rnd_lo <= data_wr[4:0];
              if (be[1]) rnd_hi <= data_wr[12:8];
            end
            6'h0C: if (be[0]) threshold <= data_wr[7:0];
            6'h0D: if (be[0]) bucket_count <= data_wr[3:0];
            6'h0E: if (be[0]) lb_mode <= data_wr[2:0];
            default: ;
          endcase
        end
      end
    end
  end

  // read multiplexer
  logic [31:0] rmux;
  always_comb begin
    rmux = 32'h0;
    if (addr_region) rmux = pm_data;
    else if (w[17:14] == 4'h1) rmux = ht_data[w[13:12]];          // 10000-1FFFC
    else if (w[17:11] == 7'h03) rmux = fl_rx_data;                 // 6000-7FFC
    else if (w[17:11] == 7'h05) rmux = fl_tx_data;                 // A000-BFFC
    else if (w[17:11] == 7'h07) rmux = fl_fc_data;                 // E000-FFFC
    else if (slot != 4'd15) rmux = w[0] ? counters[slot][31:0] : counters[slot][63:32];
    else if (w[17:6] == '0) begin
      case (w[5:0])
        6'h00: rmux = 32'hDEAD_BEEF;
        6'h01: rmux = {29'h0, ~s2[2], s2[1], s2[0]};
        6'h02: rmux = {30'h0, no_frames, no_routing};
        6'h03: rmux = {28'h0, pm_snapshot | pm_snapshot_ack, pm_clear | {3{pm_clear_ack}}};
        6'h08: rmux = {25'h0, sensor_count};
        6'h09: rmux = init_latency;
        6'h0A: rmux = {26'h0, period};
        6'h0B: rmux = {19'h0, rnd_hi, 3'h0, rnd_lo};
        6'h0C: rmux = {24'h0, threshold};
        6'h0D: rmux = {28'h0, bucket_count};
        6'h0E: rmux = {29'h0, lb_mode};
        6'h20: rmux = len_rx;
        6'h21: rmux = len_tx;
        6'h22: rmux = len_fc;
        6'h24: rmux = {20'h0, last_hash[0]};
        6'h25: rmux = {20'h0, last_hash[1]};
        6'h26: rmux = {20'h0, last_hash[2]};
        6'h27: rmux = {20'h0, last_hash[3]};
        6'h28: rmux = mult0_op0;
        6'h29: rmux = mult0_op1;
        6'h2A: rmux = mult0_res[63:32];
        6'h2B: rmux = mult0_res[31:0];
        6'h2C: rmux = mult1_op0;
        6'h2D: rmux = mult1_op1;
        6'h2E: rmux = mult1_res[63:32];
        6'h2F: rmux = mult1_res[31:0];
        default: rmux = 32'h0;
      endcase
    end
  end

  always_ff @(posedge pci_clk) data_rd <= rmux;
endmodule
