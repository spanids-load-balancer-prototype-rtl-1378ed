// spanids_top: SPANIDS load balancer FPGA.
//
// Frames from the Gigabit Ethernet tap (tap_rx_*, on tap_clk) enter the
// synchronization FIFO, which moves them into the sensor-side PHY clock
// (sw_clk, the logic clock) and into the internal frame format. From there
// each frame goes both to the routing and load balancing logic and into
// the delay pipeline; the pipeline rewrites the destination MAC address
// with the one the load balancer found (or drops the frame), or sends the
// initialization request instead, and the transmit stage appends the
// Ethernet checksum and drives the sensor/switch PHY (sw_tx_*). The
// receive side of the same PHY (sw_rx_*) carries the sensors' sign-on
// replies and flow control frames to the load balancer. The performance
// monitor (on pci_clk, fed through its own dual-clock FIFO) and a register
// file are reached through the PCI target (region 0: registers, debug
// memories, hash tables; region 1: performance records).
// Also here: 64-bit event counters (packets in, non-IP packets, buckets
// moved/promoted/demoted, packets per hash level, frames lost to overrun),
// frame latches of the last received, transmitted and flow control frames,
// the rate pulse generator, the random number generator, the
// initialization latency counter and three activity LEDs (active low):
// led[0] board LED 3 (on during initialization, then flashes per
// transmitted frame), led[1] LED 4 (on until initialization starts, then
// flashes per received sensor frame), led[2] LED 5 (on during load
// balancer reset, flashes on PCI transactions).
// Board-level parts are ports: the PHY pins (the PHY's inputs are
// registered inside the FIFO and here), the PHY clocks (already buffered by
// the clock DLLs), the LEDs and the PCI bus, whose shared lines are split
// into input, output and output-enable for tri-state pads. pci_rst_l is the
// board reset; it is synchronized into each clock domain. The load
// balancer is additionally reset by the initialization logic. The PCI
// domain's synchronized reset is used as an asynchronous reset by most
// registers and reaches other logic as an ordinary input; lint tools
// flag this mixed use, which is intended: the signal is released
// synchronously to pci_clk, so both uses are safe.
// Parameters CNT_W (initialization counter), UNIT_CYCLES (250 ms rate
// unit) and ACK_CNT_W (LED stretch) default to the hardware values.
// The structure follows the specification's architecture; the port
// naming, the reset synchronizers, the single-bit control synchronizers
// and the LED multiplexing are this design's.
module spanids_top
  import spanids_pkg::*;
#(
  parameter int CNT_W       = 28,
  parameter int UNIT_CYCLES = 15_625_000,
  parameter int ACK_CNT_W   = 20,
  parameter int DELAY       = 49
) (
  // tap PHY receive port
  input  logic        tap_clk,
  input  logic [15:0] tap_rx_data,
  input  logic        tap_rx_valid,
  input  logic        tap_rx_be,
  // sensor/switch PHY
  input  logic        sw_clk,
  output logic [15:0] sw_tx_data,
  output logic        sw_tx_valid,
  output logic        sw_tx_be,
  output logic        sw_tx_err,
  input  logic [15:0] sw_rx_data,
  input  logic        sw_rx_valid,
  input  logic        sw_rx_be,
  // PCI bus
  input  logic        pci_clk,
  input  logic        pci_rst_l,
  input  logic [31:0] pci_ad_i,
  output logic [31:0] pci_ad_o,
  output logic        pci_ad_oe,
  input  logic [3:0]  pci_c_be_l,
  input  logic        pci_par_i,
  output logic        pci_par_o,
  output logic        pci_par_oe,
  output logic        pci_perr_oe,
  output logic        pci_serr_oe,
  input  logic        pci_frame_l,
  input  logic        pci_irdy_l,
  output logic        pci_trdy_l,
  output logic        pci_stop_l,
  output logic        pci_devsel_l,
  output logic        pci_s_oe,
  input  logic        pci_idsel,
  // board LEDs 3..5, active low
  output logic [2:0]  led
);
  // ------------------------------------------------------------------
  // resets
  // ------------------------------------------------------------------
  logic [1:0] rs_sw, rs_tap, rs_pci;
  logic       rst_sw, rst_tap, rst_pci_l;
  always_ff @(posedge sw_clk or negedge pci_rst_l)
    if (!pci_rst_l) rs_sw <= '0; else rs_sw <= {rs_sw[0], 1'b1};
  always_ff @(posedge tap_clk or negedge pci_rst_l)
    if (!pci_rst_l) rs_tap <= '0; else rs_tap <= {rs_tap[0], 1'b1};
  always_ff @(posedge pci_clk or negedge pci_rst_l)
    if (!pci_rst_l) rs_pci <= '0; else rs_pci <= {rs_pci[0], 1'b1};
  assign rst_sw    = ~rs_sw[1];
  assign rst_tap   = ~rs_tap[1];
  assign rst_pci_l = rs_pci[1];

  // ------------------------------------------------------------------
  // PCI target and register file
  // ------------------------------------------------------------------
  logic [17:0] addr_offset;
  logic        addr_region, wr_l, rd_l, wr_ack_l, rd_ack_l;
  logic [3:0]  be;
  logic [31:0] data_wr, data_rd;

  pci_target u_pci (
    .clk(pci_clk), .reset_l(rst_pci_l),
    .ad_i(pci_ad_i), .ad_o(pci_ad_o), .ad_oe(pci_ad_oe), .c_be_l(pci_c_be_l),
    .par_i(pci_par_i), .par_o(pci_par_o), .par_oe(pci_par_oe),
    .perr_oe(pci_perr_oe), .serr_oe(pci_serr_oe),
    .frame_l(pci_frame_l), .irdy_l(pci_irdy_l), .trdy_l(pci_trdy_l), .stop_l(pci_stop_l),
    .devsel_l(pci_devsel_l), .s_oe(pci_s_oe), .idsel(pci_idsel),
    .addr_offset, .addr_region, .be, .data_wr, .data_rd, .wr_l, .rd_l, .wr_ack_l, .rd_ack_l
  );

  logic        init_reset, init_start, init_done, init_l;
  logic        no_routing_p, no_frames_p;
  logic [2:0]  pm_clear;
  logic        pm_snapshot, pm_clear_ack, pm_snapshot_ack;
  logic [10:0][63:0] counters;
  logic [10:0] cnt_latch_l, cnt_clear_l;
  logic [6:0]  sensor_count;
  logic [31:0] init_latency;
  logic [5:0]  period;
  logic [4:0]  rnd_lo, rnd_hi, random_val;
  logic [7:0]  threshold;
  logic [3:0]  bucket_count;
  logic [2:0]  lb_mode;
  logic [31:0] len_rx, len_tx, len_fc;
  logic [3:0][11:0] last_hash;
  logic [31:0] mult0_op0, mult0_op1, mult1_op0, mult1_op1;
  logic [63:0] mult0_res, mult1_res;
  logic [4:0]  init_addr;
  logic [31:0] init_data;
  logic        init_wr_l;
  logic [11:0] fl_addr, ht_addr;
  logic [31:0] fl_rx_data, fl_tx_data, fl_fc_data, pm_data;
  logic [3:0][31:0] ht_data;
  logic [17:0] pm_addr;

  pci_regs u_regs (
    .pci_clk, .reset_l(rst_pci_l), .addr_offset, .addr_region, .be, .data_wr, .data_rd,
    .wr_l, .rd_l, .wr_ack_l, .rd_ack_l,
    .init_reset, .init_start, .init_done, .init_l,
    .no_routing(no_routing_p), .no_frames(no_frames_p),
    .pm_clear, .pm_snapshot, .pm_clear_ack, .pm_snapshot_ack,
    .counters, .cnt_latch_l, .cnt_clear_l, .sensor_count, .init_latency,
    .period, .rnd_lo, .rnd_hi, .threshold, .bucket_count, .lb_mode,
    .len_rx, .len_tx, .len_fc, .last_hash,
    .mult0_op0, .mult0_op1, .mult0_res, .mult1_op0, .mult1_op1, .mult1_res,
    .init_addr, .init_data, .init_wr_l,
    .fl_addr, .fl_rx_data, .fl_tx_data, .fl_fc_data, .ht_addr, .ht_data, .pm_addr, .pm_data
  );

  // single-bit controls into the logic clock domain
  logic [1:0] s_nr, s_nf, s_il;
  logic [10:0] s_cl1, s_cl2;
  logic        no_routing, no_frames, init_cntl_l;
  always_ff @(posedge sw_clk or posedge rst_sw) begin
    if (rst_sw) begin
      s_nr <= '0; s_nf <= '0; s_il <= '1; s_cl1 <= '1; s_cl2 <= '1;
    end else begin
      s_nr <= {s_nr[0], no_routing_p};
      s_nf <= {s_nf[0], no_frames_p};
      s_il <= {s_il[0], init_l};
      s_cl1 <= cnt_clear_l; s_cl2 <= s_cl1;
    end
  end
  assign no_routing  = s_nr[1];
  assign no_frames   = s_nf[1];
  assign init_cntl_l = s_il[1];

  // ------------------------------------------------------------------
  // frame path
  // ------------------------------------------------------------------
  logic [15:0] fr_data, dp_data, sw_rx_data_q;
  logic        fr_valid, fr_be, dp_valid, dp_be, overrun, sw_rx_valid_q, sw_rx_be_q;

  afifo u_afifo (
    .reset(rst_sw | rst_tap), .clk_i(tap_clk), .clk_o(sw_clk),
    .data_i(tap_rx_data), .valid_i(tap_rx_valid), .be_i(tap_rx_be),
    .data_o(fr_data), .valid_o(fr_valid), .be_o(fr_be), .overrun
  );

  logic [47:0] mac_addr;
  logic        mac_load;

  delaypipe #(.DELAY(DELAY), .CNT_W(CNT_W)) u_dp (
    .clk(sw_clk), .reset(rst_sw), .data_i(fr_data), .valid_i(fr_valid), .be_i(fr_be),
    .mac_addr, .mac_load, .data_o(dp_data), .valid_o(dp_valid), .be_o(dp_be),
    .no_routing, .no_frames, .init_cntl_l, .init_reset, .init_start, .init_done,
    .pci_clk, .pci_addr(init_addr), .pci_data(init_data), .pci_wr_l(init_wr_l)
  );

  transmit u_tx (
    .clk(sw_clk), .reset(rst_sw), .data_i(dp_data), .valid_i(dp_valid), .be_i(dp_be),
    .data_o(sw_tx_data), .valid_o(sw_tx_valid), .be_o(sw_tx_be)
  );
  assign sw_tx_err = 1'b0;

  always_ff @(posedge sw_clk or posedge rst_sw) begin
    if (rst_sw) begin
      sw_rx_data_q <= '0; sw_rx_valid_q <= 1'b0; sw_rx_be_q <= 1'b0;
    end else begin
      sw_rx_data_q <= sw_rx_data; sw_rx_valid_q <= sw_rx_valid; sw_rx_be_q <= sw_rx_be;
    end
  end

  // ------------------------------------------------------------------
  // load balancer
  // ------------------------------------------------------------------
  logic lb_reset, packet_ignore, move, promote, demote;
  logic route_l0, route_l1, route_l2, route_l3, route_l4, pulse;
  logic [1:0]  pm_cmd;
  logic [9:0]  pm_cmd_addr;
  logic [15:0] pm_cmd_data;
  logic        pm_load, pm_full;
  assign lb_reset = rst_sw | init_reset;

  loadbalancer u_lb (
    .clk(sw_clk), .reset(lb_reset),
    .data_i(fr_data), .valid_i(fr_valid), .be_i(fr_be),
    .data_f(sw_rx_data_q), .valid_f(sw_rx_valid_q), .be_f(sw_rx_be_q),
    .init_start, .init_done, .no_routing, .mac_addr, .mac_load, .packet_ignore,
    .sensor_count, .pulse, .threshold, .bucket_count, .random_val, .lb_mode,
    .perfmon_cmd(pm_cmd), .perfmon_addr(pm_cmd_addr), .perfmon_data(pm_cmd_data),
    .perfmon_load(pm_load), .perfmon_full(pm_full),
    .last_hash0(last_hash[0]), .last_hash1(last_hash[1]),
    .last_hash2(last_hash[2]), .last_hash3(last_hash[3]),
    .move, .promote, .demote, .route_l0, .route_l1, .route_l2, .route_l3, .route_l4,
    .pci_clk, .pci_addr(ht_addr),
    .pci_data_table0(ht_data[0]), .pci_data_table1(ht_data[1]),
    .pci_data_table2(ht_data[2]), .pci_data_table3(ht_data[3]),
    .mult0_op0, .mult0_op1, .mult1_op0, .mult1_op1, .mult0_res, .mult1_res
  );

  pulse_gen #(.UNIT_CYCLES(UNIT_CYCLES)) u_pulse (
    .clk(sw_clk), .reset(rst_sw), .period, .pulse
  );

  rand_gen u_rand (.clk(sw_clk), .reset(rst_sw), .lo(rnd_lo), .hi(rnd_hi), .value(random_val));

  perf_monitor u_pm (
    .pci_clk, .clk(sw_clk), .pci_reset_l(rst_pci_l), .pci_addr(pm_addr), .pci_data(pm_data),
    .clear(pm_clear), .clear_ack(pm_clear_ack), .snapshot(pm_snapshot),
    .snapshot_ack(pm_snapshot_ack), .cmd_in(pm_cmd), .addr_in(pm_cmd_addr),
    .data_in(pm_cmd_data), .shift_in(pm_load), .fifo_full(pm_full)
  );

  // ------------------------------------------------------------------
  // event counters
  // ------------------------------------------------------------------
  logic [10:0] events;
  assign events = {overrun, route_l4, route_l3, route_l2, route_l1, route_l0,
                   demote, promote, move, packet_ignore, fr_valid};

  for (genvar i = 0; i < 10; i++) begin : g_cnt
    event_cntr64_async u_cnt (
      .clk(sw_clk), .clk_out(pci_clk), .reset(rst_sw), .clear_l(s_cl2[i]),
      .event0(events[i]), .enable_l(1'b0), .latch_l(cnt_latch_l[i]), .count(counters[i])
    );
  end

  // the overrun counter runs on the tap clock
  logic [1:0] s_ov;
  always_ff @(posedge tap_clk or posedge rst_tap)
    if (rst_tap) s_ov <= '1; else s_ov <= {s_ov[0], cnt_clear_l[10]};
  event_cntr64_async u_cnt_ovfl (
    .clk(tap_clk), .clk_out(pci_clk), .reset(rst_tap), .clear_l(s_ov[1]),
    .event0(events[10]), .enable_l(1'b0), .latch_l(cnt_latch_l[10]), .count(counters[10])
  );

  // ------------------------------------------------------------------
  // debug frame latches
  // ------------------------------------------------------------------
  framelatch u_fl_rx (
    .clk(sw_clk), .reset(rst_sw), .data(fr_data), .valid(fr_valid),
    .pci_clk, .pci_addr(fl_addr), .pci_data(fl_rx_data), .pci_length(len_rx)
  );
  framelatch u_fl_tx (
    .clk(sw_clk), .reset(rst_sw), .data(dp_data), .valid(dp_valid),
    .pci_clk, .pci_addr(fl_addr), .pci_data(fl_tx_data), .pci_length(len_tx)
  );
  framelatch u_fl_fc (
    .clk(sw_clk), .reset(rst_sw), .data(sw_rx_data_q), .valid(sw_rx_valid_q),
    .pci_clk, .pci_addr(fl_addr), .pci_data(fl_fc_data), .pci_length(len_fc)
  );

  // ------------------------------------------------------------------
  // initialization latency: cycles from the init-request frame leaving
  // the delay pipe to the first frame received from a sensor
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {L_ARM, L_WAIT_TX, L_RUN, L_HOLD} lat_e;
  lat_e lst;
  logic dp_valid_d;
  always_ff @(posedge sw_clk or posedge rst_sw) begin
    if (rst_sw) begin
      lst <= L_ARM; init_latency <= '0; dp_valid_d <= 1'b0;
    end else begin
      dp_valid_d <= dp_valid;
      case (lst)
        L_ARM:     if (init_reset) lst <= L_WAIT_TX;
        L_WAIT_TX: if (!init_reset && dp_valid && !dp_valid_d) begin
          init_latency <= '0; lst <= L_RUN;
        end
        L_RUN: begin
          init_latency <= init_latency + 1'b1;
          if (sw_rx_valid_q || init_done) lst <= L_HOLD;
        end
        L_HOLD: if (init_reset) lst <= L_WAIT_TX;
        default: lst <= L_ARM;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // LEDs
  // ------------------------------------------------------------------
  logic fa_tx, fa_rx, fa_pci;
  frameack #(.CNT_W(ACK_CNT_W)) u_fa_tx (.clk(sw_clk), .reset(rst_sw), .valid(sw_tx_valid), .led(fa_tx));
  frameack #(.CNT_W(ACK_CNT_W)) u_fa_rx (.clk(sw_clk), .reset(rst_sw), .valid(sw_rx_valid_q), .led(fa_rx));
  frameack #(.CNT_W(ACK_CNT_W)) u_fa_pci (.clk(pci_clk), .reset(~rst_pci_l), .valid(~pci_frame_l), .led(fa_pci));

  always_ff @(posedge sw_clk or posedge rst_sw) begin
    if (rst_sw) led <= '0;
    else begin
      led[0] <= init_done ? fa_tx : 1'b0;
      led[1] <= (init_start || init_done) ? fa_rx : 1'b0;
      led[2] <= init_reset ? 1'b0 : fa_pci;
    end
  end
endmodule
