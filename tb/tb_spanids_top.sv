// End-to-end testbench for spanids_top with shortened timing (CNT_W 12:
// 4096-cycle initialization periods, UNIT_CYCLES 4000, ACK_CNT_W 6).
//
// A PCI master configures the card and uses the register map; a tap
// source sends IPv4 flows and non-IP frames in the PHY format; five sensor
// models answer the initialization request on the switch receive port
// and send flow control frames. The transmit port is decoded frame by
// frame (preamble, checksum, addresses). The run walks through:
// initialization and sign-on, routing with the move heuristic, routing
// with the promote heuristic until buckets are promoted up to the
// round-robin level and later demoted by the periodic scan, no_routing
// (frames pass unchanged), no_frames (output blocked), overload of the
// synchronization FIFO (overrun), and performance monitor snapshot and
// clear with record checks. Every mechanism is counted; one that never
// happened is a failure. Counters read over PCI are compared with the
// events observed inside the design.
module tb_spanids_top;
  import spanids_pkg::*;
  logic tap_clk = 0, sw_clk = 0, pci_clk = 0, pci_rst_l = 0;
  logic [15:0] tap_rx_data = 0, sw_rx_data = 0;
  logic tap_rx_valid = 0, tap_rx_be = 1, sw_rx_valid = 0, sw_rx_be = 1;
  logic [15:0] sw_tx_data;
  logic sw_tx_valid, sw_tx_be, sw_tx_err;
  logic [31:0] pci_ad_i = 0, pci_ad_o;
  logic [3:0] pci_c_be_l = 4'hF;
  logic pci_par_i = 0, pci_frame_l = 1, pci_irdy_l = 1, pci_idsel = 0;
  logic pci_ad_oe, pci_par_o, pci_par_oe, pci_perr_oe, pci_serr_oe;
  logic pci_trdy_l, pci_stop_l, pci_devsel_l, pci_s_oe;
  logic [2:0] led;
  int checks = 0, failures = 0;

  spanids_top #(.CNT_W(12), .UNIT_CYCLES(4000), .ACK_CNT_W(6)) dut (.*);

  int tap_half = 5;
  always #5 sw_clk = ~sw_clk;
  initial begin #2; forever #(tap_half) tap_clk = ~tap_clk; end
  always #15 pci_clk = ~pci_clk;
  initial begin #40_000_000; $display("watchdog expired"); failures++; finish(); end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- mechanisms
  typedef enum int {M_INIT, M_SIGNON, M_ROUTE0, M_ROUTE1, M_ROUTE2, M_ROUTE3, M_ROUTE4,
                    M_MOVE, M_PROMOTE, M_DEMOTE, M_NONIP_DROP, M_FC, M_SCAN, M_OVERRUN,
                    M_NO_ROUTING, M_NO_FRAMES, M_SNAPSHOT, M_CLEAR, M_PCI_READ, M_PCI_WRITE,
                    M_LED, M_NUM} mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"init", "sign-on", "route level 0", "route level 1", "route level 2",
                           "route level 3", "route level 4", "move", "promote", "demote",
                           "non-IP drop", "flow control", "periodic scan", "overrun",
                           "no_routing pass", "no_frames block", "snapshot", "clear",
                           "PCI read", "PCI write", "LED activity"};

  task automatic finish();
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-16s %0d", mname[m], mech[m]);
      check(mech[m] > 0, {"mechanism happened: ", mname[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // internal events, counted where they happen
  int ev_move = 0, ev_prom = 0, ev_dem = 0, ev_ign = 0, ev_ovr = 0, ev_frames_in = 0;
  int ev_lvl [5];
  logic fr_valid_d = 0;
  always @(posedge sw_clk) if (pci_rst_l && !dut.lb_reset) begin
    if (dut.move) ev_move++;
    if (dut.promote) ev_prom++;
    if (dut.demote) ev_dem++;
    if (dut.packet_ignore) ev_ign++;
    if (dut.route_l0) ev_lvl[0]++;
    if (dut.route_l1) ev_lvl[1]++;
    if (dut.route_l2) ev_lvl[2]++;
    if (dut.route_l3) ev_lvl[3]++;
    if (dut.route_l4) ev_lvl[4]++;
    if (dut.u_lb.u_ht.hl_clear) mech[M_SCAN]++;
  end
  always @(posedge sw_clk) if (pci_rst_l && !dut.rst_sw) begin
    if (dut.fr_valid && !fr_valid_d) ev_frames_in++;
    fr_valid_d <= dut.fr_valid;
  end
  always @(posedge tap_clk) if (pci_rst_l && !dut.rst_tap && dut.overrun) ev_ovr++;
  logic [2:0] led_d = '0;
  always @(posedge sw_clk) if (pci_rst_l && !dut.rst_sw) begin
    if (dut.init_done && led != led_d) mech[M_LED]++;
    led_d <= led;
  end

  // ---------------------------------------------------------------- PCI master
  task automatic xact(input logic [3:0] cmd, input logic [31:0] addr, input logic cfg,
                      inout logic [31:0] data, output logic claimed);
    int n = 0;
    logic is_rd;
    is_rd = !cmd[0];
    @(negedge pci_clk);
    pci_frame_l = 0; pci_ad_i = addr; pci_c_be_l = cmd; pci_idsel = cfg;
    @(negedge pci_clk);
    pci_frame_l = 1; pci_irdy_l = 0; pci_c_be_l = 4'h0; pci_idsel = 0;
    pci_ad_i = is_rd ? 32'h0 : data;
    claimed = 0;
    while (1) begin
      @(posedge pci_clk);
      if (!pci_devsel_l) claimed = 1;
      if (!pci_trdy_l) break;
      if (++n > 40) break;
      #1 pci_par_i = ^{pci_ad_i, pci_c_be_l};
    end
    if (!pci_trdy_l && is_rd) data = pci_ad_o;
    @(negedge pci_clk);
    pci_par_i = ^{pci_ad_i, pci_c_be_l};
    pci_irdy_l = 1; pci_c_be_l = 4'hF;
    repeat (2) @(negedge pci_clk);
    if (is_rd) mech[M_PCI_READ]++; else mech[M_PCI_WRITE]++;
  endtask
  localparam logic [31:0] BAR0 = 32'h8000_0000, BAR1 = 32'h8010_0000;
  task automatic reg_wr(input logic [19:0] off, input logic [31:0] d, input logic region = 0);
    logic cl;
    xact(4'h7, (region ? BAR1 : BAR0) | off, 0, d, cl);
    check(cl, $sformatf("write %h claimed", off));
  endtask
  task automatic reg_rd(input logic [19:0] off, output logic [31:0] d, input logic region = 0);
    logic cl;
    d = 0;
    xact(4'h6, (region ? BAR1 : BAR0) | off, 0, d, cl);
    check(cl, $sformatf("read %h claimed", off));
  endtask
  task automatic read_counter(input int slot_off, output longint v);
    logic [31:0] hi, lo;
    reg_wr(20'(slot_off), 0);          // latch
    repeat (4) @(negedge pci_clk);
    reg_rd(20'(slot_off), hi);
    reg_rd(20'(slot_off + 4), lo);
    v = {hi, lo};
  endtask

  // ---------------------------------------------------------------- tap source
  int tap_sent_ip = 0, tap_sent_nonip = 0;
  task automatic tap_frame(input logic [31:0] sip, input logic [31:0] dip, input logic [15:0] sp,
                           input logic [15:0] dp, input logic ip, input int paylen, input int gap = 14);
    logic [7:0] b[$];
    b = '{8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5,
          8'h0E, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h0E, 8'h00, 8'h00, 8'h00, 8'h00, 8'h02};
    if (ip) begin
      b.push_back(8'h08); b.push_back(8'h00);
      b.push_back(8'h45); b.push_back(8'h00);
      b.push_back(8'((28 + paylen) >> 8)); b.push_back(8'(28 + paylen));
      repeat (4) b.push_back(8'h00);
      b.push_back(8'd64); b.push_back(8'h11); b.push_back(8'h00); b.push_back(8'h00);
      for (int i = 3; i >= 0; i--) b.push_back(sip[8*i +: 8]);
      for (int i = 3; i >= 0; i--) b.push_back(dip[8*i +: 8]);
      b.push_back(sp[15:8]); b.push_back(sp[7:0]); b.push_back(dp[15:8]); b.push_back(dp[7:0]);
      b.push_back(8'((8 + paylen) >> 8)); b.push_back(8'(8 + paylen)); b.push_back(0); b.push_back(0);
    end else begin
      b.push_back(8'h86); b.push_back(8'hDD);
      repeat (40) b.push_back(8'($urandom));
    end
    repeat (paylen) b.push_back(8'($urandom));
    repeat (4) b.push_back(8'($urandom));      // checksum (not checked by the card)
    for (int i = 0; i < b.size(); i += 2) begin
      @(negedge tap_clk);
      tap_rx_valid = 1;
      tap_rx_data = {b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00};
      tap_rx_be = (i + 1 < b.size());
    end
    @(negedge tap_clk); tap_rx_valid = 0; tap_rx_be = 1;
    repeat (gap) @(negedge tap_clk);
    if (ip) tap_sent_ip++; else tap_sent_nonip++;
  endtask

  // a few flows; flow f always has the same addresses and ports
  task automatic flow_frame(input int f, input int gap = 14);
    tap_frame(32'h0A01_0000 + 32'(f * 7), 32'h0A02_0000 + 32'(f * 13), 16'(1000 + f), 16'(80 + f % 3), 1,
              18 + $urandom % 40, gap);
  endtask

  // ---------------------------------------------------------------- sensors
  logic [47:0] smac [5];
  logic [31:0] sip4 [5];
  task automatic sensor_frame(input logic [15:0] op, input int s);
    logic [7:0] b[$];
    logic [15:0] hw[$];
    hw = '{LB_MAC[47:32], LB_MAC[31:16], LB_MAC[15:0], smac[s][47:32], smac[s][31:16], smac[s][15:0],
           ETH_IP, 16'h4500, 16'd32, 16'h0, 16'h0, 16'h4011, 16'h0,
           sip4[s][31:16], sip4[s][15:0], LB_IP[31:16], LB_IP[15:0],
           UDP_PORT, UDP_PORT, 16'd20, 16'h0,
           op, smac[s][47:32], smac[s][31:16], smac[s][15:0], sip4[s][31:16], sip4[s][15:0]};
    repeat (7) b.push_back(8'h55);
    b.push_back(8'hD5);
    foreach (hw[i]) begin b.push_back(hw[i][15:8]); b.push_back(hw[i][7:0]); end
    repeat (4) b.push_back(8'($urandom));
    for (int i = 0; i < b.size(); i += 2) begin
      @(negedge sw_clk); sw_rx_valid = 1; sw_rx_data = {b[i], b[i+1]};
    end
    @(negedge sw_clk); sw_rx_valid = 0;
    repeat (16) @(negedge sw_clk);
  endtask

  // ---------------------------------------------------------------- transmit monitor
  function automatic logic [31:0] crc_bits(input byte unsigned b[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
    end
    return ~c;
  endfunction
  int tx_init = 0, tx_routed = 0, tx_plain = 0, tx_other = 0, last_sensor = 0;
  int tx_per_sensor [5];
  initial begin
    byte unsigned got[$], body[$];
    logic [31:0] fcs;
    logic [47:0] dst, src;
    forever begin
      @(posedge sw_clk);
      if (pci_rst_l && sw_tx_valid) begin
        got = {};
        got.push_back(sw_tx_data[15:8]); got.push_back(sw_tx_data[7:0]);
        while (1) begin
          @(posedge sw_clk);
          if (!sw_tx_valid) break;
          got.push_back(sw_tx_data[15:8]);
          if (sw_tx_be) got.push_back(sw_tx_data[7:0]);
        end
        check(got.size() >= 8 + 64 && got[0] == 8'h55 && got[6] == 8'h55 && got[7] == 8'hD5,
              $sformatf("preamble and minimum size (%0d bytes)", got.size()));
        body = got[8:got.size() - 5];
        fcs = crc_bits(body);
        check({got[got.size()-1], got[got.size()-2], got[got.size()-3], got[got.size()-4]} == fcs, "frame checksum");
        for (int i = 0; i < 6; i++) begin dst[47 - 8*i -: 8] = got[8 + i]; src[47 - 8*i -: 8] = got[14 + i]; end
        if (dst == 48'hFFFF_FFFF_FFFF) tx_init++;
        else if (dst == 48'h0E00_0000_0001) tx_plain++;
        else begin
          int hit;
          hit = -1;
          for (int s = 0; s < 5; s++) if (dst == smac[s]) hit = s;
          if (hit >= 0) begin
            tx_routed++; tx_per_sensor[hit]++; last_sensor = hit;
            check(src == LB_MAC, "routed frame carries the load balancer's source address");
          end else begin
            tx_other++;
            check(0, $sformatf("frame to unknown destination %h", dst));
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- scenario
  initial begin
    logic [31:0] d;
    logic cl;
    longint v;
    int ip0, r0, lv0[5];
    for (int s = 0; s < 5; s++) begin
      smac[s] = 48'h0200_5E00_0010 + 48'(s); sip4[s] = 32'hC0A8_0110 + 32'(s);
    end
    repeat (10) @(negedge pci_clk); pci_rst_l = 1;
    repeat (10) @(negedge pci_clk);
    d = 32'h8000_0000; xact(4'hB, 32'h10, 1, d, cl);
    d = 32'h8010_0000; xact(4'hB, 32'h14, 1, d, cl);
    d = 32'h0000_0146; xact(4'hB, 32'h04, 1, d, cl);
    xact(4'hA, 32'h00, 1, d, cl);
    check(cl && d == 32'h5350_10EE, "configuration ID");
    reg_rd(20'h00, d); check(d == 32'hDEAD_BEEF, "magic register");
    reg_wr(20'h2C, 32'h0000_0201);     // random timeouts 1..2 units
    reg_rd(20'h2C, d); check(d[12:8] == 2 && d[4:0] == 1, "random bounds read back");

    // ---- initialization: answer the request, wait for init_done
    fork
      begin
        wait (tx_init == 1);
        repeat (200) @(negedge sw_clk);
        for (int s = 0; s < 5; s++) sensor_frame(OP_REPLY, s);
      end
      begin
        do begin repeat (200) @(negedge pci_clk); reg_rd(20'h04, d); end while (!d[0]);
      end
    join
    mech[M_INIT]++;
    reg_rd(20'h20, d); check(d == 5, $sformatf("sensor count %0d", d));
    mech[M_SIGNON] = int'(d);
    reg_rd(20'h24, d); check(d > 0, "initialization latency measured");
    check(tx_init == 1, "one initialization request sent");
    for (int s = 0; s < 5; s++) begin          // sign-on recorded in the performance monitor
      reg_rd(20'((s * 8 + 1) * 4), d, 1);
      check(d == smac[s][31:0], $sformatf("sensor %0d MAC in record: %h", s, d));
      reg_rd(20'((s * 8 + 2) * 4), d, 1);
      check(d == sip4[s], $sformatf("sensor %0d IP in record", s));
    end
    repeat (200) @(negedge sw_clk);

    // ---- routing with the move heuristic
    reg_wr(20'h38, 32'(MODE_MOVE));
    repeat (20) @(negedge pci_clk);
    ip0 = tap_sent_ip; r0 = tx_routed;
    for (int n = 0; n < 400; n++) begin
      if (n % 10 == 7) tap_frame(0, 0, 0, 0, 0, 20);
      else flow_frame($urandom % 16);
      if (n % 40 == 39) begin sensor_frame(OP_FC, last_sensor); mech[M_FC]++; end
    end
    repeat (400) @(negedge sw_clk);
    check(tx_routed - r0 == tap_sent_ip - ip0, $sformatf("every IP frame routed (%0d of %0d)", tx_routed - r0, tap_sent_ip - ip0));
    check(tx_other == 0 && tx_plain == 0, "no stray frames");
    for (int s = 0; s < 5; s++) check(tx_per_sensor[s] > 0, $sformatf("sensor %0d received traffic", s));

    // ---- promote heuristic: hot flows climb the levels
    reg_wr(20'h38, 32'(MODE_PROMOTE));
    repeat (20) @(negedge pci_clk);
    ip0 = tap_sent_ip; r0 = tx_routed;
    for (int n = 0; n < 1500 && ev_lvl[4] < 20; n++) begin
      flow_frame($urandom % 3);
      if (n % 15 == 14) begin sensor_frame(OP_FC, last_sensor); mech[M_FC]++; end
    end
    repeat (400) @(negedge sw_clk);
    check(tx_routed - r0 == tap_sent_ip - ip0, "every IP frame routed while promoting");
    // quiet traffic until promoted buckets time out and are demoted
    for (int n = 0; n < 600 && ev_dem == 0; n++) begin
      flow_frame(20 + $urandom % 8, 60);
    end
    repeat (400) @(negedge sw_clk);

    // ---- no_routing: frames leave unchanged
    reg_wr(20'h08, 32'h1);
    repeat (20) @(negedge pci_clk);
    r0 = tx_plain;
    for (int n = 0; n < 20; n++) flow_frame(n);
    repeat (400) @(negedge sw_clk);
    mech[M_NO_ROUTING] = tx_plain - r0;
    check(tx_plain - r0 == 20, $sformatf("no_routing passes frames unchanged (%0d)", tx_plain - r0));
    // ---- no_frames: nothing leaves
    reg_wr(20'h08, 32'h2);
    repeat (20) @(negedge pci_clk);
    r0 = tx_plain + tx_routed;
    for (int n = 0; n < 20; n++) flow_frame(n);
    repeat (400) @(negedge sw_clk);
    check(tx_plain + tx_routed == r0, "no_frames blocks the output");
    if (tx_plain + tx_routed == r0) mech[M_NO_FRAMES] = 20;
    reg_wr(20'h08, 32'h0);
    repeat (20) @(negedge pci_clk);

    // ---- overload the synchronization FIFO
    tap_half = 3;
    repeat (10) @(negedge tap_clk);
    for (int n = 0; n < 150; n++) flow_frame($urandom % 16, 2);
    tap_half = 5;
    repeat (2000) @(negedge sw_clk);
    mech[M_OVERRUN] = ev_ovr;
    read_counter(32'hC0, v);
    check(v == ev_ovr, $sformatf("overflow counter %0d vs %0d", v, ev_ovr));

    // ---- counters over PCI
    repeat (1000) @(negedge sw_clk);
    read_counter(32'h10, v); check(v == ev_frames_in, $sformatf("packet counter %0d vs %0d", v, ev_frames_in));
    read_counter(32'h18, v); check(v == ev_ign, $sformatf("non-IP counter %0d vs %0d", v, ev_ign));
    read_counter(32'h40, v); check(v == ev_move, $sformatf("move counter %0d vs %0d", v, ev_move));
    read_counter(32'h48, v); check(v == ev_prom, $sformatf("promote counter %0d vs %0d", v, ev_prom));
    read_counter(32'h50, v); check(v == ev_dem, $sformatf("demote counter %0d vs %0d", v, ev_dem));
    for (int l = 0; l < 5; l++) begin
      read_counter(32'h58 + 8 * l, v); check(v == ev_lvl[l], $sformatf("level %0d counter %0d vs %0d", l, v, ev_lvl[l]));
    end
    mech[M_MOVE] = ev_move; mech[M_PROMOTE] = ev_prom; mech[M_DEMOTE] = ev_dem;
    for (int l = 0; l < 5; l++) mech[M_ROUTE0 + l] = ev_lvl[l];
    mech[M_NONIP_DROP] = (ev_ign == tap_sent_nonip) ? ev_ign : 0;
    check(ev_ign == tap_sent_nonip, "every non-IP frame recognised and dropped");

    // ---- performance records: packets per sensor, snapshot and clear
    begin
      longint pk, tot, rec[5];
      tot = 0;
      for (int s = 0; s < 5; s++) begin
        reg_rd(20'((s * 8 + 6) * 4), d, 1); pk = longint'(d) << 32;
        reg_rd(20'((s * 8 + 7) * 4), d, 1); pk |= d;
        tot += pk; rec[s] = pk;
        check(pk >= tx_per_sensor[s], $sformatf("sensor %0d packet record %0d vs %0d sent", s, pk, tx_per_sensor[s]));
      end
      // frames blocked by no_frames were routed and counted but not sent
      check(tot == tx_routed + 20, $sformatf("packet records total %0d vs %0d", tot, tx_routed + 20));
      reg_wr(20'h0C, 32'h8);            // snapshot
      do reg_rd(20'h0C, d); while (d[3]);
      mech[M_SNAPSHOT]++;
      reg_wr(20'h0C, 32'h7);            // clear all three counts
      do reg_rd(20'h0C, d); while (d[2:0] != 0);
      mech[M_CLEAR]++;
      for (int s = 0; s < 5; s++) begin
        reg_rd(20'((s * 8 + 7) * 4), d, 1);
        check(d == 0, "packet record cleared");
        reg_rd(20'(((256 + s * 4) * 2 + 7) * 4), d, 1);
        check(d == 32'(rec[s]), $sformatf("snapshot keeps sensor %0d packets", s));
        reg_rd(20'((s * 8 + 1) * 4), d, 1);
        check(d == smac[s][31:0], "clear keeps the sensor MAC");
      end
    end
    finish();
  end
endmodule
