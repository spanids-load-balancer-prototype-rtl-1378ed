// Testbench for pci_regs through its backside handshake: magic number,
// read/write of every configuration register and their reset values,
// latch and clear strobes and reads of all eleven 64-bit counters, init
// packet writes, performance monitor request/acknowledge, status
// synchronization, and the read multiplexing of frame latches, hash
// tables, multiplier values and region 1.
module tb_pci_regs;
  logic pci_clk = 0, reset_l = 0;
  logic [17:0] addr_offset = 0;
  logic addr_region = 0;
  logic [3:0] be = 4'hF;
  logic [31:0] data_wr = 0, data_rd;
  logic wr_l = 1, rd_l = 1, wr_ack_l, rd_ack_l;
  logic init_reset = 0, init_start = 1, init_done = 0, init_l;
  logic no_routing, no_frames;
  logic [2:0] pm_clear;
  logic pm_snapshot, pm_clear_ack = 0, pm_snapshot_ack = 0;
  logic [10:0][63:0] counters;
  logic [10:0] cnt_latch_l, cnt_clear_l;
  logic [6:0] sensor_count = 7'd13;
  logic [31:0] init_latency = 32'd777;
  logic [5:0] period;
  logic [4:0] rnd_lo, rnd_hi;
  logic [7:0] threshold;
  logic [3:0] bucket_count;
  logic [2:0] lb_mode;
  logic [31:0] len_rx = 32'd100, len_tx = 32'd200, len_fc = 32'd300;
  logic [3:0][11:0] last_hash = {12'hD33, 12'hC22, 12'hB11, 12'hA00};
  logic [31:0] mult0_op0 = 1, mult0_op1 = 2, mult1_op0 = 3, mult1_op1 = 4;
  logic [63:0] mult0_res = 64'h1111_2222_3333_4444, mult1_res = 64'h5555_6666_7777_8888;
  logic [4:0] init_addr;
  logic [31:0] init_data;
  logic init_wr_l;
  logic [11:0] fl_addr, ht_addr;
  logic [31:0] fl_rx_data, fl_tx_data, fl_fc_data, pm_data;
  logic [3:0][31:0] ht_data;
  logic [17:0] pm_addr;
  int checks = 0, failures = 0;

  pci_regs dut (.*);
  always #15 pci_clk = ~pci_clk;
  initial begin #20_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // memories behind the multiplexer answer with a function of the address
  always_ff @(posedge pci_clk) begin
    fl_rx_data <= {20'h1, fl_addr};
    fl_tx_data <= {20'h2, fl_addr};
    fl_fc_data <= {20'h3, fl_addr};
    for (int t = 0; t < 4; t++) ht_data[t] <= {4'(t), 16'h0, ht_addr};
    pm_data <= {14'h3, pm_addr};
  end
  for (genvar i = 0; i < 11; i++) begin : g_c
    assign counters[i] = {32'(i) + 32'h100, 32'(i) * 7};
  end

  int latch_seen[11], clear_seen[11], init_wr_seen;
  always @(posedge pci_clk) if (reset_l) begin
    for (int i = 0; i < 11; i++) begin
      if (!cnt_latch_l[i]) latch_seen[i]++;
      if (!cnt_clear_l[i]) clear_seen[i]++;
    end
    if (!init_wr_l) begin
      init_wr_seen++;
      check(init_addr == 5'd7 && init_data == 32'hCAFE_F00D, "init packet write");
    end
  end

  task automatic wr(input logic [31:0] byte_addr, input logic [31:0] d, input logic region = 0);
    @(negedge pci_clk);
    addr_offset = byte_addr[19:2]; addr_region = region; data_wr = d; be = 4'hF; wr_l = 0;
    while (wr_ack_l) @(negedge pci_clk);
    @(negedge pci_clk);
    wr_l = 1;
    @(negedge pci_clk);
  endtask
  task automatic rd(input logic [31:0] byte_addr, output logic [31:0] d, input logic region = 0);
    @(negedge pci_clk);
    addr_offset = byte_addr[19:2]; addr_region = region; rd_l = 0;
    while (rd_ack_l) @(negedge pci_clk);
    d = data_rd; rd_l = 1;
    @(negedge pci_clk);
  endtask

  initial begin
    logic [31:0] d;
    int il;
    repeat (3) @(negedge pci_clk); reset_l = 1;
    rd(32'h00, d); check(d == 32'hDEAD_BEEF, "magic");
    rd(32'h28, d); check(d == 4, "period resets to 4");
    rd(32'h08, d); check(d == 0, "mode resets to 0");
    rd(32'h04, d); check(d == 3'b110, $sformatf("init status %b", d));
    wr(32'h08, 3); check(no_routing && no_frames, "mode bits");
    rd(32'h08, d); check(d == 3, "mode read");
    wr(32'h08, 0);
    wr(32'h28, 9); check(period == 9, "period");
    wr(32'h2C, 32'h0000_1503); check(rnd_lo == 3 && rnd_hi == 21, "random bounds");
    rd(32'h2C, d); check(d == 32'h1503, "random read");
    wr(32'h30, 8'd6); check(threshold == 6, "threshold");
    wr(32'h34, 7); check(bucket_count == 7, "bucket count");
    wr(32'h38, 2); check(lb_mode == 2, "heuristic");
    rd(32'h20, d); check(d == 13, "sensor count");
    rd(32'h24, d); check(d == 777, "init latency");
    // init restart pulse
    il = 0;
    fork
      begin repeat (10) begin @(posedge pci_clk); if (!init_l) il++; end end
      wr(32'h04, 0);
    join
    check(il == 1, "init_l pulse");
    // counters
    begin
      int offs[11] = '{32'h10, 32'h18, 32'h40, 32'h48, 32'h50, 32'h58, 32'h60, 32'h68, 32'h70, 32'h78, 32'hC0};
      for (int i = 0; i < 11; i++) begin
        wr(offs[i], 0);
        wr(offs[i] + 4, 0);
        rd(offs[i], d);     check(d == 32'(i) + 32'h100, "counter upper");
        rd(offs[i] + 4, d); check(d == 32'(i) * 7, "counter lower");
      end
      for (int i = 0; i < 11; i++) check(latch_seen[i] == 1 && clear_seen[i] == 1, $sformatf("counter %0d strobes", i));
    end
    // init packet
    wr(32'h100 + 7 * 4, 32'hCAFE_F00D);
    check(init_wr_seen == 1, "init write strobe");
    // performance monitor request held until acknowledged
    wr(32'h0C, 4'b1101);
    check(pm_snapshot && pm_clear == 3'b101, "pm requests");
    rd(32'h0C, d); check(d == 4'b1101, "pm status");
    @(negedge pci_clk); pm_snapshot_ack = 1; @(negedge pci_clk);
    check(!pm_snapshot && pm_clear == 3'b101, "snapshot request dropped on ack");
    rd(32'h0C, d); check(d == 4'b1101, "status while busy");
    pm_snapshot_ack = 0; pm_clear_ack = 1; @(negedge pci_clk); pm_clear_ack = 0;
    rd(32'h0C, d); check(d == 0, "status when done");
    // read multiplexer
    rd(32'h80, d); check(d == 100, "rx length");
    rd(32'h84, d); check(d == 200, "tx length");
    rd(32'h88, d); check(d == 300, "fc length");
    rd(32'h98, d); check(d == 12'hC22, "last hash 2");
    rd(32'hA8, d); check(d == 32'h1111_2222, "mult0 result upper");
    rd(32'hBC, d); check(d == 32'h7777_8888, "mult1 result lower");
    rd(32'hB4, d); check(d == 4, "mult1 operand 1");
    rd(32'h6000 + 4 * 5, d); check(d == {20'h1, 12'd5}, "rx frame latch");
    rd(32'hA000 + 4 * 9, d); check(d == {20'h2, 12'd9}, "tx frame latch");
    rd(32'hE000 + 4 * 1, d); check(d == {20'h3, 12'd1}, "fc frame latch");
    rd(32'h1_8000 + 4 * 33, d); check(d == {4'd2, 16'h0, 12'd33}, "hash table 2");
    rd(32'h1_C000 + 4 * 4095, d); check(d == {4'd3, 16'h0, 12'd4095}, "hash table 3");
    rd(32'h804, d, 1); check(d == {14'h3, 18'h201}, "region 1");
    finish();
  end
endmodule
