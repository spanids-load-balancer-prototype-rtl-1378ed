// Testbench for hash_table with five sensors (bucket mask 0x1FF).
// Checks: the initial assignment of all four tables (read through the PCI
// port) and the bucket count dump to the performance monitor; routing of
// random lookups against a model (sensor, level, count increments); a
// flow-control request under the move heuristic (the sensor's hot buckets
// go to another sensor, bucket counts are reported); a request under the
// promote heuristic (hot buckets route through level 1 afterwards);
// periodic scans halve the counts and demote expired promoted buckets.
module tb_hash_table;
  import spanids_pkg::*;
  logic clk = 0, pci_clk = 0, reset = 1;
  logic init_start = 0, init_done = 0, pulse = 0, lookup = 0, fc_val = 0, perfmon_busy = 0;
  logic [6:0] sensor_count = 5;
  logic [7:0] threshold = 8;
  logic [3:0] buckets = 4;
  logic [4:0] random_val = 1;
  logic [2:0] lb_mode = MODE_STATIC;
  logic move_bkt, promote_bkt, demote_bkt, route_l0, route_l1, route_l2, route_l3, route_l4;
  logic [11:0] hash0 = 0, hash1 = 0, hash2 = 0, hash3 = 0, bkt_mask = 12'h1FF, pci_addr = 0;
  logic [5:0] sensor_idx, fc_idx = 0;
  logic load_idx, fc_ack, perfmon_load;
  logic [1:0] perfmon_cmd;
  logic [9:0] perfmon_addr;
  logic [15:0] perfmon_data;
  logic [31:0] pci_data0, pci_data1, pci_data2, pci_data3, mult0_op0, mult0_op1, mult1_op0, mult1_op1;
  logic [63:0] mult0_res, mult1_res;
  int checks = 0, failures = 0;
  hash_table dut (.*);
  always #5 clk = ~clk;
  always #7 pci_clk = ~pci_clk;
  initial begin #20_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int n_move = 0, n_prom = 0, n_dem = 0;
  int n_lvl [5];
  logic [15:0] bcount [64];
  int n_bc_writes = 0;
  always @(posedge clk) if (!reset) begin
    if (move_bkt) n_move++;
    if (promote_bkt) n_prom++;
    if (demote_bkt) n_dem++;
    if (route_l0) n_lvl[0]++;
    if (route_l1) n_lvl[1]++;
    if (route_l2) n_lvl[2]++;
    if (route_l3) n_lvl[3]++;
    if (route_l4) n_lvl[4]++;
    if (perfmon_load && perfmon_addr[3:0] == PM_HW_BUCKETS) begin
      check(perfmon_cmd == PM_WRITE, "bucket count is a WRITE");
      bcount[perfmon_addr[9:4]] = perfmon_data; n_bc_writes++;
    end
  end

  task automatic pci_read(input int t, input int a, output logic [31:0] d);
    logic [31:0] r[4];
    @(negedge pci_clk); pci_addr = 12'(a);
    @(negedge pci_clk);
    r = '{pci_data0, pci_data1, pci_data2, pci_data3};
    d = r[t];
  endtask

  // one lookup; returns the sensor and the level used
  task automatic route(input logic [11:0] h0, input logic [11:0] h1, output int s, output int lvl);
    int l0[5], k;
    l0 = n_lvl;
    @(negedge clk);
    hash0 = h0; hash1 = h1; hash2 = h1 ^ 12'h0A5; hash3 = h1 ^ 12'h15A; lookup = 1;
    @(negedge clk); lookup = 0;
    k = 0;
    while (!load_idx && k < 40) begin @(posedge clk); k++; end
    s = sensor_idx;
    repeat (20) @(negedge clk);
    lvl = -1;
    for (int l = 0; l < 5; l++) if (n_lvl[l] != l0[l]) lvl = l;
    check(k < 40, "lookup answered");
  endtask

  task automatic feedback(input int s);
    @(negedge clk); fc_idx = 6'(s); fc_val = 1;
    while (!fc_ack) @(negedge clk);
    fc_val = 0;
    repeat (600) @(negedge clk);
  endtask

  task automatic scan();
    @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;
    repeat (4 * 512 * 4 + 500) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    int s, lvl, cnt [512];
    repeat (3) @(negedge clk); reset = 0;
    repeat (1100) @(negedge clk);
    init_start = 1;
    repeat (3000) @(negedge clk);
    init_done = 1;
    repeat (10) @(negedge clk);
    // ---- initial assignment
    for (int i = 0; i < 512; i += 7)
      for (int t = 0; t < 4; t++) begin
        pci_read(t, i, d);
        check(d == {1'b0, 24'd0, 1'b0, 6'(i % 5)}, $sformatf("table %0d bucket %0d after init: %h", t, i, d));
      end
    check(n_bc_writes == 64, $sformatf("bucket count dump (%0d writes)", n_bc_writes));
    for (int k = 0; k < 5; k++) check(bcount[k] == (k < 2 ? 103 : 102), $sformatf("sensor %0d bucket count %0d", k, bcount[k]));
    // ---- routing at level 0
    foreach (cnt[i]) cnt[i] = 0;
    for (int n = 0; n < 300; n++) begin
      int h;
      h = $urandom % 512;
      route(12'(h), 12'($urandom % 512), s, lvl);
      cnt[h]++;
      check(s == h % 5 && lvl == 0, $sformatf("bucket %0d routed to %0d level %0d", h, s, lvl));
    end
    for (int i = 0; i < 512; i += 3) begin
      pci_read(0, i, d);
      check(d[30:7] == 24'(cnt[i]), $sformatf("bucket %0d count %0d vs %0d", i, d[30:7], cnt[i]));
    end
    // ---- move: three hot buckets of sensor 2 leave it
    lb_mode = MODE_MOVE;
    scan();          // clears the hot list
    for (int r = 0; r < 5; r++) for (int k = 0; k < 3; k++) route(12'(100 + 5 * k + 2), 12'(7), s, lvl);
    feedback(2);
    check(n_move == 3, $sformatf("three buckets moved (%0d)", n_move));
    check(bcount[2] == 99, $sformatf("sensor 2 bucket count after move %0d", bcount[2]));
    for (int k = 0; k < 3; k++) begin
      route(12'(100 + 5 * k + 2), 12'(7), s, lvl);
      check(s != 2 && s < 5 && lvl == 0, $sformatf("moved bucket now to sensor %0d", s));
    end
    // ---- promote: two hot buckets of sensor 4 go to level 1
    lb_mode = MODE_PROMOTE;
    scan();
    for (int r = 0; r < 5; r++) for (int k = 0; k < 2; k++) route(12'(300 + 5 * k + 4), 12'(40 + k), s, lvl);
    feedback(4);
    check(n_prom == 2, $sformatf("two buckets promoted (%0d)", n_prom));
    for (int k = 0; k < 2; k++) begin
      route(12'(300 + 5 * k + 4), 12'(40 + k), s, lvl);
      check(lvl == 1 && s == (40 + k) % 5, $sformatf("promoted bucket routes at level %0d to %0d", lvl, s));
    end
    // ---- scans: counts halve, expired promotions are demoted
    pci_read(1, 40, d); cnt[0] = d[30:7];
    scan();
    pci_read(1, 40, d);
    check(d[30:7] == 24'(cnt[0] / 2), $sformatf("count halved by scan: %0d -> %0d", cnt[0], d[30:7]));
    scan();
    scan();
    check(n_dem == 2, $sformatf("promoted buckets demoted (%0d)", n_dem));
    route(12'(304), 12'(40), s, lvl);
    check(lvl == 0, "demoted bucket routes at level 0 again");
    finish();
  end
endmodule
