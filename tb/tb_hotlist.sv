// Testbench for hotlist: bursts of updates for a few sensors and a small
// set of buckets (so that buckets repeat) against a reference model that
// keeps each sensor's list sorted by falling intensity, unique per
// bucket and level, at most 16 long (a new value goes behind entries of
// equal intensity). After each burst the lists are read back entry by
// entry. clear_one and clear are exercised as well.
module tb_hotlist;
  logic clk = 0, reset = 1;
  logic clear = 0, clear_one = 0, update = 0, lock = 0;
  logic [5:0] clear_idx = 0, sensor_up = 0, sensor_rd = 0;
  logic [1:0] level_up = 0, level_rd;
  logic [11:0] bucket_up = 0, bucket_rd;
  logic [23:0] data_up = 0, data_rd;
  logic [3:0] idx_rd = 0;
  logic busy, valid_rd;
  int checks = 0, failures = 0;
  hotlist dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  typedef struct { logic [1:0] lvl; logic [11:0] bkt; int d; } ent_t;
  ent_t lists [64][$];

  function automatic void model_update(int s, logic [1:0] l, logic [11:0] b, int d);
    int at;
    foreach (lists[s][i])
      if (lists[s][i].lvl == l && lists[s][i].bkt == b) begin
        if (lists[s][i].d >= d) return;
        lists[s].delete(i);
        break;
      end
    at = lists[s].size();
    for (int i = lists[s].size() - 1; i >= 0; i--) if (lists[s][i].d < d) at = i;
    lists[s].insert(at, '{l, b, d});
    if (lists[s].size() > 16) void'(lists[s].pop_back());
  endfunction

  task automatic verify(int s);
    sensor_rd = 6'(s);
    for (int i = 0; i < 16; i++) begin
      idx_rd = 4'(i);
      @(negedge clk);
      if (i < lists[s].size())
        check(valid_rd && level_rd == lists[s][i].lvl && bucket_rd == lists[s][i].bkt && data_rd == 24'(lists[s][i].d),
              $sformatf("sensor %0d entry %0d: %b %0d/%0d/%0d expected %0d/%0d/%0d", s, i, valid_rd, level_rd, bucket_rd, data_rd,
                        lists[s][i].lvl, lists[s][i].bkt, lists[s][i].d));
      else check(!valid_rd, $sformatf("sensor %0d entry %0d should be empty", s, i));
    end
  endtask

  int nshift = 0;
  initial begin
    repeat (3) @(negedge clk); reset = 0;
    repeat (1100) @(negedge clk);
    for (int r = 0; r < 150; r++) begin
      repeat (1 + $urandom % 10) begin
        @(negedge clk);
        update = 1;
        sensor_up = 6'($urandom % 4); level_up = 2'($urandom);
        bucket_up = 12'($urandom % 12); data_up = 24'($urandom % 64);
        model_update(sensor_up, level_up, bucket_up, data_up);
      end
      @(negedge clk); update = 0;
      repeat (400) @(negedge clk);
      check(!busy, "idle after burst");
      for (int s = 0; s < 4; s++) verify(s);
      if (lists[0].size() == 16) nshift++;
      if (r % 25 == 24) begin
        @(negedge clk); clear_one = 1; clear_idx = 6'($urandom % 4); lists[clear_idx].delete();
        @(negedge clk); clear_one = 0;
        repeat (40) @(negedge clk);
        for (int s = 0; s < 4; s++) verify(s);
      end
      if (r == 100) begin
        @(negedge clk); clear = 1; foreach (lists[s]) lists[s].delete();
        @(negedge clk); clear = 0;
        repeat (1100) @(negedge clk);
        for (int s = 0; s < 4; s++) verify(s);
      end
    end
    // lock holds pending work back
    @(negedge clk); lock = 1; update = 1; sensor_up = 5; level_up = 0; bucket_up = 7; data_up = 99;
    model_update(5, 0, 7, 99);
    @(negedge clk); update = 0;
    repeat (100) @(negedge clk);
    check(!busy, "lock keeps controller idle");
    lock = 0;
    repeat (100) @(negedge clk);
    verify(5);
    check(nshift > 10, "full lists reached");
    finish();
  end
endmodule
