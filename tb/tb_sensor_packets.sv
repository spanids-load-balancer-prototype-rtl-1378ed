// Testbench for sensor_packets: bursts of random updates (back to back
// and spaced) against a reference count table. After each burst the
// scan is allowed to complete twice, then every count is read back and
// the published cold list must name four distinct sensors in rising count
// order, none busier than any sensor left out. lock_lo must freeze the
// list and clear must halve every count.
module tb_sensor_packets;
  logic clk = 0, reset = 1;
  logic [6:0] sensor_count = 12;
  logic clear = 0, update = 0, lock_lo = 0;
  logic [5:0] sensor_up = 0, sensor_rd = 0;
  logic [23:0] data_rd;
  logic [5:0] sensor_lo0, sensor_lo1, sensor_lo2, sensor_lo3;
  int checks = 0, failures = 0;
  sensor_packets dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int model [64];
  task automatic verify();
    logic [5:0] lo [4];
    repeat (3 * 64 + 10) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      sensor_rd = 6'(i);
      @(negedge clk);
      check(data_rd == 24'(model[i]), $sformatf("count %0d: %0d expected %0d", i, data_rd, model[i]));
    end
    lo = '{sensor_lo0, sensor_lo1, sensor_lo2, sensor_lo3};
    for (int k = 0; k < 4; k++) begin
      check(lo[k] < sensor_count, "cold list entry in range");
      if (k > 0) check(model[lo[k]] >= model[lo[k-1]], "cold list sorted");
      for (int j = 0; j < k; j++) check(lo[j] != lo[k], "cold list entries distinct");
    end
    for (int s = 0; s < sensor_count; s++)
      if (s != lo[0] && s != lo[1] && s != lo[2] && s != lo[3])
        check(model[s] >= model[lo[3]], $sformatf("sensor %0d colder than the cold list", s));
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (3) @(negedge clk); reset = 0;
    repeat (70) @(negedge clk);   // table is zeroed after reset
    for (int r = 0; r < 60; r++) begin
      sensor_count = 7'(4 + $urandom % 30);
      repeat (200 + $urandom % 300) begin
        @(negedge clk);
        update = ($urandom % 3 != 0);
        sensor_up = 6'($urandom % sensor_count);
        if (update) model[sensor_up]++;
      end
      @(negedge clk); update = 0;
      verify();
      if (r % 10 == 9) begin
        logic [5:0] held [4];
        lock_lo = 1;
        held = '{sensor_lo0, sensor_lo1, sensor_lo2, sensor_lo3};
        repeat (300) begin
          @(negedge clk);
          update = 1; sensor_up = 6'($urandom % sensor_count); model[sensor_up]++;
        end
        @(negedge clk); update = 0;
        repeat (200) @(negedge clk);
        check(held == '{sensor_lo0, sensor_lo1, sensor_lo2, sensor_lo3}, "lock holds the cold list");
        lock_lo = 0;
        verify();
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
        foreach (model[i]) model[i] = model[i] >> 1;   // clear halves every count
        verify();
      end
    end
    finish();
  end
endmodule
