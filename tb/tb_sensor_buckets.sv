// Testbench for sensor_buckets: random incr, move and dump commands
// against a reference table, with a randomly asserted pm_busy. Every
// performance monitor write is compared with the expected record address
// and value, and the read port is compared with the model when idle.
module tb_sensor_buckets;
  logic clk = 0, reset = 1;
  logic [5:0] incr_idx = 0, move_up_idx = 0, move_down_idx = 0, read_idx = 0;
  logic incr = 0, dump = 0, move = 0, pm_busy = 0;
  logic [11:0] read_val;
  logic busy, pm_load;
  logic [1:0] pm_cmd;
  logic [9:0] pm_addr;
  logic [15:0] pm_data;
  int checks = 0, failures = 0;
  sensor_buckets dut (.*);
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

  logic [11:0] model [64];
  logic [25:0] expw[$];          // {addr[9:0], data[15:0]}
  int nwrites = 0;
  always @(posedge clk) if (!reset && pm_load && !pm_busy) begin
    logic [25:0] e;
    nwrites++;
    check(pm_cmd == 2'b01, "command is WRITE");
    if (expw.size() == 0) check(0, "unexpected monitor write");
    else begin
      e = expw.pop_front();
      check({pm_addr, pm_data} == e, $sformatf("monitor write %h/%h expected %h/%h", pm_addr, pm_data, e[25:16], e[15:0]));
    end
  end
  always @(negedge clk) pm_busy = ($urandom % 3 == 0);

  task automatic wait_idle();
    do @(negedge clk); while (busy);
  endtask

  int nmove = 0, ndump = 0, ninc = 0;
  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (3) @(negedge clk); reset = 0;
    wait_idle();
    for (int n = 0; n < 3000; n++) begin
      int op;
      op = $urandom % 20;
      if (op < 10) begin
        incr_idx = 6'($urandom % 16); incr = 1;
        model[incr_idx] = model[incr_idx] + 1; ninc++;
        @(negedge clk); incr = 0;
      end else if (op < 19) begin
        move_down_idx = 6'($urandom % 16); move_up_idx = 6'($urandom % 16);
        if (model[move_down_idx] == 0) continue;
        model[move_down_idx] = model[move_down_idx] - 1;
        expw.push_back({move_down_idx, 4'd0, 4'd0, model[move_down_idx]});
        model[move_up_idx] = model[move_up_idx] + 1;
        expw.push_back({move_up_idx, 4'd0, 4'd0, model[move_up_idx]});
        move = 1; nmove++;
        @(negedge clk); move = 0;
      end else begin
        for (int i = 0; i < 64; i++) expw.push_back({6'(i), 4'd0, 4'd0, model[i]});
        dump = 1; ndump++;
        @(negedge clk); dump = 0;
      end
      wait_idle();
      read_idx = 6'($urandom % 16);
      @(negedge clk); @(negedge clk);
      check(read_val == model[read_idx], $sformatf("read %0d: %0d expected %0d", read_idx, read_val, model[read_idx]));
    end
    repeat (5) @(negedge clk);
    check(expw.size() == 0, "all expected writes seen");
    check(nmove > 100 && ndump > 50 && ninc > 100, "all operations exercised");
    finish();
  end
endmodule
