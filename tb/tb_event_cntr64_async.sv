// Testbench for event_cntr64_async: events counted on the fast clock are
// latched into the slow output clock. Latched values must equal the
// reference count taken at a quiet moment, must stay stable while events
// continue until the next latch, and clear_l must restart the count and
// zero the latched value.
module tb_event_cntr64_async;
  logic clk = 0, clk_out = 0, reset = 1, clear_l = 1, event0 = 0, enable_l = 0, latch_l = 1;
  logic [63:0] count;
  int checks = 0, failures = 0;
  event_cntr64_async dut (.*);
  always #8 clk = ~clk;
  always #15 clk_out = ~clk_out;
  initial begin #100_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s count=%0d model=%0d @%0t", what, count, model, $time); end
  endtask

  longint model = 0;
  logic armed = 1;
  always @(posedge clk) if (!reset) begin
    if (!clear_l) model <= 0;
    else if (event0 && armed && !enable_l) model <= model + 1;
    armed <= !event0;
  end

  task automatic do_latch();
    repeat (4) @(negedge clk_out);
    latch_l = 0; @(negedge clk_out); latch_l = 1;
  endtask

  initial begin
    longint held;
    repeat (3) @(negedge clk); reset = 0; @(negedge clk);
    for (int r = 0; r < 20; r++) begin
      int n;
      n = $urandom % 3000;
      for (int i = 0; i < n; i++) begin
        event0 = $urandom % 2; enable_l = ($urandom % 10) == 0;
        @(negedge clk);
      end
      event0 = 0; enable_l = 0;
      do_latch();
      check(count == 64'(model), "latched value");
      held = count;
      for (int i = 0; i < 50; i++) begin event0 = ~event0; @(negedge clk); end
      event0 = 0;
      repeat (5) @(negedge clk_out);
      check(count == 64'(held), "stable until next latch");
      if (r % 5 == 4) begin
        @(negedge clk); clear_l = 0; @(negedge clk); clear_l = 1;
        repeat (5) @(negedge clk_out);
        check(count == 0, "clear also zeroes the latched value");
        do_latch();
        check(count == 0, "cleared");
      end
    end
    finish();
  end
endmodule
