// Testbench for frameack with a 8-bit stretch counter: a single frame
// turns the LED on for 3/4 of the period and off for the rest, frames
// during the period are ignored, and a steady stream makes the LED blink.
module tb_frameack;
  localparam int CW = 8;
  logic clk = 0, reset = 1, valid = 0, led;
  int checks = 0, failures = 0;
  frameack #(.CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int on_cycles, off_cycles, blinks;
  initial begin
    repeat (3) @(negedge clk); reset = 0;
    repeat (5) @(negedge clk);
    check(led == 1'b1, "off when idle");
    valid = 1; repeat (3) @(negedge clk); valid = 0;
    on_cycles = 0;
    for (int i = 0; i < 2**CW + 20; i++) begin
      @(negedge clk);
      if (led == 1'b0) on_cycles++;
      if (i == 10) begin valid = 1; @(negedge clk); valid = 0; end // ignored
    end
    checks++;
    if (on_cycles < (3 * 2**CW / 4) - 4 || on_cycles > (3 * 2**CW / 4) + 4) begin
      failures++; $display("FAIL on time %0d", on_cycles);
    end
    check(led == 1'b1, "off after period");
    // steady traffic: the LED must turn on and off repeatedly
    blinks = 0; off_cycles = 0;
    for (int i = 0; i < 6 * 2**CW; i++) begin
      logic prev;
      prev = led;
      valid = ($urandom % 4) != 0;
      @(negedge clk);
      if (prev == 1'b1 && led == 1'b0) blinks++;
      if (led) off_cycles++;
    end
    valid = 0;
    check(blinks >= 5, "blinks under load");
    check(off_cycles >= 4 * 2**CW / 4, "off periods under load");
    finish();
  end
endmodule
