// Testbench for event_cntr: random event, enable and clear sequences
// against a reference model (rising edges counted once, clear wins), a
// run near the 8-bit and 32-bit stage boundaries, and the carry output.
module tb_event_cntr;
  logic clk = 0, reset = 1, clear = 0, ev = 0, enable = 1;
  logic [31:0] count;
  logic carry;
  int checks = 0, failures = 0;
  logic [31:0] model = 0;
  logic armed_m = 1;
  int carries = 0;

  event_cntr dut (.*);
  always #5 clk = ~clk;
  initial begin #2_000_000; $display("watchdog expired"); failures++; finish(); end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t count=%h model=%h", what, $time, count, model); end
  endtask

  always @(posedge clk) if (!reset) begin
    if (carry) carries++;
    if (clear) model <= 0;
    else if (ev && armed_m && enable) model <= model + 1;
    armed_m <= !ev;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    check(count == 0, "after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ev = ($urandom % 3) == 0;
      enable = ($urandom % 8) != 0;
      clear = ($urandom % 500) == 0;
      #1 check(count == model, "random");
    end
    // long pulses count once
    clear = 1; ev = 0; @(negedge clk); clear = 0; enable = 1; @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      ev = 1; repeat (1 + $urandom % 6) @(negedge clk);
      ev = 0; repeat (1 + $urandom % 3) @(negedge clk);
    end
    check(count == 20, "20 long pulses");
    // 300 events cross the first stage boundary
    for (int i = 0; i < 300; i++) begin ev = 1; @(negedge clk); ev = 0; @(negedge clk); end
    check(count == 320, "stage carry 8 bits");
    check(carries == 0, "no wrap yet");
    #1 finish();
  end
endmodule
