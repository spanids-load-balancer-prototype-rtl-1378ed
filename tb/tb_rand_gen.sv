// Testbench for rand_gen: values stay inside the bounds (once the rotation
// that was running when the bounds changed has ended), every value of the
// range appears, and lo > hi pins the value to lo.
module tb_rand_gen;
  logic clk = 0, reset = 1;
  logic [4:0] lo = 3, hi = 12, value;
  int checks = 0, failures = 0;
  rand_gen dut (.*);
  always #5 clk = ~clk;
  initial begin #5_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s value=%0d lo=%0d hi=%0d", what, value, lo, hi); end
  endtask

  initial begin
    logic [31:0] seen;
    repeat (3) @(negedge clk); reset = 0;
    for (int r = 0; r < 8; r++) begin
      lo = 5'($urandom % 16); hi = 5'(lo + $urandom % 16);
      repeat (40) @(negedge clk);             // old rotation finishes
      seen = 0;
      for (int i = 0; i < 600; i++) begin
        @(negedge clk);
        check(value >= lo && value <= hi, "in range");
        seen[value] = 1'b1;
      end
      for (int v = lo; v <= hi; v++) check(seen[v], "value visited");
    end
    lo = 20; hi = 10; repeat (40) @(negedge clk);
    for (int i = 0; i < 50; i++) begin @(negedge clk); check(value == 20, "lo > hi"); end
    finish();
  end
endmodule
