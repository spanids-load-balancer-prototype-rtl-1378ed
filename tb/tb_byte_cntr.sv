// Testbench for byte_cntr: random even and odd frames in the internal
// format (with random gaps) and checks of the reported length at done.
module tb_byte_cntr;
  logic clk = 0, reset_l = 0, valid = 0, be = 0, done;
  logic [13:0] count;
  int checks = 0, failures = 0;
  byte_cntr dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  int expected[$];
  int ndone = 0;
  always @(posedge clk) if (reset_l && done) begin
    int e;
    ndone++;
    checks++;
    e = expected.size() ? expected.pop_front() : -1;
    if (count != 14'(e)) begin failures++; $display("FAIL length %0d expected %0d at %0t n=%0d", count, e, $time, ndone); end
  end

  task automatic send(input int n);
    int words;
    words = (n + 1) / 2;
    expected.push_back(n);
    for (int i = 0; i < 4 + words; i++) begin
      valid = (i < 3 + words);
      be    = (i < 3 + words) || (n % 2 == 0);
      @(negedge clk);
    end
    valid = 0; be = 0;
    repeat (1 + $urandom % 5) @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk); reset_l = 1; @(negedge clk);
    send(60); send(61); send(1514); send(1515); send(9000); send(3);
    for (int i = 0; i < 200; i++) begin
      n = 2 + $urandom % 1600;
      send(n);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (ndone != 206) begin failures++; $display("FAIL %0d done pulses", ndone); end
    finish();
  end
endmodule
