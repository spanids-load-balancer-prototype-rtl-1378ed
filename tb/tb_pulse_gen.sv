// Testbench for pulse_gen with a 7-cycle base unit: pulse spacing is
// period*7 cycles, period 0 behaves as 1, and a new period takes effect
// only after the current one ends.
module tb_pulse_gen;
  localparam int U = 7;
  logic clk = 0, reset = 1, pulse;
  logic [5:0] period = 4;
  int checks = 0, failures = 0;
  pulse_gen #(.UNIT_CYCLES(U)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  int last = -1, cyc = 0, expect_gap = 4 * U, npulse = 0;
  logic [5:0] next_period = 4, p1 = 4;
  always @(posedge clk) if (!reset) begin
    cyc <= cyc + 1;
    p1 <= period;
    if (pulse) begin
      npulse++;
      if (last >= 0) begin
        checks++;
        if (cyc - last != expect_gap) begin
          failures++; $display("FAIL gap %0d expected %0d", cyc - last, expect_gap);
        end
      end
      last = cyc;
      expect_gap = (p1 == 0 ? 1 : p1) * U;
    end
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    for (int k = 0; k < 12; k++) begin
      repeat (200 + $urandom % 200) @(negedge clk);
      period = (k == 5) ? 6'd0 : 6'(1 + $urandom % 9);
      next_period = period;
    end
    repeat (400) @(negedge clk);
    checks++;
    if (npulse < 40) begin failures++; $display("FAIL only %0d pulses", npulse); end
    finish();
  end
endmodule
