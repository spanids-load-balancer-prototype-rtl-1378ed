// Testbench for framelatch: random internal-format frames; after each one
// the latched length (words including preamble, times two) and every
// 32-bit word read back on the PCI clock must match the frame.
module tb_framelatch;
  logic clk = 0, pci_clk = 0, reset = 1, valid = 0;
  logic [15:0] data = 0;
  logic [11:0] pci_addr = 0;
  logic [31:0] pci_data, pci_length;
  int checks = 0, failures = 0;
  framelatch dut (.*);
  always #8 clk = ~clk;
  always #15 pci_clk = ~pci_clk;
  initial begin #100_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [15:0] w[$];
  task automatic send(input int words);
    w = {};
    @(negedge clk);
    for (int i = 0; i < words; i++) begin
      data = (i < 3) ? 16'h5555 : (i == 3) ? 16'h55D5 : 16'($urandom);
      w.push_back(data);
      valid = (i < words - 1);
      @(negedge clk);
    end
    valid = 0; data = 16'($urandom);
    repeat (8) @(negedge clk);
  endtask

  task automatic readback();
    int bad = 0;
    check(pci_length == 32'(2 * w.size()), $sformatf("length %0d for %0d words", pci_length, w.size()));
    for (int r = 0; r < (w.size() + 1) / 2; r++) begin
      @(negedge pci_clk); pci_addr = 12'(r);
      @(negedge pci_clk);
      if (pci_data[31:16] != w[2 * r]) bad++;
      if (2 * r + 1 < w.size() && pci_data[15:0] != w[2 * r + 1]) bad++;
    end
    check(bad == 0, $sformatf("%0d words differ", bad));
  endtask

  initial begin
    repeat (3) @(negedge clk); reset = 0; @(negedge clk);
    send(34); readback();
    send(761); readback();
    for (int i = 0; i < 20; i++) begin send(20 + $urandom % 800); readback(); end
    send(4500); readback();
    finish();
  end
endmodule
