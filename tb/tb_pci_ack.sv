// Testbench for pci_ack: random read and write strobes of random length;
// each must get exactly one acknowledgement of the right kind, three
// cycles after the strobe, and none while the strobes are idle.
module tb_pci_ack;
  logic clk = 0, reset_l = 0, rd_l = 1, wr_l = 1, rd_ack_l, wr_ack_l;
  int checks = 0, failures = 0;
  pci_ack dut (.*);
  always #15 clk = ~clk;
  initial begin #10_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk); reset_l = 1;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      logic is_rd;
      int acks, at, wrong;
      acks = 0; at = -1; wrong = 0;
      is_rd = $urandom % 2;
      if (is_rd) rd_l = 0; else wr_l = 0;
      for (int c = 1; c <= 12; c++) begin
        @(negedge clk);
        if (!(is_rd ? rd_ack_l : wr_ack_l)) begin acks++; at = c; end
        if (!(is_rd ? wr_ack_l : rd_ack_l)) wrong++;
        if (acks == 1 && c == at + ($urandom % 3)) break;  // release soon after
      end
      rd_l = 1; wr_l = 1;
      check(acks == 1 && wrong == 0, $sformatf("one ack (%0d, wrong %0d)", acks, wrong));
      check(at == 3, $sformatf("ack after 3 cycles (%0d)", at));
      for (int c = 0; c < 1 + $urandom % 4; c++) begin
        @(negedge clk);
        check(rd_ack_l && wr_ack_l, "idle between transactions");
      end
    end
    finish();
  end
endmodule
