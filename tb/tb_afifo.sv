// Testbench for afifo: frames in the PHY format (checksum included) on a
// receive clock slightly slower than the core clock must leave in the
// internal format (checksum stripped, valid low in the last data word, be
// giving the parity) with unchanged contents and an inter-frame gap; then
// with a 14% faster receive clock and back-to-back short frames some frames must be
// dropped whole, each with one overrun pulse, and the rest must be intact.
module tb_afifo;
  logic clk_i = 0, clk_o = 0, reset = 1;
  logic [15:0] data_i = 0, data_o;
  logic valid_i = 0, be_i = 0, valid_o, be_o, overrun;
  int checks = 0, failures = 0;
  int half_i = 8;
  afifo dut (.*);
  always #(half_i) clk_i = ~clk_i;
  always #8 clk_o = ~clk_o;
  initial begin #200_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  byte unsigned sent[$][$];
  int nsent = 0, nrecv = 0, novr = 0, gap_min = 1000, idle = 1000;

  always @(posedge clk_i) if (!reset && overrun) novr++;

  // receiver: compare with the oldest frame not yet matched, skipping
  // frames that were dropped
  initial begin
    byte unsigned got[$], e[$];
    logic ok;
    forever begin
      @(posedge clk_o);
      if (reset) continue;
      if (!valid_o) begin idle++; continue; end
      if (idle < gap_min) gap_min = idle;
      got = {};
      while (valid_o) begin
        got.push_back(data_o[15:8]); got.push_back(data_o[7:0]);
        @(posedge clk_o);
      end
      got.push_back(data_o[15:8]);
      if (be_o) got.push_back(data_o[7:0]);
      idle = 0;
      nrecv++;
      ok = 0;
      while (sent.size() > 0 && !ok) begin
        e = sent.pop_front();
        ok = (e.size() + 8 == got.size());
        for (int i = 0; ok && i < e.size(); i++) if (got[i + 8] != e[i]) ok = 0;
      end
      check(ok, $sformatf("frame %0d (%0d bytes) matches a sent frame", nrecv, got.size() - 8));
      check(got[7] == 8'hD5 && got[0] == 8'h55, "preamble");
    end
  end

  task automatic send(input int n, input int gap);
    byte unsigned b[$];
    int total, cyc;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    sent.push_back(b);
    nsent++;
    total = n + 4;
    cyc = (total + 1) / 2;
    for (int i = 0; i < 4 + cyc; i++) begin
      if (i < 3) data_i = 16'h5555;
      else if (i == 3) data_i = 16'h55D5;
      else begin
        int k; k = 2 * (i - 4);
        data_i = {(k < n) ? b[k] : 8'($urandom), (k + 1 < n) ? b[k + 1] : 8'($urandom)};
      end
      valid_i = 1;
      be_i = !(i == 3 + cyc && total % 2 == 1);
      @(negedge clk_i);
    end
    valid_i = 0; be_i = 0; data_i = 16'($urandom);
    repeat (gap) @(negedge clk_i);
  endtask

  initial begin
    repeat (4) @(negedge clk_i); reset = 0;
    repeat (10) @(negedge clk_i);
    // slow receiver: nothing may be lost
    half_i = 8; #1 half_i = 8;
    for (int i = 0; i < 60; i++) send(60 + $urandom % 1455, 6 + $urandom % 10);
    repeat (3000) @(negedge clk_o);
    check(nrecv == 60, $sformatf("all %0d frames received (%0d)", nsent, nrecv));
    check(novr == 0, "no overrun when not overloaded");
    check(gap_min >= 5, $sformatf("inter-frame gap %0d", gap_min));
    // fast receiver, back-to-back: overruns
    half_i = 7;
    for (int i = 0; i < 400; i++) send(100 + $urandom % 100, 6);
    half_i = 8;
    repeat (20000) @(negedge clk_o);
    check(novr > 0, $sformatf("overruns seen (%0d)", novr));
    check(nrecv + novr == nsent, $sformatf("received %0d + dropped %0d = sent %0d", nrecv, novr, nsent));
    finish();
  end
endmodule
