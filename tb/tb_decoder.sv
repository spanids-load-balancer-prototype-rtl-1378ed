// Testbench for decoder: random frames in the internal word format
// (preamble, MAC addresses, optional VLAN tag or 802.3 length with
// LLC/SNAP, then IPv4 with 0..3 option words, non-IP types, bad IP
// versions and frames truncated before the ports). For each frame the
// expected outcome (header pulse with its value, ignore pulse, or nothing)
// is compared with what the decoder produced while the frame was sent.
module tb_decoder;
  logic clk = 0, reset = 1;
  logic [15:0] data_i = 0;
  logic valid_i = 0, be_i = 1;
  logic [95:0] packet_header;
  logic packet_valid, packet_ignore;
  int checks = 0, failures = 0;
  decoder dut (.*);
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

  int nvalid, nignore;
  logic [95:0] got;
  always @(posedge clk) if (!reset) begin
    if (packet_valid) begin nvalid++; got = packet_header; end
    if (packet_ignore) nignore++;
  end

  int kinds[6];
  initial begin
    logic [15:0] w[$];
    logic [95:0] exp_hdr;
    int kind, encap, ihl, n, cut;
    logic expv, expi;
    repeat (3) @(negedge clk); reset = 0;
    for (int f = 0; f < 3000; f++) begin
      w.delete();
      exp_hdr = {$urandom, $urandom, $urandom};
      kind = $urandom % 6;   // 0..2 good IP, 3 non-IP, 4 bad version, 5 truncated
      encap = $urandom % 3;  // plain, VLAN, LLC/SNAP
      ihl = 5 + $urandom % 4;
      repeat (3) w.push_back(16'h5555); w.push_back(16'h55D5);
      repeat (6) w.push_back(16'($urandom));
      if (encap == 1) begin w.push_back(16'h8100); w.push_back(16'($urandom)); end
      if (encap == 2) begin w.push_back(16'd100 + 16'($urandom % 1000)); repeat (3) w.push_back(16'hAAAA); end
      w.push_back(kind == 3 ? 16'h86DD : 16'h0800);
      w.push_back({(kind == 4) ? 4'd6 : 4'd4, 4'(ihl), 8'h00});
      repeat (5) w.push_back(16'($urandom));
      w.push_back(exp_hdr[95:80]); w.push_back(exp_hdr[79:64]);
      w.push_back(exp_hdr[63:48]); w.push_back(exp_hdr[47:32]);
      repeat (2 * (ihl - 5)) w.push_back(16'($urandom));
      w.push_back(exp_hdr[31:16]); w.push_back(exp_hdr[15:0]);
      n = $urandom % 20; repeat (n) w.push_back(16'($urandom));
      if (kind == 5) begin
        cut = 12 + $urandom % (w.size() - 12 - n - 1);
        while (w.size() > cut) void'(w.pop_back());
      end
      expv = (kind <= 2);
      expi = (kind == 3 || kind == 4);
      nvalid = 0; nignore = 0;
      foreach (w[i]) begin
        @(negedge clk);
        data_i = w[i]; valid_i = (i != w.size() - 1); be_i = 1'b1;
      end
      @(negedge clk); valid_i = 0; data_i = 16'($urandom);
      repeat ($urandom % 4 + 1) @(negedge clk);
      check(nvalid == (expv ? 1 : 0), $sformatf("frame %0d kind %0d header pulses %0d", f, kind, nvalid));
      check(nignore == (expi ? 1 : 0), $sformatf("frame %0d kind %0d ignore pulses %0d", f, kind, nignore));
      if (expv && nvalid == 1) check(got == exp_hdr, $sformatf("frame %0d header %h != %h", f, got, exp_hdr));
      kinds[kind]++;
    end
    foreach (kinds[k]) check(kinds[k] > 100, "all frame kinds sent");
    finish();
  end
endmodule
