// Testbench for delaypipe with a 6-bit initialization counter: the
// init-request frame leaves first and traffic is blocked until init_done;
// then routed frames leave DELAY+1 cycles after entry with destination
// MAC replaced by the loaded address and source MAC by the load
// balancer's, frames without an address are dropped, no_routing passes
// frames unchanged and no_frames blocks everything.
module tb_delaypipe;
  localparam int D = 49;
  logic clk = 0, pci_clk = 0, reset = 1;
  logic [15:0] data_i = 0, data_o;
  logic valid_i = 0, be_i = 0, valid_o, be_o;
  logic [47:0] mac_addr = 0;
  logic mac_load = 0, no_routing = 0, no_frames = 0, init_cntl_l = 1;
  logic init_reset, init_start, init_done;
  logic [4:0] pci_addr = 0;
  logic [31:0] pci_data = 0;
  logic pci_wr_l = 1;
  int checks = 0, failures = 0;
  delaypipe #(.DELAY(D), .CNT_W(6)) dut (.*);
  always #8 clk = ~clk;
  always #15 pci_clk = ~pci_clk;
  initial begin #20_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // output frames
  logic [15:0] out_q[$][$];
  int out_start[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    logic [15:0] f[$];
    forever begin
      @(posedge clk);
      if (!reset && valid_o) begin
        f = {}; out_start.push_back(cyc);
        while (valid_o) begin f.push_back(data_o); @(posedge clk); end
        f.push_back(data_o);
        out_q.push_back(f);
      end
    end
  end

  logic [15:0] sent[$];
  int in_start;
  task automatic send(input int words, input logic load, input logic [47:0] mac);
    @(negedge clk);
    sent = {}; in_start = cyc;
    for (int i = 0; i < words; i++) begin
      data_i = (i < 3) ? 16'h5555 : (i == 3) ? 16'h55D5 : 16'($urandom);
      sent.push_back(data_i);
      valid_i = (i < words - 1); be_i = 1;
      if (load && i == 20) begin mac_addr = mac; mac_load = 1; end
      else mac_load = 0;
      @(negedge clk);
    end
    valid_i = 0; be_i = 0; mac_load = 0;
    repeat (D + 20) @(negedge clk);
  endtask

  initial begin
    logic [47:0] m;
    logic [15:0] f[$];
    repeat (3) @(negedge clk); reset = 0;
    // traffic before init_done is not forwarded
    send(40, 1, 48'h1);
    wait (init_done);
    repeat (10) @(negedge clk);
    check(out_q.size() == 1, $sformatf("only the init request before init_done (%0d)", out_q.size()));
    if (out_q.size() > 0) begin
      f = out_q.pop_front(); void'(out_start.pop_front());
      check(f.size() == 34 && f[4] == 16'hFFFF && f[25] == 16'h0000, "init request frame");
    end
    out_q = {}; out_start = {};
    for (int k = 0; k < 30; k++) begin
      int mode;
      mode = $urandom % 5;            // 0..2 routed, 3 no address, 4 no_routing
      no_routing = (mode == 4);
      m = {$urandom, 16'($urandom)};
      send(30 + $urandom % 200, mode != 3, m);
      if (mode == 3) check(out_q.size() == 0, "dropped without address");
      else begin
        check(out_q.size() == 1, "one frame out");
        if (out_q.size() == 1) begin
          int bad;
          bad = 0;
          f = out_q.pop_front();
          check(out_start.pop_front() - in_start == D + 1, "latency");
          check(f.size() == sent.size(), "length");
          for (int i = 0; i < f.size() && i < sent.size(); i++) begin
            logic [15:0] e;
            e = sent[i];
            if (mode != 4) begin
              if (i == 4) e = m[47:32]; if (i == 5) e = m[31:16]; if (i == 6) e = m[15:0];
              if (i == 7) e = 16'h0253; if (i == 8) e = 16'h504E; if (i == 9) e = 16'h4401;
            end
            if (f[i] != e) bad++;
          end
          check(bad == 0, $sformatf("contents (mode %0d, %0d bad)", mode, bad));
        end
      end
      out_q = {}; out_start = {};
    end
    no_routing = 0; no_frames = 1;
    send(60, 1, 48'h1234);
    check(out_q.size() == 0, "no_frames blocks output");
    finish();
  end
endmodule
