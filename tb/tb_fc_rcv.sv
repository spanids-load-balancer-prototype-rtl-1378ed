// Testbench for fc_rcv: builds init-reply and flow-control frames in the
// external PHY format with the start delimiter in either byte lane, plus
// corrupted frames (wrong destination, port, protocol or opcode) and
// replies outside the accept window. Checks the sensor count, the table
// lookup port, the performance monitor writes of each reply and the
// order of sensor indices delivered by flow-control frames.
module tb_fc_rcv;
  import spanids_pkg::*;
  logic clk = 0, reset = 1;
  logic [15:0] data_f = 0;
  logic valid_f = 0, accept_reply = 0, fc_ack = 0;
  logic [6:0] sensor_count;
  logic [5:0] fc_idx, lu_idx = 0;
  logic fc_valid, lu_valid, perfmon_load;
  logic [47:0] lu_mac;
  logic [1:0] perfmon_cmd;
  logic [9:0] perfmon_addr;
  logic [15:0] perfmon_data;
  int checks = 0, failures = 0;
  fc_rcv dut (.*);
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

  logic [25:0] expw[$];
  always @(posedge clk) if (!reset && perfmon_load) begin
    logic [25:0] e;
    check(perfmon_cmd == PM_WRITE, "WRITE command");
    if (expw.size() == 0) check(0, "unexpected monitor write");
    else begin
      e = expw.pop_front();
      check({perfmon_addr, perfmon_data} == e, $sformatf("monitor write %h/%h expected %h/%h", perfmon_addr, perfmon_data, e[25:16], e[15:0]));
    end
  end

  // corrupt: 0 none, 1 dst MAC, 2 port, 3 protocol, 4 type
  task automatic send(input logic [15:0] op, input logic [47:0] mac, input logic [31:0] ip, input int corrupt);
    logic [7:0] b[$];
    logic [15:0] hw[$];
    int npre;
    hw = '{corrupt == 1 ? 16'h1234 : LB_MAC[47:32], LB_MAC[31:16], LB_MAC[15:0],
           mac[47:32], mac[31:16], mac[15:0], corrupt == 4 ? 16'h86DD : ETH_IP,
           16'h4500, 16'd32, 16'($urandom), 16'h0000, {8'd64, corrupt == 3 ? 8'h06 : 8'h11}, 16'($urandom),
           ip[31:16], ip[15:0], LB_IP[31:16], LB_IP[15:0],
           UDP_PORT, corrupt == 2 ? 16'h0050 : UDP_PORT, 16'd20, 16'h0000,
           op, mac[47:32], mac[31:16], mac[15:0], ip[31:16], ip[15:0]};
    npre = 6 + $urandom % 2;
    repeat (npre) b.push_back(8'h55);
    b.push_back(8'hD5);
    foreach (hw[i]) begin b.push_back(hw[i][15:8]); b.push_back(hw[i][7:0]); end
    repeat ($urandom % 6) b.push_back(8'($urandom));    // padding
    repeat (4) b.push_back(8'($urandom));               // CRC
    if (b.size() % 2) b.push_back(8'h00);
    for (int i = 0; i < b.size(); i += 2) begin
      @(negedge clk); valid_f = 1; data_f = {b[i], b[i+1]};
    end
    @(negedge clk); valid_f = 0; data_f = 16'($urandom);
    repeat (8 + $urandom % 4) @(negedge clk);
  endtask

  logic [47:0] macs [64];
  logic [31:0] ips [64];
  int fc_exp[$];
  initial begin
    repeat (3) @(negedge clk); reset = 0;
    // replies before the window opens are ignored
    send(OP_REPLY, 48'h0A0000000001, 32'h0A000001, 0);
    check(sensor_count == 0, "reply outside window ignored");
    accept_reply = 1;
    for (int s = 0; s < 40; s++) begin
      macs[s] = {16'h0A00, 32'($urandom)}; ips[s] = $urandom;
      if ($urandom % 4 == 0) send(OP_REPLY, 48'hBAD, 32'h0, 1 + $urandom % 4);
      if ($urandom % 3 == 0) send(OP_FC, 48'h0B0000000000, 0, 0);   // unknown sender
      check(!fc_valid, "unknown sender gives no index");
      for (int k = 0; k < 3; k++) expw.push_back({6'(s), 4'(1 + k), macs[s][47 - 16*k -: 16]});
      for (int k = 0; k < 2; k++) expw.push_back({6'(s), 4'(4 + k), ips[s][31 - 16*k -: 16]});
      send(OP_REPLY, macs[s], ips[s], 0);
      check(sensor_count == 7'(s + 1), $sformatf("sensor count %0d after reply %0d", sensor_count, s));
      check(expw.size() == 0, "monitor writes of reply done");
    end
    accept_reply = 0;
    send(OP_REPLY, 48'h0C0000000000, 0, 0);
    check(sensor_count == 40, "reply after window ignored");
    for (int s = 0; s < 64; s++) begin
      @(negedge clk); lu_idx = 6'(s);
      @(negedge clk);
      check(lu_valid == (s < 40), "lookup valid");
      if (s < 40) check(lu_mac == macs[s], $sformatf("lookup mac %0d", s));
    end
    // flow control frames
    for (int n = 0; n < 300; n++) begin
      int s;
      s = $urandom % 40;
      if ($urandom % 5 == 0) send(OP_FC, macs[s], 0, 1 + $urandom % 4);
      else if ($urandom % 6 == 0) send(OP_FC, 48'h0D0000000000 + 48'(n), 0, 0);
      else begin send(OP_FC, macs[s], 0, 0); fc_exp.push_back(s); end
      while (fc_valid && ($urandom % 3 != 0 || fc_exp.size() > 10)) begin
        if (fc_exp.size() == 0) begin check(0, "unexpected fc index"); break; end
        check(fc_idx == 6'(fc_exp.pop_front()), "fc index order");
        fc_ack = 1; @(negedge clk); fc_ack = 0; @(negedge clk);
      end
    end
    while (fc_valid && fc_exp.size() > 0) begin
      check(fc_idx == 6'(fc_exp.pop_front()), "fc index order");
      fc_ack = 1; @(negedge clk); fc_ack = 0; @(negedge clk);
    end
    check(!fc_valid && fc_exp.size() == 0, "all fc indices delivered");
    finish();
  end
endmodule
