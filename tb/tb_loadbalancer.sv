// Testbench for loadbalancer: three sensors sign on through data_f
// (external format) during the initialization window, then IPv4 and
// non-IP frames in the internal format are applied to data_i. Checks the
// sensor count, that each IPv4 frame yields one mac_load with a signed-on
// sensor's MAC, that the same flow keeps its sensor, that non-IP frames
// pulse packet_ignore and get no address, that no_routing suppresses
// lookups, and that the performance stream carries the sign-on records,
// one ADD64 per routed frame with the frame's byte length, and one ADD32
// per flow-control frame; a flow-control frame under the move heuristic
// moves buckets.
module tb_loadbalancer;
  import spanids_pkg::*;
  logic clk = 0, pci_clk = 0, reset = 1;
  logic [15:0] data_i = 0, data_f = 0;
  logic valid_i = 0, be_i = 1, valid_f = 0, be_f = 1;
  logic init_start = 0, init_done = 0, no_routing = 0, pulse = 0, perfmon_full = 0;
  logic [47:0] mac_addr;
  logic mac_load, packet_ignore, perfmon_load;
  logic [6:0] sensor_count;
  logic [7:0] threshold = 8;
  logic [3:0] bucket_count = 4;
  logic [4:0] random_val = 3;
  logic [2:0] lb_mode = MODE_STATIC;
  logic [1:0] perfmon_cmd;
  logic [9:0] perfmon_addr;
  logic [15:0] perfmon_data;
  logic [11:0] last_hash0, last_hash1, last_hash2, last_hash3, pci_addr = 0;
  logic move, promote, demote, route_l0, route_l1, route_l2, route_l3, route_l4;
  logic [31:0] pci_data_table0, pci_data_table1, pci_data_table2, pci_data_table3;
  logic [31:0] mult0_op0, mult0_op1, mult1_op0, mult1_op1;
  logic [63:0] mult0_res, mult1_res;
  int checks = 0, failures = 0;
  loadbalancer dut (.*);
  always #5 clk = ~clk;
  always #7 pci_clk = ~pci_clk;
  initial begin #20_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [47:0] smac [3];
  int n_load = 0, n_ign = 0, n_move = 0, n_add64 = 0, n_add32 = 0, n_wr = 0;
  logic [47:0] last_mac;
  int add64_len [$];
  always @(posedge clk) if (!reset) begin
    if (mac_load) begin n_load++; last_mac = mac_addr; end
    if (packet_ignore) n_ign++;
    if (move) n_move++;
    if (perfmon_load) case (perfmon_cmd)
      PM_ADD64: begin
        n_add64++; add64_len.push_back(perfmon_data);
        check(perfmon_addr[3:0] == PM_HW_BYTES, "ADD64 at the byte count");
      end
      PM_ADD32: begin n_add32++; check(perfmon_addr[3:0] == PM_HW_FC && perfmon_data == 1, "ADD32 of one at the FC count"); end
      PM_WRITE: n_wr++;
      default: ;
    endcase
  end

  task automatic sensor_frame(input logic [15:0] op, input int s);
    logic [15:0] hw[$];
    hw = '{16'h5555, 16'h5555, 16'h5555, 16'h55D5,
           LB_MAC[47:32], LB_MAC[31:16], LB_MAC[15:0], smac[s][47:32], smac[s][31:16], smac[s][15:0],
           ETH_IP, 16'h4500, 16'd32, 16'h0, 16'h0, 16'h4011, 16'h0, 16'hC0A8, 16'(s),
           LB_IP[31:16], LB_IP[15:0], UDP_PORT, UDP_PORT, 16'd20, 16'h0,
           op, smac[s][47:32], smac[s][31:16], smac[s][15:0], 16'hC0A8, 16'(s), 16'h1111, 16'h2222};
    foreach (hw[i]) begin @(negedge clk); valid_f = 1; data_f = hw[i]; end
    @(negedge clk); valid_f = 0;
    repeat (20) @(negedge clk);
  endtask

  // internal-format frame; returns its length in bytes (after the preamble)
  task automatic frame(input int flow, input logic ip, output int len);
    logic [15:0] w[$];
    int pay;
    w = '{16'h5555, 16'h5555, 16'h5555, 16'h55D5, 16'h0E00, 16'h0000, 16'h0001, 16'h0E00, 16'h0000, 16'h0002};
    if (ip) begin
      w.push_back(16'h0800); w.push_back(16'h4500); repeat (4) w.push_back(16'h0);
      w.push_back(16'h4011); w.push_back(16'h0);
      w.push_back(16'h0A00); w.push_back(16'(flow)); w.push_back(16'h0B00); w.push_back(16'(flow * 3));
      w.push_back(16'(2000 + flow)); w.push_back(16'd80);
    end else w.push_back(16'h0806);
    pay = 10 + $urandom % 30;
    repeat (pay) w.push_back(16'($urandom));
    len = 2 * (w.size() - 4);
    foreach (w[i]) begin
      @(negedge clk); valid_i = (i != w.size() - 1); data_i = w[i]; be_i = 1;
    end
    @(negedge clk); valid_i = 0;
    repeat (16) @(negedge clk);
  endtask

  initial begin
    int len, l0, sent_len [$];
    logic [47:0] flow_mac [8];
    for (int s = 0; s < 3; s++) smac[s] = 48'h0200_0000_0A00 + 48'(s);
    foreach (flow_mac[i]) flow_mac[i] = 0;
    repeat (3) @(negedge clk); reset = 0;
    repeat (1200) @(negedge clk);
    for (int s = 0; s < 3; s++) sensor_frame(OP_REPLY, s);
    check(sensor_count == 3, $sformatf("three sensors signed on (%0d)", sensor_count));
    check(n_wr >= 15, "sign-on records written");
    init_start = 1;
    repeat (3000) @(negedge clk);
    init_done = 1;
    repeat (100) @(negedge clk);
    // traffic
    for (int n = 0; n < 200; n++) begin
      int f;
      logic ip;
      f = $urandom % 8; ip = ($urandom % 6 != 0);
      l0 = n_load;
      frame(f, ip, len);
      if (ip) begin
        sent_len.push_back(len);
        check(n_load == l0 + 1, "one address per IPv4 frame");
        check(last_mac == smac[0] || last_mac == smac[1] || last_mac == smac[2], "address is a sensor's MAC");
        if (n > 0 && flow_mac[f] != 0) check(last_mac == flow_mac[f], "flow keeps its sensor");
        flow_mac[f] = last_mac;
      end else check(n_load == l0, "no address for a non-IP frame");
    end
    repeat (50) @(negedge clk);
    check(n_ign == 200 - sent_len.size(), "non-IP frames ignored");
    check(n_add64 == sent_len.size(), $sformatf("one ADD64 per routed frame (%0d/%0d)", n_add64, sent_len.size()));
    foreach (sent_len[i]) if (i < add64_len.size())
      check(add64_len[i] == 16'(sent_len[i]), $sformatf("frame length %0d vs %0d", add64_len[i], sent_len[i]));
    // no_routing
    no_routing = 1;
    l0 = n_load;
    for (int n = 0; n < 10; n++) frame(n, 1, len);
    check(n_load == l0, "no lookups while no_routing");
    no_routing = 0;
    // flow control under the move heuristic
    lb_mode = MODE_MOVE;
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < 6; n++) frame(n, 1, len);
      sensor_frame(OP_FC, s);
      repeat (800) @(negedge clk);
    end
    check(n_add32 == 3, $sformatf("flow control counted (%0d)", n_add32));
    check(n_move > 0, $sformatf("buckets moved (%0d)", n_move));
    finish();
  end
endmodule
