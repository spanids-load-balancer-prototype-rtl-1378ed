// Testbench for transmit: random even and odd frames in the internal
// format; the output must carry the preamble, the data and the Ethernet
// CRC-32 (computed here bit by bit) in the external format, with valid
// high for the whole frame and be low in the last cycle of odd totals.
module tb_transmit;
  logic clk = 0, reset = 1;
  logic [15:0] data_i = 0, data_o;
  logic valid_i = 0, be_i = 0, valid_o, be_o;
  int checks = 0, failures = 0;
  transmit dut (.*);
  always #5 clk = ~clk;
  initial begin #80_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [31:0] crc_bits(input byte unsigned b[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
    end
    return ~c;
  endfunction

  byte unsigned exp_q[$][$];
  int frames_seen = 0;

  // collect output frames
  initial begin
    byte unsigned got[$], e[$];
    logic [31:0] fcs;
    forever begin
      @(posedge clk);
      if (!reset && valid_o) begin
        got = {};
        got.push_back(data_o[15:8]); got.push_back(data_o[7:0]);
        while (1) begin
          @(posedge clk);
          if (!valid_o) break;
          got.push_back(data_o[15:8]);
          if (be_o) got.push_back(data_o[7:0]);
        end
        e = exp_q.pop_front();
        fcs = crc_bits(e);
        e.push_back(fcs[7:0]); e.push_back(fcs[15:8]); e.push_back(fcs[23:16]); e.push_back(fcs[31:24]);
        check(got.size() == e.size() + 8, $sformatf("length %0d vs %0d", got.size(), e.size() + 8));
        check(got[0] == 8'h55 && got[6] == 8'h55 && got[7] == 8'hD5, "preamble");
        for (int i = 0; i < e.size() && i + 8 < got.size(); i++)
          if (got[i + 8] != e[i]) begin
            check(0, $sformatf("byte %0d: %h vs %h (n=%0d)", i, got[i + 8], e[i], e.size() - 4));
            break;
          end
        frames_seen++;
      end
    end
  end

  task automatic send(input int n);
    byte unsigned b[$];
    int words;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    exp_q.push_back(b);
    words = (n + 1) / 2;
    for (int i = 0; i < 4 + words; i++) begin
      if (i < 3) data_i = 16'h5555;
      else if (i == 3) data_i = 16'h55D5;
      else data_i = {b[2 * (i - 4)], (2 * (i - 4) + 1 < n) ? b[2 * (i - 4) + 1] : 8'($urandom)};
      valid_i = (i < 3 + words);
      be_i    = (i < 3 + words) || (n % 2 == 0);
      @(negedge clk);
    end
    valid_i = 0; be_i = 0; data_i = 16'($urandom);
    repeat (6 + $urandom % 4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); reset = 0; @(negedge clk);
    send(60); send(61); send(1514); send(1); send(2);
    for (int i = 0; i < 150; i++) send(20 + $urandom % 1500);
    repeat (20) @(negedge clk);
    check(frames_seen == 155, "all frames out");
    finish();
  end
endmodule
