// Testbench for hashers: random headers and masks against a reference of
// the four hash functions (chunk XOR folds, 6-bit rotation, IP/port
// cross sums), one cycle of latency, masking, and a spread check: over
// many random flows every index of a 256-entry range must be hit.
module tb_hashers;
  logic clk = 0;
  logic [95:0] header = 0;
  logic [11:0] mask = 12'hFFF, idx0, idx1, idx2, idx3;
  int checks = 0, failures = 0;
  hashers dut (.*);
  always #5 clk = ~clk;
  initial begin #5_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [11:0] fold(input logic [95:0] h);
    logic [11:0] r = 0;
    for (int i = 0; i < 8; i++) r ^= h[12*i +: 12];
    return r;
  endfunction
  function automatic logic [11:0] ref_h(input int k, input logic [95:0] h);
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    logic [11:0] r;
    {sip, dip, sp, dp} = h;
    case (k)
      0: return fold(h);
      1: return fold({h[5:0], h[95:6]});
      2: begin
        r = 12'(sp + dp);
        for (int i = 0; i < 6; i++) r ^= 12'({8'h0, sip, dip} >> (12 * i));
        return r;
      end
      default: begin
        r = 12'(sip + dip);
        for (int i = 0; i < 3; i++) r ^= 12'({4'h0, sp, dp} >> (12 * i));
        return r;
      end
    endcase
  endfunction

  initial begin
    logic [11:0] masks[6] = '{12'hFFF, 12'h7FF, 12'h3FF, 12'h1FF, 12'h0FF, 12'h000};
    logic [255:0] hit [4];
    for (int i = 0; i < 3000; i++) begin
      logic [95:0] h;
      logic [11:0] m;
      @(negedge clk);
      h = {$urandom, $urandom, $urandom}; m = masks[$urandom % 6];
      header = h; mask = m;
      @(negedge clk);
      header = {$urandom, $urandom, $urandom};     // must not matter any more
      check(idx0 == (ref_h(0, h) & m), "idx0");
      check(idx1 == (ref_h(1, h) & m), "idx1");
      check(idx2 == (ref_h(2, h) & m), "idx2");
      check(idx3 == (ref_h(3, h) & m), "idx3");
    end
    // spread: flows from one subnet to one server, random ports
    for (int k = 0; k < 4; k++) hit[k] = '0;
    mask = 12'h0FF;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      header = {32'hC0A8_0000 | 32'($urandom % 256), 32'h0A00_0001, 16'($urandom), 16'd80};
      @(negedge clk);
      hit[0][idx0[7:0]] = 1; hit[1][idx1[7:0]] = 1; hit[2][idx2[7:0]] = 1; hit[3][idx3[7:0]] = 1;
    end
    for (int k = 0; k < 4; k++) check(&hit[k], $sformatf("hash %0d reaches every bucket", k));
    finish();
  end
endmodule
