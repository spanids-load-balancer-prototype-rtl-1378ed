// Testbench for init_control with a 6-bit pacing counter (64-cycle
// roll-over): reset phase, hold-off, the init-request frame (preamble,
// broadcast destination, valid IP header checksum, UDP port, request
// opcode, 34 words with valid low in the last), init_start and init_done
// timing, the wait for a busy frame, a PCI rewrite of the frame table and
// a restart through init_l.
module tb_init_control;
  localparam int CW = 6;
  localparam int P = 2 ** CW;
  logic clk = 0, pci_clk = 0, reset = 1, init_l = 1, frame_busy = 0;
  logic init_reset, init_start, init_done, init_active, init_valid, init_be;
  logic [15:0] init_data;
  logic [4:0] pci_addr = 0;
  logic [31:0] pci_data = 0;
  logic pci_wr_l = 1;
  int checks = 0, failures = 0;
  init_control #(.CNT_W(CW)) dut (.*);
  always #8 clk = ~clk;
  always #15 pci_clk = ~pci_clk;
  initial begin #10_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // capture the request frame
  logic [15:0] fr[$];
  int cyc = 0, t_frame = -1, t_start = -1, t_done = -1, t_reset_end = -1, nframes = 0;
  logic capturing = 0;
  always @(posedge clk) if (!reset) begin
    cyc <= cyc + 1;
    if (init_valid && !capturing) begin capturing = 1; fr = {}; t_frame = cyc; end
    if (capturing) begin
      fr.push_back(init_data);
      if (!init_valid) begin
        capturing = 0; nframes++;
        check(init_be, "even frame");
      end
    end
    if (init_start && t_start < 0) t_start = cyc;
    if (init_done && t_done < 0) t_done = cyc;
    if (!init_reset && t_reset_end < 0) t_reset_end = cyc;
  end

  task automatic check_frame(input logic [15:0] first_word);
    logic [31:0] s = 0;
    check(fr.size() == 34, $sformatf("frame words %0d", fr.size()));
    check(fr[0] == 16'h5555 && fr[3] == 16'h55D5, "preamble");
    check(fr[4] == first_word && fr[5] == 16'hFFFF && fr[6] == 16'hFFFF, "destination");
    check(fr[10] == 16'h0800, "type IPv4");
    for (int i = 11; i <= 20; i++) s += fr[i];
    s = s[15:0] + s[31:16]; s = s[15:0] + s[31:16];
    check(s[15:0] == 16'hFFFF, "IP header checksum");
    check(fr[21] == fr[22] && fr[15][7:0] == 8'h11, "UDP ports, protocol");
    check(fr[25] == 16'h0000, "request opcode");
  endtask

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    @(negedge clk);
    check(init_reset && !init_start && !init_done && init_active, "reset phase");
    wait (t_done >= 0);
    check(t_reset_end > P - 5 && t_reset_end < P + 5, $sformatf("reset phase length %0d", t_reset_end));
    check(t_frame > 3 * P - 5 && t_frame < 3 * P + 5, $sformatf("request after 3 periods (%0d)", t_frame));
    check(t_start - t_frame > P / 2 && t_start - t_frame <= P, "init_start after one roll-over");
    check(t_done - t_start == P || t_done - t_start == P + 1, $sformatf("init_done one period later (%0d)", t_done - t_start));
    check(nframes == 1, "one request");
    check_frame(16'hFFFF);
    @(negedge clk);
    check(!init_active && init_start, "traffic owns the output");
    // rewrite the first destination word, restart with a busy frame
    @(negedge pci_clk); pci_addr = 2; pci_data = 32'h0200_FFFF; pci_wr_l = 0;
    @(negedge pci_clk); pci_wr_l = 1;
    @(negedge clk); frame_busy = 1; init_l = 0; @(negedge clk); init_l = 1;
    repeat (5) @(negedge clk);
    check(!init_reset, "restart waits for the frame");
    frame_busy = 0;
    repeat (3) @(negedge clk);
    check(init_reset && !init_done, "restarted");
    t_done = -1; t_start = -1;
    wait (t_done >= 0);
    check(nframes == 2, "second request");
    check(fr[4] == 16'h0200, "rewritten frame word");
    finish();
  end
endmodule
