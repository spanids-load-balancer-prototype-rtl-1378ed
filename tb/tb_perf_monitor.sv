// Testbench for perf_monitor: random WRITE, ADD32 and ADD64_1 commands
// from the load balancer clock domain against a reference record array,
// read back over the PCI port (current and snapshot sections), the
// snapshot copy, selective clears of the flow control, byte and packet
// counts, and the reset clear of the whole memory.
module tb_perf_monitor;
  logic pci_clk = 0, clk = 0, pci_reset_l = 0;
  logic [17:0] pci_addr = 0;
  logic [31:0] pci_data;
  logic [2:0] clear = 0;
  logic clear_ack, snapshot = 0, snapshot_ack;
  logic [1:0] cmd_in = 0;
  logic [9:0] addr_in = 0;
  logic [15:0] data_in = 0;
  logic shift_in = 0, fifo_full;
  int checks = 0, failures = 0;
  perf_monitor dut (.*);
  always #15 pci_clk = ~pci_clk;
  always #8 clk = ~clk;
  initial begin #50_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // reference: 64 records x 16 half-words, current and snapshot
  logic [15:0] cur[64][16], snap[64][16];

  task automatic put(input logic [1:0] c, input logic [9:0] a, input logic [15:0] d);
    @(negedge clk);
    while (fifo_full) @(negedge clk);
    cmd_in = c; addr_in = a; data_in = d; shift_in = 1;
    @(negedge clk); shift_in = 0;
  endtask

  function automatic logic [63:0] get64(input int r, input int hw);
    return {cur[r][hw], cur[r][hw+1], cur[r][hw+2], cur[r][hw+3]};
  endfunction
  function automatic void set64(input int r, input int hw, input logic [63:0] v);
    {cur[r][hw], cur[r][hw+1], cur[r][hw+2], cur[r][hw+3]} = v;
  endfunction

  task automatic compare(input logic snapshot_part, input string what);
    int bad = 0;
    for (int r = 0; r < 64; r++) for (int w = 0; w < 8; w++) begin
      logic [31:0] e;
      @(negedge pci_clk); pci_addr = 18'({snapshot_part, 9'(r * 8 + w)});
      @(negedge pci_clk);
      e = snapshot_part ? {snap[r][2*w], snap[r][2*w+1]} : {cur[r][2*w], cur[r][2*w+1]};
      checks++;
      if (pci_data !== e) begin
        bad++; failures++;
        if (bad < 4) $display("  rec %0d word %0d: %h vs %h", r, w, pci_data, e);
      end
    end
    if (bad != 0) $display("FAIL %s: %0d words differ", what, bad);
  endtask

  task automatic traffic(input int n);
    for (int i = 0; i < n; i++) begin
      int r, k;
      logic [15:0] d;
      r = $urandom % 64; d = 16'($urandom);
      k = $urandom % 3;
      if (k == 0) begin
        int hw; hw = 1 + $urandom % 5;
        put(2'b01, 10'(r * 16 + hw), d); cur[r][hw] = d;
      end else if (k == 1) begin
        logic [31:0] v;
        v = {cur[r][6], cur[r][7]} + 32'(d);
        put(2'b10, 10'(r * 16 + 6), d); {cur[r][6], cur[r][7]} = v;
      end else begin
        put(2'b11, 10'(r * 16 + 8), d);
        set64(r, 8, get64(r, 8) + 64'(d));
        set64(r, 12, get64(r, 12) + 1);
      end
    end
    repeat (600) @(negedge pci_clk);   // the FIFO drains
  endtask

  initial begin
    for (int r = 0; r < 64; r++) for (int h = 0; h < 16; h++) begin cur[r][h] = 0; snap[r][h] = 0; end
    repeat (3) @(negedge pci_clk); pci_reset_l = 1;
    repeat (600) @(negedge pci_clk);
    compare(0, "zero after reset");
    compare(1, "snapshot zero after reset");
    traffic(1500);
    // large ADD64 sums carry between half-words
    for (int i = 0; i < 40; i++) begin
      put(2'b11, 10'(5 * 16 + 8), 16'hFFFF); set64(5, 8, get64(5, 8) + 64'hFFFF); set64(5, 12, get64(5, 12) + 1);
    end
    repeat (300) @(negedge pci_clk);
    compare(0, "records after commands");
    // snapshot and clear of byte and flow control counts, with commands
    // queued during the operation
    @(negedge pci_clk); snapshot = 1; clear = 3'b011;
    snap = cur;
    wait (snapshot_ack); @(negedge pci_clk); snapshot = 0;
    wait (clear_ack); @(negedge pci_clk); clear = 0;
    for (int r = 0; r < 64; r++) begin
      cur[r][6] = 0; cur[r][7] = 0;
      for (int h = 8; h < 12; h++) cur[r][h] = 0;
    end
    wait (!clear_ack);
    compare(1, "snapshot copy");
    compare(0, "selective clear");
    traffic(500);
    compare(0, "records after more commands");
    @(negedge pci_clk); clear = 3'b100;
    wait (clear_ack); @(negedge pci_clk); clear = 0; wait (!clear_ack);
    for (int r = 0; r < 64; r++) for (int h = 12; h < 16; h++) cur[r][h] = 0;
    compare(0, "packet count clear");
    finish();
  end
endmodule
