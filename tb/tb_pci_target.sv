// Testbench for pci_target with a bus-master model and a backside memory
// that acknowledges after a random delay: configuration reads (IDs) and
// writes (BARs, command register), memory writes and reads in both
// regions with byte enables, master abort for unclaimed addresses and
// before memory space is enabled, stop on a burst attempt, read parity,
// and perr on a write with bad parity.
module tb_pci_target;
  logic clk = 0, reset_l = 0;
  logic [31:0] ad_i = 0, ad_o;
  logic ad_oe;
  logic [3:0] c_be_l = 4'hF;
  logic par_i = 0, par_o, par_oe, perr_oe, serr_oe;
  logic frame_l = 1, irdy_l = 1, trdy_l, stop_l, devsel_l, s_oe, idsel = 0;
  logic [17:0] addr_offset;
  logic addr_region;
  logic [3:0] be;
  logic [31:0] data_wr, data_rd = 0;
  logic wr_l, rd_l, wr_ack_l = 1, rd_ack_l = 1;
  int checks = 0, failures = 0;
  pci_target dut (.*);
  always #15 clk = ~clk;
  initial begin #20_000_000; $display("watchdog expired"); failures++; finish(); end
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // backside memory: 2 regions x 256 words
  logic [31:0] mem [2][256];
  initial begin
    forever begin
      @(negedge clk);
      rd_ack_l = 1; wr_ack_l = 1;
      if (!wr_l || !rd_l) begin
        logic w;
        w = !wr_l;
        repeat (1 + $urandom % 4) @(negedge clk);
        if (w) begin
          for (int b = 0; b < 4; b++) if (be[b]) mem[addr_region][addr_offset[7:0]][8*b +: 8] = data_wr[8*b +: 8];
          wr_ack_l = 0;
        end else begin
          data_rd = mem[addr_region][addr_offset[7:0]];
          rd_ack_l = 0;
        end
        @(negedge clk); rd_ack_l = 1; wr_ack_l = 1;
        while (!wr_l || !rd_l) @(negedge clk);
      end
    end
  end

  // parity monitor: par_o covers ad and c_be of the cycle before
  logic [31:0] ad_prev; logic [3:0] cbe_prev; logic oe_prev = 0;
  int par_checked = 0;
  always @(posedge clk) begin
    if (oe_prev && par_oe) begin
      par_checked++;
      check(par_o == ^{ad_prev, cbe_prev}, "read parity");
    end
    ad_prev <= ad_o; cbe_prev <= c_be_l; oe_prev <= ad_oe;
  end

  // one single-word transaction; returns 0 on master abort
  task automatic xact(input logic [3:0] cmd, input logic [31:0] addr, input logic cfg,
                      input logic [3:0] bel, inout logic [31:0] data, output logic claimed,
                      input logic burst = 0, input logic bad_par = 0);
    int n = 0;
    logic is_rd;
    is_rd = !cmd[0];
    @(negedge clk);
    frame_l = 0; ad_i = addr; c_be_l = cmd; idsel = cfg;
    @(negedge clk);
    frame_l = !burst; irdy_l = 0; c_be_l = bel; idsel = 0;
    ad_i = is_rd ? 32'hz : data;
    claimed = 0;
    while (1) begin
      @(posedge clk);
      if (!devsel_l) claimed = 1;
      if (!trdy_l) break;
      if (++n > 30) break;
      if (n > 6 && !claimed) break;
      #1 par_i = ^{ad_i, c_be_l} ^ bad_par;
    end
    if (!trdy_l) begin
      check(stop_l == !burst, "stop only on burst");
      if (is_rd) data = ad_o;
    end
    @(negedge clk);
    par_i = ^{ad_i, c_be_l} ^ bad_par;
    frame_l = 1; irdy_l = 1; c_be_l = 4'hF;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d, ref_mem [2][16];
    logic cl;
    int perrs;
    repeat (3) @(negedge clk); reset_l = 1;
    repeat (2) @(negedge clk);
    // configuration
    xact(4'hA, 32'h0000_0000, 1, 4'h0, d, cl);
    check(cl && d == 32'h5350_10EE, $sformatf("device/vendor ID %h", d));
    d = 32'h8000_0000; xact(4'hB, 32'h10, 1, 4'h0, d, cl);
    d = 32'h8010_0000; xact(4'hB, 32'h14, 1, 4'h0, d, cl);
    xact(4'hA, 32'h14, 1, 4'h0, d, cl);
    check(d == 32'h8010_0000, "BAR1 read back");
    // memory space still disabled: no response
    d = 32'h1; xact(4'h7, 32'h8000_0010, 0, 4'h0, d, cl);
    check(!cl, "ignored while memory space disabled");
    d = 32'h0000_0146; xact(4'hB, 32'h04, 1, 4'h0, d, cl);
    xact(4'hA, 32'h04, 1, 4'h0, d, cl);
    check(d[1] && d[6] && d[8], "command register");
    // random memory traffic
    for (int r = 0; r < 2; r++) for (int i = 0; i < 16; i++) ref_mem[r][i] = 0;
    for (int r = 0; r < 2; r++) for (int i = 0; i < 16; i++) mem[r][i] = 0;
    for (int t = 0; t < 120; t++) begin
      int r, i;
      logic [3:0] bel;
      r = $urandom % 2; i = $urandom % 16;
      if ($urandom % 2) begin
        d = $urandom; bel = ($urandom % 3 == 0) ? 4'($urandom) : 4'h0;
        xact(4'h7, {12'h800 + 12'(r), 12'h0, 6'(i), 2'b00}, 0, bel, d, cl);
        check(cl, "write claimed");
        for (int b = 0; b < 4; b++) if (!bel[b]) ref_mem[r][i][8*b +: 8] = d[8*b +: 8];
      end else begin
        xact(4'h6, {12'h800 + 12'(r), 12'h0, 6'(i), 2'b00}, 0, 4'h0, d, cl);
        check(cl && d == ref_mem[r][i], $sformatf("read region %0d word %0d: %h vs %h", r, i, d, ref_mem[r][i]));
      end
    end
    d = 0; xact(4'h6, 32'h9000_0000, 0, 4'h0, d, cl);
    check(!cl, "unclaimed address aborts");
    xact(4'h6, 32'h8000_0004, 0, 4'h0, d, cl, 1);
    check(cl, "burst read terminated with stop");
    check(par_checked > 20, "parity driven on reads");
    perrs = 0;
    fork
      begin repeat (40) begin @(posedge clk); if (perr_oe) perrs++; end end
      begin d = 32'h1234; xact(4'h7, 32'h8000_0008, 0, 4'h0, d, cl, 0, 1); end
    join
    check(perrs == 1, $sformatf("parity error reported (%0d)", perrs));
    finish();
  end
endmodule
