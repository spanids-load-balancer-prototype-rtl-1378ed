// async_fifo_core: dual-clock FIFO used by the synchronization FIFO and by
// the performance monitor command path.
//
// Write and read pointers are kept in Gray code and crossed into the other
// clock domain through two flip-flop stages, so the fill level each side
// sees is conservative (the writer sees an upper bound, the reader a lower
// bound). The read port is registered: data appears on rd_data one cycle
// after rd_en, like a standard (non first-word-fall-through) FIFO core.
// wr_level is the fill level in the write domain, rd_level in the read
// domain. Writing when full or reading when empty is ignored.
module async_fifo_core #(
  parameter int W     = 18,
  parameter int AW    = 10
) (
  input  logic          wclk,
  input  logic          wreset,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic [AW:0]   wr_level,
  output logic          full,
  input  logic          rclk,
  input  logic          rreset,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic [AW:0]   rd_level,
  output logic          empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign rbin_w   = g2b(rgray_w2);
  assign wbin_r   = g2b(wgray_r2);
  assign wr_level = wbin - rbin_w;
  assign rd_level = wbin_r - rbin;
  assign full     = wr_level[AW];
  assign empty    = (rd_level == '0);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or posedge wreset) begin
    if (wreset) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
      end
    end
  end

  always_ff @(posedge rclk or posedge rreset) begin
    if (rreset) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rd_data <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rd_data <= mem[rbin[AW-1:0]];
        rbin    <= rbin + 1'b1;
        rgray   <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end
  end
endmodule
