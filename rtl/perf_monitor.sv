// perf_monitor: per-sensor performance records, readable over PCI.
//
// Each of 64 sensors has a 32-byte record of four 64-bit entries, stored
// big-endian (half-word 0 is the most significant half-word of entry 0):
//   half-word 0      hash buckets assigned to the sensor
//   half-words 1-3   sensor MAC address
//   half-words 4-5   sensor IP address
//   half-words 6-7   flow control packet count (32 bits)
//   half-words 8-11  bytes routed to the sensor (64 bits)
//   half-words 12-15 packets routed to the sensor (64 bits)
// The memory is four 16-bit banks of 512 rows: rows 0-255 hold the current
// records, rows 256-511 the snapshot. A command address is a half-word
// address idx*16+hw: bits 9:2 select the row, bits 1:0 the bank.
// Commands arrive from the load balancer's clock domain (clk) through a
// 64-entry dual-clock FIFO (cmd_in/addr_in/data_in on shift_in;
// fifo_full warns the writer). All other logic runs on pci_clk. The
// controller pops one command at a time: WRITE stores 16 bits (3 cycles),
// ADD32 adds data to the 32-bit word at a 32-bit aligned address (4
// cycles), ADD64_1 adds data to the 64-bit entry at the address and one to
// the following entry (6 cycles). Every read-modify-write reads the row in
// one cycle and writes the sum in the next.
// A snapshot (snapshot high while idle) copies rows 0-255 to 256-511, one
// row per two cycles; snapshot_ack is high while it runs. A clear (any
// clear bit high while idle, after a pending snapshot) zeroes in each
// current record the flow control count (bit 0), the byte count (bit 1)
// and/or the packet count (bit 2), one row per cycle, with clear_ack high;
// the clear bits are taken when the operation starts, so the requester may
// drop them once clear_ack rises.
// After reset the whole memory is zeroed (512 cycles). pci_addr is a word
// address inside region 1: words 0-511 current records, 512-1023 snapshot;
// pci_data is registered (one pci_clk of latency).
// Record layout, command set, snapshot-before-clear and the memory
// organisation follow the specification. ADD32 takes 32-bit alignment
// (addr<0> = 0) because the flow control count starts at half-word 6; the
// FIFO depth, the fifo_full output and the reset of both FIFO sides by
// pci_reset_l are this design's choices.
module perf_monitor
  import spanids_pkg::*;
#(
  parameter int FIFO_AW = 6
) (
  input  logic        pci_clk,
  input  logic        clk,
  input  logic        pci_reset_l,
  input  logic [17:0] pci_addr,
  output logic [31:0] pci_data,
  input  logic [2:0]  clear,
  output logic        clear_ack,
  input  logic        snapshot,
  output logic        snapshot_ack,
  input  logic [1:0]  cmd_in,
  input  logic [9:0]  addr_in,
  input  logic [15:0] data_in,
  input  logic        shift_in,
  output logic        fifo_full
);
  logic reset;
  assign reset = ~pci_reset_l;

  // command FIFO
  logic        f_rd, f_empty;
  logic [27:0] f_q;
  logic [FIFO_AW:0] wl, rl;
  async_fifo_core #(.W(28), .AW(FIFO_AW)) u_cmdfifo (
    .wclk(clk), .wreset(reset), .wr_en(shift_in), .wr_data({cmd_in, addr_in, data_in}),
    .wr_level(wl), .full(fifo_full),
    .rclk(pci_clk), .rreset(reset), .rd_en(f_rd), .rd_data(f_q), .rd_level(rl), .empty(f_empty)
  );

  // record memory: four banks, bank 0 = most significant half-word
  logic [15:0] bank0 [512];
  logic [15:0] bank1 [512];
  logic [15:0] bank2 [512];
  logic [15:0] bank3 [512];
  logic [8:0]  m_addr;
  logic [3:0]  m_we;
  logic [63:0] m_wd, m_rd;

  always_ff @(posedge pci_clk) begin
    if (m_we[0]) bank0[m_addr] <= m_wd[63:48];
    if (m_we[1]) bank1[m_addr] <= m_wd[47:32];
    if (m_we[2]) bank2[m_addr] <= m_wd[31:16];
    if (m_we[3]) bank3[m_addr] <= m_wd[15:0];
    m_rd <= {bank0[m_addr], bank1[m_addr], bank2[m_addr], bank3[m_addr]};
  end

  always_ff @(posedge pci_clk) begin
    pci_data <= pci_addr[0] ? {bank2[pci_addr[9:1]], bank3[pci_addr[9:1]]}
                            : {bank0[pci_addr[9:1]], bank1[pci_addr[9:1]]};
  end

  // controller
  typedef enum logic [3:0] {P_INIT, P_IDLE, P_POP, P_CMD, P_WR1, P_RD2, P_WR2,
                            P_SNAP_RD, P_SNAP_WR, P_CLR} state_e;
  state_e st;
  logic [8:0]  cnt;
  logic [1:0]  cmd;
  logic [9:0]  a;
  logic [15:0] d;
  logic [63:0] sum1, sum32;
  logic [31:0] half;
  logic [2:0]  clr_bits;     // clear request taken at the start

  assign half  = a[1] ? m_rd[31:0] : m_rd[63:32];
  assign sum32 = a[1] ? {32'h0, half + 32'(d)} : {half + 32'(d), 32'h0};
  assign sum1  = m_rd + 64'(d);

  assign f_rd         = (st == P_IDLE) && !f_empty && !snapshot && clear == '0;
  assign snapshot_ack = (st == P_SNAP_RD) || (st == P_SNAP_WR);
  assign clear_ack    = (st == P_CLR);

  always_comb begin
    m_addr = {1'b0, a[9:2]};
    m_we   = '0;
    m_wd   = '0;
    case (st)
      P_INIT: begin m_addr = cnt; m_we = '1; end
      P_CMD: begin
        m_addr = {1'b0, f_q[25:18]};
        if (f_q[27:26] == PM_WRITE) begin
          m_we[f_q[17:16]] = 1'b1;
          m_wd = {4{f_q[15:0]}};
        end
      end
      P_WR1: begin
        m_wd = (cmd == PM_ADD32) ? sum32 : sum1;
        m_we = (cmd == PM_ADD32) ? (a[1] ? 4'b1100 : 4'b0011) : 4'b1111;  // bit k = bank k
      end
      P_RD2: m_addr = {1'b0, a[9:3], 1'b1};
      P_WR2: begin m_addr = {1'b0, a[9:3], 1'b1}; m_wd = m_rd + 64'd1; m_we = '1; end
      P_SNAP_RD: m_addr = {1'b0, cnt[7:0]};
      P_SNAP_WR: begin m_addr = {1'b1, cnt[7:0]}; m_wd = m_rd; m_we = '1; end
      P_CLR: begin
        m_addr = {1'b0, cnt[7:0]};
        case (cnt[1:0])
          2'd1: m_we = clr_bits[0] ? 4'b1100 : 4'b0000;
          2'd2: m_we = clr_bits[1] ? 4'b1111 : 4'b0000;
          2'd3: m_we = clr_bits[2] ? 4'b1111 : 4'b0000;
          default: m_we = '0;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge pci_clk or posedge reset) begin
    if (reset) begin
      st <= P_INIT; cnt <= '0; cmd <= '0; a <= '0; d <= '0; clr_bits <= '0;
    end else begin
      case (st)
        P_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 9'd511) st <= P_IDLE;
        end
        P_IDLE: begin
          cnt <= '0;
          clr_bits <= clear;
          if (snapshot)            st <= P_SNAP_RD;
          else if (clear != '0)    st <= P_CLR;
          else if (!f_empty)       st <= P_POP;
        end
        P_POP: st <= P_CMD;
        P_CMD: begin
          cmd <= f_q[27:26]; a <= f_q[25:16]; d <= f_q[15:0];
          st <= (f_q[27:26] == PM_ADD32 || f_q[27:26] == PM_ADD64) ? P_WR1 : P_IDLE;
        end
        P_WR1:  st <= (cmd == PM_ADD64) ? P_RD2 : P_IDLE;
        P_RD2:  st <= P_WR2;
        P_WR2:  st <= P_IDLE;
        P_SNAP_RD: st <= P_SNAP_WR;
        P_SNAP_WR: begin
          cnt <= cnt + 1'b1;
          if (cnt[7:0] == 8'hFF) begin
            cnt <= '0;
            clr_bits <= clear;
            st <= (clear != '0) ? P_CLR : P_IDLE;
          end else st <= P_SNAP_RD;
        end
        P_CLR: begin
          cnt <= cnt + 1'b1;
          if (cnt[7:0] == 8'hFF) st <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
