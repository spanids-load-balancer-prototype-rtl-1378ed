// pci_target: 33 MHz, 32-bit, target-only PCI interface.
//
// Bus side: the shared PCI signals are split into input, output and
// output-enable (ad_i/ad_o/ad_oe, par_i/par_o/par_oe, and one enable
// s_oe for the sustained tri-state target signals trdy_l, stop_l and
// devsel_l); perr_l and serr_l are open-drain (perr_oe, serr_oe pull low
// when set). The board ties these to tri-state pads.
// A controller in states IDLE, STATE_CFG, BUS_BUSY, COMP_ADDR, S_DATA and
// TURN follows each transaction. An address phase (frame_l falling) with
// idsel and a configuration read/write command enters STATE_CFG: devsel
// is asserted and trdy follows after CFG_DELAY cycles; the configuration
// header (vendor/device ID, command/status, class, two 1 MB
// non-prefetchable memory BARs, interrupt line) is read or written. A
// memory read/write (when memory space is enabled) goes through BUS_BUSY
// and COMP_ADDR, where the address is compared with both BARs; on a hit
// S_DATA asserts devsel, presents the word offset (addr_offset =
// address bits 19:2), region (addr_region, 1 = BAR1), byte enables and
// write data to the backside, and drives rd_l or wr_l low until the
// backside acknowledges (rd_ack_l/wr_ack_l low for one cycle; read data is
// taken from data_rd in that cycle). trdy is asserted once the
// acknowledgement has arrived and at least MEM_DELAY cycles have passed.
// The data phase ends when irdy and trdy are both low; stop is asserted
// with trdy when frame_l is still low, so bursts end after one word.
// TURN drives the target signals high for one cycle before release.
// Parity: par_o is even parity over ad and c_be_l of the previous read data
// cycle; on address and write data phases the received parity is checked
// one cycle later and serr_l (address) or perr_l (write data, if parity
// response is enabled) is pulled low for one cycle.
// The state names, the delay counter and the backside handshake follow
// the specification; IDs, class code and the TURN state are this
// design's. Only single data-phase transactions are supported.
module pci_target #(
  parameter logic [15:0] VENDOR_ID = 16'h10EE,
  parameter logic [15:0] DEVICE_ID = 16'h5350,
  parameter int          CFG_DELAY = 10,
  parameter int          MEM_DELAY = 4
) (
  input  logic        clk,
  input  logic        reset_l,
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [3:0]  c_be_l,
  input  logic        par_i,
  output logic        par_o,
  output logic        par_oe,
  output logic        perr_oe,
  output logic        serr_oe,
  input  logic        frame_l,
  input  logic        irdy_l,
  output logic        trdy_l,
  output logic        stop_l,
  output logic        devsel_l,
  output logic        s_oe,
  input  logic        idsel,
  output logic [17:0] addr_offset,
  output logic        addr_region,
  output logic [3:0]  be,
  output logic [31:0] data_wr,
  input  logic [31:0] data_rd,
  output logic        wr_l,
  output logic        rd_l,
  input  logic        wr_ack_l,
  input  logic        rd_ack_l
);
  typedef enum logic [2:0] {IDLE, STATE_CFG, BUS_BUSY, COMP_ADDR, S_DATA, TURN} state_e;
  state_e st;

  logic        frame_d;
  logic [31:0] addr;
  logic [3:0]  dcnt;
  logic        acked, is_read;
  logic [31:0] rdata;

  // configuration registers
  logic [11:0] bar0, bar1;          // address bits 31:20
  logic        mem_en, perr_en, serr_en;
  logic [7:0]  int_line;

  logic addr_phase, xfer, cfg_cmd, mem_cmd;
  assign addr_phase = !frame_l && frame_d;
  assign xfer       = !irdy_l && !trdy_l;
  assign cfg_cmd    = (c_be_l[3:1] == 3'b101);
  assign mem_cmd    = (c_be_l[3:1] == 3'b011);

  function automatic logic [31:0] cfg_read(input logic [5:0] r);
    case (r)
      6'h00: return {DEVICE_ID, VENDOR_ID};
      6'h01: return {16'h0200, 7'h0, serr_en, 1'b0, perr_en, 4'h0, mem_en, 1'b0}; // medium devsel
      6'h02: return {24'h058000, 8'h01};          // class: other memory controller, rev 1
      6'h03: return 32'h0;
      6'h04: return {bar0, 20'h0};
      6'h05: return {bar1, 20'h0};
      6'h0F: return {24'h000100, int_line};       // INTA
      default: return 32'h0;
    endcase
  endfunction

  // parity of the cycle before
  logic [31:0] ad_q;
  logic [3:0]  cbe_q;
  logic        chk_addr, chk_data;

  always_ff @(posedge clk or negedge reset_l) begin
    if (!reset_l) begin
      st <= IDLE; frame_d <= 1'b1; addr <= '0; dcnt <= '0; acked <= 1'b0;
      is_read <= 1'b0; rdata <= '0;
      bar0 <= '0; bar1 <= '0; mem_en <= 1'b0; perr_en <= 1'b0; serr_en <= 1'b0; int_line <= '0;
      trdy_l <= 1'b1; stop_l <= 1'b1; devsel_l <= 1'b1; s_oe <= 1'b0; ad_oe <= 1'b0;
      rd_l <= 1'b1; wr_l <= 1'b1; be <= '0; data_wr <= '0; addr_offset <= '0; addr_region <= 1'b0;
    end else begin
      frame_d <= frame_l;
      case (st)
        IDLE: begin
          trdy_l <= 1'b1; stop_l <= 1'b1; devsel_l <= 1'b1; s_oe <= 1'b0; ad_oe <= 1'b0;
          if (addr_phase) begin
            addr <= ad_i; is_read <= !c_be_l[0];
            if (idsel && cfg_cmd && ad_i[1:0] == 2'b00) begin
              st <= STATE_CFG; dcnt <= 4'(CFG_DELAY - 1);
              devsel_l <= 1'b0; s_oe <= 1'b1;
            end else if (mem_cmd && mem_en) begin
              st <= BUS_BUSY;
            end
          end
        end
        STATE_CFG: begin
          if (dcnt != 0) dcnt <= dcnt - 1'b1;
          if (dcnt == 4'd1) begin
            rdata <= cfg_read(addr[7:2]);
            ad_oe <= is_read;
          end
          if (dcnt == 4'd0 && trdy_l) begin
            trdy_l <= 1'b0; stop_l <= frame_l;
          end
          if (xfer) begin
            if (!is_read) begin
              case (addr[7:2])
                6'h01: begin
                  if (!c_be_l[0]) begin mem_en <= ad_i[1]; perr_en <= ad_i[6]; end
                  if (!c_be_l[1]) serr_en <= ad_i[8];
                end
                6'h04: bar0 <= ad_i[31:20];
                6'h05: bar1 <= ad_i[31:20];
                6'h0F: if (!c_be_l[0]) int_line <= ad_i[7:0];
                default: ;
              endcase
            end
            st <= TURN; trdy_l <= 1'b1; stop_l <= 1'b1; devsel_l <= 1'b1; ad_oe <= 1'b0;
          end
        end
        BUS_BUSY: st <= COMP_ADDR;
        COMP_ADDR: begin
          if (addr[31:20] == bar0 || addr[31:20] == bar1) begin
            st <= S_DATA; devsel_l <= 1'b0; s_oe <= 1'b1;
            addr_offset <= addr[19:2]; addr_region <= (addr[31:20] == bar1) && (bar1 != bar0);
            dcnt <= 4'(MEM_DELAY - 2); acked <= 1'b0;
          end else st <= IDLE;
        end
        S_DATA: begin
          if (dcnt != 0) dcnt <= dcnt - 1'b1;
          // backside strobe, once the initiator has presented byte enables
          if (!acked && rd_l && wr_l && !irdy_l) begin
            be <= ~c_be_l; data_wr <= ad_i;
            if (is_read) rd_l <= 1'b0; else wr_l <= 1'b0;
          end
          if (!rd_ack_l && !rd_l) begin rdata <= data_rd; acked <= 1'b1; rd_l <= 1'b1; ad_oe <= 1'b1; end
          if (!wr_ack_l && !wr_l) begin acked <= 1'b1; wr_l <= 1'b1; end
          if (acked && dcnt == 4'd0 && trdy_l) begin
            trdy_l <= 1'b0; stop_l <= frame_l;
          end
          if (xfer) begin
            st <= TURN; trdy_l <= 1'b1; stop_l <= 1'b1; devsel_l <= 1'b1; ad_oe <= 1'b0;
          end
        end
        TURN: begin s_oe <= 1'b0; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  assign ad_o = rdata;

  // parity generation and checking
  always_ff @(posedge clk or negedge reset_l) begin
    if (!reset_l) begin
      ad_q <= '0; cbe_q <= '0; chk_addr <= 1'b0; chk_data <= 1'b0;
      par_o <= 1'b0; par_oe <= 1'b0; perr_oe <= 1'b0; serr_oe <= 1'b0;
    end else begin
      ad_q  <= ad_oe ? ad_o : ad_i;
      cbe_q <= c_be_l;
      par_oe  <= ad_oe;
      par_o   <= ^{ad_o, c_be_l};
      chk_addr <= addr_phase;
      chk_data <= xfer && !is_read && (st == S_DATA || st == STATE_CFG);
      serr_oe <= chk_addr && serr_en && (par_i != ^{ad_q, cbe_q});
      perr_oe <= chk_data && perr_en && (par_i != ^{ad_q, cbe_q});
    end
  end
endmodule
