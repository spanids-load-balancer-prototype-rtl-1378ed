// delaypipe: delay pipeline and MAC address rewrite stage.
//
// Frames in the internal format (data, valid, be) are written into a
// 64-entry dual-port RAM addressed by two free-running counters; the write
// address starts DELAY-1 ahead of the read address, so a frame leaves
// DELAY (49) cycles after it entered. That is enough for the routing logic
// to present a new destination MAC on mac_addr/mac_load before the frame's
// preamble leaves the pipe.
//
// The rewrite controller latches mac_addr on mac_load (ignored when
// no_routing is set) and remembers that an address is pending. When a frame
// starts at the pipe output it takes the pending address: the destination
// MAC (half-words 4-6 after the preamble) is replaced with it and the source
// MAC (half-words 7-9) with the load balancer's own address. A frame that
// finds no pending address is dropped (valid kept low). With no_routing all
// frames pass unmodified; no_frames masks the output valid completely.
// A high-priority multiplexer driven by init_control replaces the output
// with the init-request frame, and blocks normal traffic until init_done.
// Outputs are registered. Input-to-output latency is DELAY+1 cycles.
// The structure follows the specification; the handling of an address
// loaded while the previous frame is still leaving the pipe (a separate
// pending flag and a per-frame address register) is this design's choice.
module delaypipe
  import spanids_pkg::*;
#(
  parameter int DELAY = 49,
  parameter int CNT_W = 28
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data_i,
  input  logic        valid_i,
  input  logic        be_i,
  input  logic [47:0] mac_addr,
  input  logic        mac_load,
  output logic [15:0] data_o,
  output logic        valid_o,
  output logic        be_o,
  input  logic        no_routing,
  input  logic        no_frames,
  input  logic        init_cntl_l,
  output logic        init_reset,
  output logic        init_start,
  output logic        init_done,
  input  logic        pci_clk,
  input  logic [4:0]  pci_addr,
  input  logic [31:0] pci_data,
  input  logic        pci_wr_l
);
  // ---- delay RAM ----
  logic [17:0] ram [64];
  logic [5:0] wa, ra;
  logic [17:0] rq;
  logic primed;                   // RAM has been written once at ra

  always_ff @(posedge clk) begin
    ram[wa] <= {valid_i, be_i, data_i};
    rq      <= ram[ra];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      wa <= 6'(DELAY - 1); ra <= '0; primed <= 1'b0;
    end else begin
      wa <= wa + 1'b1;
      ra <= ra + 1'b1;
      if (ra == 6'(DELAY - 1)) primed <= 1'b1;
    end
  end

  logic        pv, pb, pv_d;
  logic [15:0] pd;
  assign pv = rq[17] & primed;
  assign pb = rq[16] & primed;
  assign pd = rq[15:0];

  // ---- initialization control ----
  logic frame_busy, init_active, init_valid, init_be;
  logic [15:0] init_data;
  assign frame_busy = pv | pv_d;

  init_control #(.CNT_W(CNT_W)) u_init (
    .clk, .reset, .init_l(init_cntl_l), .frame_busy,
    .init_reset, .init_start, .init_done, .init_active, .init_data, .init_valid, .init_be,
    .pci_clk, .pci_addr, .pci_data, .pci_wr_l
  );

  // ---- rewrite control ----
  logic [47:0] mac_reg, cur_mac;
  logic pending, in_frame, forward, rewrite;
  logic [3:0] word;
  logic start;
  assign start = pv & ~pv_d & ~in_frame;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mac_reg <= '0; cur_mac <= '0; pending <= 1'b0; pv_d <= 1'b0;
      in_frame <= 1'b0; forward <= 1'b0; rewrite <= 1'b0; word <= '0;
    end else begin
      pv_d <= pv;
      if (start) begin
        forward  <= no_routing | pending;
        rewrite  <= ~no_routing & pending;
        cur_mac  <= mac_reg;
        pending  <= 1'b0;
        in_frame <= 1'b1;
        word     <= 4'd1;
      end else if (in_frame) begin
        if (word != 4'hF) word <= word + 1'b1;
        if (!pv) in_frame <= 1'b0;             // last data word
      end
      if (mac_load && !no_routing) begin
        mac_reg <= mac_addr;
        pending <= 1'b1;
      end
    end
  end

  // data multiplexer: original, new destination MAC, own source MAC
  logic [3:0]  w;
  logic [15:0] rd;
  logic        fwd, act;
  assign w   = start ? 4'd0 : word;
  assign act = start | in_frame;
  assign fwd = start ? (no_routing | pending) : forward;

  always_comb begin
    rd = pd;
    if ((start ? (~no_routing & pending) : rewrite)) begin
      case (w)
        4'd4: rd = start ? mac_reg[47:32] : cur_mac[47:32];
        4'd5: rd = cur_mac[31:16];
        4'd6: rd = cur_mac[15:0];
        4'd7: rd = LB_MAC[47:32];
        4'd8: rd = LB_MAC[31:16];
        4'd9: rd = LB_MAC[15:0];
        default: rd = pd;
      endcase
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      data_o <= '0; valid_o <= 1'b0; be_o <= 1'b0;
    end else if (init_active) begin
      data_o  <= init_data;
      valid_o <= init_valid;
      be_o    <= init_be;
    end else begin
      data_o  <= rd;
      valid_o <= act & fwd & pv & ~no_frames;
      be_o    <= act & fwd & pb & ~no_frames;
    end
  end
endmodule
