// init_control: start-up and re-initialization sequencer of the load
// balancer (part of the delay pipeline stage).
//
// A free-running CNT_W-bit counter (28 bits: one roll-over every 4.295 s at
// 62.5 MHz) paces the sequence. After reset the controller drives
// init_reset during the first counter period and keeps normal traffic off
// the output until the third roll-over (about 13 s, time for the PHY to
// bring up its link). It then sends the init-request frame, a table of
// 64 half-words of which the first INIT_WORDS (34: 8-byte preamble plus 60
// bytes, 64 bytes once the checksum is appended) are sent in the internal
// frame format (valid low in the last word, be forced high). After the
// next roll-over init_start rises (sign-on replies are in), after the one
// after that the controller waits for the end of any frame leaving the
// delay pipe and raises init_done, handing the output back to traffic.
// A low pulse on init_l restarts the whole sequence, again only once the
// frame currently leaving the pipe has ended.
//
// The init-request table is written from the PCI clock domain (pci_addr
// selects one of 32 32-bit words, the upper half-word is sent first) and
// is reset to the Table 1 frame. The counter is one binary counter here
// rather than four chained 7-bit counters; the roll-over timing is the same.
// init_start and init_done are levels that stay high until the next
// re-initialization.
module init_control
  import spanids_pkg::*;
#(
  parameter int CNT_W = 28
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        init_l,
  input  logic        frame_busy,    // a frame is leaving the delay pipe
  output logic        init_reset,
  output logic        init_start,
  output logic        init_done,
  output logic        init_active,   // output multiplexer owned by init logic
  output logic [15:0] init_data,
  output logic        init_valid,
  output logic        init_be,
  input  logic        pci_clk,
  input  logic [4:0]  pci_addr,
  input  logic [31:0] pci_data,
  input  logic        pci_wr_l
);
  // ---- init-request frame table (PCI writable) ----
  logic [31:0] pkt [32];
  always_ff @(posedge pci_clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < 32; i++) pkt[i] <= {init_default_hw(2*i), init_default_hw(2*i+1)};
    end else if (!pci_wr_l) begin
      pkt[pci_addr] <= pci_data;
    end
  end

  // ---- roll-over counter ----
  logic [CNT_W-1:0] cnt;
  logic roll;
  assign roll = &cnt;

  typedef enum logic [2:0] {S_RESET, S_HOLD, S_SEND, S_WAIT_START, S_WAIT_DONE, S_WAIT_EOF, S_DONE, S_RESTART} state_e;
  state_e st;
  logic [1:0] rolls;
  logic [5:0] word;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st <= S_RESET; cnt <= '0; rolls <= '0; word <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      case (st)
        S_RESET: if (roll) begin rolls <= 2'd1; st <= S_HOLD; end
        S_HOLD: if (roll) begin
          if (rolls == 2'd2) begin st <= S_SEND; word <= '0; end
          rolls <= rolls + 1'b1;
        end
        S_SEND: begin
          word <= word + 1'b1;
          if (int'(word) == INIT_WORDS - 1) st <= S_WAIT_START;
        end
        S_WAIT_START: if (roll) st <= S_WAIT_DONE;
        S_WAIT_DONE:  if (roll) st <= S_WAIT_EOF;
        S_WAIT_EOF:   if (!frame_busy) st <= S_DONE;
        S_DONE:       if (!init_l) st <= S_RESTART;
        S_RESTART:    if (!frame_busy) begin st <= S_RESET; cnt <= '0; rolls <= '0; end
        default:      st <= S_RESET;
      endcase
      if (!init_l && st != S_DONE && st != S_RESTART && st != S_RESET) st <= S_RESTART;
    end
  end

  assign init_reset  = (st == S_RESET);
  assign init_start  = (st == S_WAIT_DONE) || (st == S_WAIT_EOF) || (st == S_DONE);
  assign init_done   = (st == S_DONE);
  assign init_active = (st != S_DONE);

  logic [31:0] pw;
  assign pw         = pkt[word[5:1]];
  assign init_data  = (st == S_SEND) ? (word[0] ? pw[15:0] : pw[31:16]) : 16'h0;
  assign init_valid = (st == S_SEND) && (int'(word) != INIT_WORDS - 1);
  assign init_be    = (st == S_SEND);
endmodule
