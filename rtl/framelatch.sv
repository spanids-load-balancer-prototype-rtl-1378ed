// framelatch: captures the most recent frame for reading over PCI.
//
// Two 4096 x 16-bit memories hold the even and odd half-words of a frame.
// A 13-bit word counter (cascaded 7- and 6-bit counters in the original)
// advances for every frame word; its least significant bit selects the
// even or odd memory and the remaining bits the memory row. The counter is
// cleared between frames. When a frame ends its length in bytes (word
// count times two, so odd sizes are rounded up) is latched into pci_length.
// The PCI side reads a 32-bit word {even, odd} from row pci_addr one
// pci_clk cycle later. The last word of an internal-format frame (valid
// already low) is captured as well: writing continues for one cycle after
// valid falls, using the one-cycle-delayed valid that also controls the
// length latch. That inclusion is this design's choice; the rest follows
// the specification. Memory contents are not reset.
module framelatch (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data,
  input  logic        valid,
  input  logic        pci_clk,
  input  logic [11:0] pci_addr,
  output logic [31:0] pci_data,
  output logic [31:0] pci_length
);
  logic [15:0] mem_e [4096];
  logic [15:0] mem_o [4096];
  logic [12:0] cnt;
  logic valid_d;
  logic wr;
  assign wr = valid | valid_d;

  always_ff @(posedge clk) begin
    if (wr && !cnt[0]) mem_e[cnt[12:1]] <= data;
    if (wr &&  cnt[0]) mem_o[cnt[12:1]] <= data;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cnt <= '0; valid_d <= 1'b0; pci_length <= '0;
    end else begin
      valid_d <= valid;
      if (wr) cnt <= cnt + 1'b1;
      else    cnt <= '0;
      if (valid_d && !valid) pci_length <= 32'(cnt + 13'd1) << 1;
    end
  end

  logic [31:0] rdata;
  assign rdata = {mem_e[pci_addr], mem_o[pci_addr]};
  always_ff @(posedge pci_clk) pci_data <= rdata;
endmodule
