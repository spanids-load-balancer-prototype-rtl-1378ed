// hashers: four 12-bit hash functions of the 96-bit packet header
// {src IP, dst IP, src port, dst port}.
//
//   idx0: XOR of the eight consecutive 12-bit chunks of the header.
//   idx1: the same after rotating the header by 6 bits, so that chunks
//         start at a different bit and straddle the fields differently.
//   idx2: XOR of the 12-bit chunks of the two IP addresses (64 bits,
//         zero-extended to 72) with the low 12 bits of the port sum.
//   idx3: XOR of the 12-bit chunks of the two ports (32 bits, zero-
//         extended to 36) with the low 12 bits of the IP address sum.
// Each result is ANDed with mask (which scales the index range with the
// number of sensors) and registered: indices are valid one cycle after
// the header. The specification gives these constructions in words; the
// exact rotation amount and chunk alignment are this design's.
module hashers (
  input  logic        clk,
  input  logic [95:0] header,
  input  logic [11:0] mask,
  output logic [11:0] idx0,
  output logic [11:0] idx1,
  output logic [11:0] idx2,
  output logic [11:0] idx3
);
  function automatic logic [11:0] fold96(input logic [95:0] v);
    logic [11:0] r = '0;
    for (int i = 0; i < 8; i++) r ^= v[i*12 +: 12];
    return r;
  endfunction

  logic [95:0] rot;
  logic [71:0] ips;
  logic [35:0] ports;
  logic [11:0] h0, h1, h2, h3, psum, isum;

  always_comb begin
    rot   = {header[5:0], header[95:6]};
    ips   = {8'h0, header[95:32]};
    ports = {4'h0, header[31:0]};
    psum  = 12'(header[31:16] + header[15:0]);
    isum  = 12'(header[95:64] + header[63:32]);
    h0 = fold96(header);
    h1 = fold96(rot);
    h2 = psum;
    for (int i = 0; i < 6; i++) h2 ^= ips[i*12 +: 12];
    h3 = isum;
    for (int i = 0; i < 3; i++) h3 ^= ports[i*12 +: 12];
  end

  always_ff @(posedge clk) begin
    idx0 <= h0 & mask;
    idx1 <= h1 & mask;
    idx2 <= h2 & mask;
    idx3 <= h3 & mask;
  end
endmodule
