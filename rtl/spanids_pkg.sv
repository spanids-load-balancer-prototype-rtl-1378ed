// spanids_pkg: types and constants shared by the SPANIDS load balancer.
//
// Holds the load balancer's own MAC/IP/UDP identity, the opcodes of the
// init/flow-control frames, the hash bucket entry layout, the performance
// monitor command encoding and record layout, the move/promote heuristic
// codes, and small functions: the Ethernet CRC-32 byte step, the IP header
// checksum, the hash index mask and the default init-request frame.
// The frame layouts, opcodes, UDP port, heuristic codes, command codes and
// record layout follow the specification; the MAC and IP address values
// are this design's choice (the specification does not give them).
package spanids_pkg;

  // Identity of the load balancer (values chosen by this design).
  localparam logic [47:0] LB_MAC   = 48'h02_53_50_4E_44_01;
  localparam logic [31:0] LB_IP    = 32'hC0_A8_01_01;   // 192.168.1.1
  localparam logic [15:0] UDP_PORT = 16'h1BCD;
  localparam logic [15:0] ETH_IP   = 16'h0800;

  localparam logic [15:0] OP_REQUEST = 16'h0000;
  localparam logic [15:0] OP_REPLY   = 16'h0001;
  localparam logic [15:0] OP_FC      = 16'h0002;

  // Move/promote heuristics (PCI register 0x38).
  typedef enum logic [2:0] {
    MODE_MOVE      = 3'b000,
    MODE_PROMOTE   = 3'b001,
    MODE_RANDOM    = 3'b010,
    MODE_INTENSITY = 3'b011,
    MODE_STATIC    = 3'b100
  } lb_mode_e;

  // Performance monitor commands (Table 6).
  typedef enum logic [1:0] {
    PM_NOP   = 2'b00,
    PM_WRITE = 2'b01,
    PM_ADD32 = 2'b10,
    PM_ADD64 = 2'b11
  } pm_cmd_e;

  // Half-word offsets inside one 16-half-word sensor record (Table 5).
  localparam logic [3:0] PM_HW_BUCKETS = 4'd0;
  localparam logic [3:0] PM_HW_MAC     = 4'd1;  // 1..3
  localparam logic [3:0] PM_HW_IP      = 4'd4;  // 4..5
  localparam logic [3:0] PM_HW_FC      = 4'd6;  // 6..7, 32-bit
  localparam logic [3:0] PM_HW_BYTES   = 4'd8;  // 8..11 bytes, 12..15 packets

  // One hash bucket: destination sensor, packet count, promote bit, timeout.
  typedef struct packed {
    logic [4:0]  timeout;
    logic        promote;
    logic [5:0]  sensor;
    logic [23:0] count;
  } bucket_t;

  // Ethernet CRC-32 (reflected, polynomial 0xEDB88320), one byte step.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

  // Index mask as a function of the number of signed-on sensors (Section III.1).
  function automatic logic [11:0] hash_mask(input logic [6:0] n);
    if (n >= 7'd32)      return 12'hFFF;
    else if (n >= 7'd16) return 12'h7FF;
    else if (n >= 7'd8)  return 12'h3FF;
    else if (n >= 7'd4)  return 12'h1FF;
    else if (n >= 7'd2)  return 12'h0FF;
    else                 return 12'h000;
  endfunction

  // Default init-request frame: 8-byte preamble, then the Table 1 fields
  // (60 bytes, 64 with the checksum appended by the transmit stage).
  localparam int INIT_WORDS = 34;

  function automatic logic [15:0] ip_checksum(input logic [31:0] src, input logic [31:0] dst);
    logic [31:0] s;
    s = 32'h4500 + 32'h0028 + 32'h0000 + 32'h4000 + 32'h4011
      + {16'h0, src[31:16]} + {16'h0, src[15:0]} + {16'h0, dst[31:16]} + {16'h0, dst[15:0]};
    s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    return ~s[15:0];
  endfunction

  function automatic logic [15:0] init_default_hw(input int i);
    case (i)
      0, 1, 2: return 16'h5555;
      3:       return 16'h55D5;
      4, 5, 6: return 16'hFFFF;                       // broadcast destination
      7:       return LB_MAC[47:32];
      8:       return LB_MAC[31:16];
      9:       return LB_MAC[15:0];
      10:      return ETH_IP;
      11:      return 16'h4500;
      12:      return 16'h0028;
      13:      return 16'h0000;
      14:      return 16'h4000;
      15:      return 16'h4011;
      16:      return ip_checksum(LB_IP, 32'hFFFF_FFFF);
      17:      return LB_IP[31:16];
      18:      return LB_IP[15:0];
      19, 20:  return 16'hFFFF;                       // broadcast IP
      21, 22:  return UDP_PORT;
      23:      return 16'h0014;
      24:      return 16'h0000;                       // no UDP checksum
      25:      return OP_REQUEST;
      26:      return LB_MAC[47:32];
      27:      return LB_MAC[31:16];
      28:      return LB_MAC[15:0];
      29:      return LB_IP[31:16];
      30:      return LB_IP[15:0];
      default: return 16'h0000;                       // padding
    endcase
  endfunction

endpackage
