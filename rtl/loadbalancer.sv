// loadbalancer: routing and load balancing logic.
//
// Frames in the internal format (data_i/valid_i/be_i) go to the packet
// decoder; a decoded IPv4 header is hashed into four 12-bit indices
// (masked to the number of sensors) and, one cycle later, looked up in the
// hash tables. The sensor index they return is translated into the
// sensor's MAC address by the flow control receiver's sensor table: one
// cycle after load_idx, mac_addr/mac_load present the new destination if
// the sensor is signed on (otherwise the frame gets no address and is
// dropped by the delay pipeline). Frames on data_f/valid_f (sensor replies
// and flow control) go to the flow control receiver, whose indices are
// handed to the hash table controllers. Lookups are suppressed while
// no_routing is high; non-IP frames pulse packet_ignore.
// Performance monitoring data comes from four sources and leaves as one
// registered stream (perfmon_cmd/addr/data/load, one command per cycle):
//   1. the flow control receiver (sensor MAC and IP, never stalled),
//   2. the bucket count table (stalled by 1 and by perfmon_full),
//   3. an acknowledged flow control index: ADD32 of 1 at half-word 6 of the
//      sensor's record (flow control count),
//   4. each routed frame: ADD64_1 of its byte length at half-word 8
//      (byte and packet counters), issued once both the frame length and
//      the frame's sensor index are known.
// Sources 3 and 4 are held in one-entry registers until granted, so flow
// control data goes before frame data. last_hash0..3 hold the indices of
// the last lookup. The structure follows the specification; the
// perfmon_full back-pressure input and the lookup gating by no_routing are
// this design's.
module loadbalancer
  import spanids_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] data_i,
  input  logic        valid_i,
  input  logic        be_i,
  input  logic [15:0] data_f,
  input  logic        valid_f,
  input  logic        be_f,
  input  logic        init_start,
  input  logic        init_done,
  input  logic        no_routing,
  output logic [47:0] mac_addr,
  output logic        mac_load,
  output logic        packet_ignore,
  output logic [6:0]  sensor_count,
  input  logic        pulse,
  input  logic [7:0]  threshold,
  input  logic [3:0]  bucket_count,
  input  logic [4:0]  random_val,
  input  logic [2:0]  lb_mode,
  output logic [1:0]  perfmon_cmd,
  output logic [9:0]  perfmon_addr,
  output logic [15:0] perfmon_data,
  output logic        perfmon_load,
  input  logic        perfmon_full,
  output logic [11:0] last_hash0,
  output logic [11:0] last_hash1,
  output logic [11:0] last_hash2,
  output logic [11:0] last_hash3,
  output logic        move,
  output logic        promote,
  output logic        demote,
  output logic        route_l0,
  output logic        route_l1,
  output logic        route_l2,
  output logic        route_l3,
  output logic        route_l4,
  input  logic        pci_clk,
  input  logic [11:0] pci_addr,
  output logic [31:0] pci_data_table0,
  output logic [31:0] pci_data_table1,
  output logic [31:0] pci_data_table2,
  output logic [31:0] pci_data_table3,
  output logic [31:0] mult0_op0,
  output logic [31:0] mult0_op1,
  output logic [31:0] mult1_op0,
  output logic [31:0] mult1_op1,
  output logic [63:0] mult0_res,
  output logic [63:0] mult1_res
);
  // decode and hash
  logic [95:0] header;
  logic        hdr_valid, lookup;
  logic [11:0] mask, h0, h1, h2, h3;

  decoder u_dec (
    .clk, .reset, .data_i, .valid_i, .be_i,
    .packet_header(header), .packet_valid(hdr_valid), .packet_ignore
  );

  assign mask = hash_mask(sensor_count);
  hashers u_hash (.clk, .header, .mask, .idx0(h0), .idx1(h1), .idx2(h2), .idx3(h3));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      lookup <= 1'b0;
      last_hash0 <= '0; last_hash1 <= '0; last_hash2 <= '0; last_hash3 <= '0;
    end else begin
      lookup <= hdr_valid & ~no_routing;
      if (lookup) begin
        last_hash0 <= h0; last_hash1 <= h1; last_hash2 <= h2; last_hash3 <= h3;
      end
    end
  end

  // hash tables and flow control
  logic [5:0]  sensor_idx, fc_idx;
  logic        load_idx, fc_valid, fc_ack;
  logic [1:0]  ht_cmd, fr_cmd;
  logic [9:0]  ht_addr, fr_addr;
  logic [15:0] ht_data, fr_data;
  logic        ht_load, fr_load;
  logic [47:0] lu_mac;
  logic        lu_valid;
  logic        ht_busy;

  assign ht_busy = fr_load | perfmon_full;

  hash_table u_ht (
    .clk, .reset, .init_start, .init_done, .sensor_count, .pulse, .threshold,
    .buckets(bucket_count), .random_val, .lb_mode,
    .move_bkt(move), .promote_bkt(promote), .demote_bkt(demote),
    .route_l0, .route_l1, .route_l2, .route_l3, .route_l4,
    .hash0(h0), .hash1(h1), .hash2(h2), .hash3(h3), .bkt_mask(mask), .lookup,
    .sensor_idx, .load_idx, .fc_idx, .fc_val(fc_valid), .fc_ack,
    .perfmon_cmd(ht_cmd), .perfmon_addr(ht_addr), .perfmon_data(ht_data),
    .perfmon_load(ht_load), .perfmon_busy(ht_busy),
    .pci_clk, .pci_addr, .pci_data0(pci_data_table0), .pci_data1(pci_data_table1),
    .pci_data2(pci_data_table2), .pci_data3(pci_data_table3),
    .mult0_op0, .mult0_op1, .mult0_res, .mult1_op0, .mult1_op1, .mult1_res
  );

  // sensor replies are accepted after the initialization request and
  // before the hash tables are configured (init_start)
  fc_rcv u_fc (
    .clk, .reset, .data_f, .valid_f, .accept_reply(~init_start & ~init_done),
    .sensor_count, .fc_idx, .fc_valid, .fc_ack,
    .lu_idx(sensor_idx), .lu_mac, .lu_valid,
    .perfmon_cmd(fr_cmd), .perfmon_addr(fr_addr), .perfmon_data(fr_data), .perfmon_load(fr_load)
  );

  // new destination address, one cycle after the sensor index
  logic load_d;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      load_d <= 1'b0; mac_load <= 1'b0; mac_addr <= '0;
    end else begin
      load_d   <= load_idx;
      mac_load <= load_d & lu_valid;
      if (load_d) mac_addr <= lu_mac;
    end
  end

  // frame length of each frame
  logic [13:0] flen;
  logic        fdone, valid_d;
  byte_cntr u_bc (.clk, .reset_l(~reset), .valid(valid_i), .be(be_i), .count(flen), .done(fdone));

  // pending flow control acknowledgement and frame record
  logic       ack_pend, idx_ok, len_ok;
  logic [5:0] ack_idx, frm_idx;
  logic [13:0] frm_len;
  logic       grant_ack, grant_frm;

  assign grant_ack = ack_pend && !fr_load && !ht_load && !perfmon_full;
  assign grant_frm = idx_ok && len_ok && !grant_ack && !fr_load && !ht_load && !perfmon_full;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      valid_d <= 1'b0; ack_pend <= 1'b0; ack_idx <= '0; idx_ok <= 1'b0; len_ok <= 1'b0;
      frm_idx <= '0; frm_len <= '0;
      perfmon_cmd <= PM_NOP; perfmon_addr <= '0; perfmon_data <= '0; perfmon_load <= 1'b0;
    end else begin
      valid_d <= valid_i;
      if (fc_ack) begin ack_pend <= 1'b1; ack_idx <= fc_idx; end
      else if (grant_ack) ack_pend <= 1'b0;
      // a new frame discards a length whose index never came
      if (valid_i && !valid_d) len_ok <= 1'b0;
      if (fdone) begin len_ok <= 1'b1; frm_len <= flen; end
      if (load_d && lu_valid) begin idx_ok <= 1'b1; frm_idx <= sensor_idx; end
      if (grant_frm) begin idx_ok <= 1'b0; len_ok <= 1'b0; end

      perfmon_load <= fr_load | ht_load | grant_ack | grant_frm;
      if (fr_load) begin
        perfmon_cmd <= fr_cmd; perfmon_addr <= fr_addr; perfmon_data <= fr_data;
      end else if (ht_load) begin
        perfmon_cmd <= ht_cmd; perfmon_addr <= ht_addr; perfmon_data <= ht_data;
      end else if (grant_ack) begin
        perfmon_cmd <= PM_ADD32; perfmon_addr <= {ack_idx, PM_HW_FC}; perfmon_data <= 16'd1;
      end else if (grant_frm) begin
        perfmon_cmd <= PM_ADD64; perfmon_addr <= {frm_idx, PM_HW_BYTES}; perfmon_data <= {2'b00, frm_len};
      end
    end
  end
endmodule
