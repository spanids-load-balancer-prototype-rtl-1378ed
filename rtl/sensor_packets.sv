// sensor_packets: per-sensor packet rate table and cold list.
//
// A 64 x 24-bit table counts the packets routed to each sensor; since it
// is cleared periodically the counts act as rates. update latches
// sensor_up; the entry is read and written back incremented in the next
// cycle (read-modify-write on the register array), so a new update can be
// accepted every cycle after the first. Counts saturate.
//
// A scan controller reads entries 0..sensor_count-1 round and round (one
// per cycle; a read of the entry that an update is writing in the same
// cycle is skipped) and builds a working cold list: four entries sorted by
// rising count, each {sensor, count}, started at all-ones counts. A new
// value is inserted in front of the first entry whose count is greater or
// equal, shifting the rest down. At the end of a scan the working list is
// copied to sensor_lo0..3 (lo0 least busy) unless lock_lo is high. clear
// (the end of a hash table scan) is remembered in a set/reset flag and
// executed at the end of the current scan: every count is shifted right by
// one bit (64 cycles, updates still counted), so the counts decay like the
// bucket counts and act as rates. After reset the table is zeroed. data_rd
// returns the count of sensor_rd one cycle later. This follows the
// specification; lock_lo is the lock input its text mentions.
module sensor_packets (
  input  logic        clk,
  input  logic        reset,
  input  logic [6:0]  sensor_count,
  input  logic        clear,
  input  logic [5:0]  sensor_up,
  input  logic        update,
  input  logic        lock_lo,
  input  logic [5:0]  sensor_rd,
  output logic [23:0] data_rd,
  output logic [5:0]  sensor_lo0,
  output logic [5:0]  sensor_lo1,
  output logic [5:0]  sensor_lo2,
  output logic [5:0]  sensor_lo3
);
  logic [23:0] tab [64];
  logic [5:0]  up_idx;
  logic        up_pend;
  logic        clr_req, clearing, halving;
  logic [5:0]  addr;
  logic [5:0]  w_id  [4];
  logic [23:0] w_val [4];

  logic [5:0] last;
  assign last = (sensor_count == 7'd0) ? 6'd0 : 6'(sensor_count - 7'd1);

  // insertion position of the value scanned this cycle
  logic [23:0] sv;
  logic        svalid;
  logic [2:0]  pos;
  assign sv     = tab[addr];
  assign svalid = !clearing && !(up_pend && up_idx == addr);
  always_comb begin
    pos = 3'd4;
    for (int i = 3; i >= 0; i--) if (sv <= w_val[i]) pos = 3'(i);
  end

  // one pass rewrites entry addr (zero after reset, halved after clear);
  // an update of another entry is applied in the same cycle
  logic [23:0] pass_val;
  always_comb begin
    pass_val = halving ? (tab[addr] >> 1) : '0;
    if (up_pend && up_idx == addr && halving) pass_val = pass_val + 1'b1;
  end
  always_ff @(posedge clk) begin
    if (up_pend && tab[up_idx] != '1 && !(clearing && up_idx == addr))
      tab[up_idx] <= tab[up_idx] + 1'b1;
    if (clearing) tab[addr] <= pass_val;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      up_pend <= 1'b0; up_idx <= '0; clr_req <= 1'b0; clearing <= 1'b1; halving <= 1'b0; addr <= '0;
      data_rd <= '0;
      {sensor_lo0, sensor_lo1, sensor_lo2, sensor_lo3} <= '0;
      for (int i = 0; i < 4; i++) begin w_id[i] <= '0; w_val[i] <= '1; end
    end else begin
      data_rd <= tab[sensor_rd];
      up_pend <= update;
      if (update) up_idx <= sensor_up;
      if (clear) clr_req <= 1'b1;

      if (clearing) begin
        addr <= addr + 1'b1;
        if (addr == 6'd63) begin clearing <= 1'b0; halving <= 1'b0; addr <= '0; end
      end else begin
        if (svalid && pos != 3'd4) begin
          for (int i = 3; i > 0; i--)
            if (3'(i) > pos) begin w_id[i] <= w_id[i-1]; w_val[i] <= w_val[i-1]; end
          w_id[pos[1:0]]  <= addr;
          w_val[pos[1:0]] <= sv;
        end
        if (addr >= last) begin                 // end of scan
          addr <= '0;
          if (!lock_lo) begin
            // publish, including this cycle's insertion
            sensor_lo0 <= (svalid && pos == 3'd0) ? addr : w_id[0];
            sensor_lo1 <= (svalid && pos == 3'd1) ? addr : (svalid && pos == 3'd0) ? w_id[0] : w_id[1];
            sensor_lo2 <= (svalid && pos == 3'd2) ? addr : (svalid && pos <= 3'd1) ? w_id[1] : w_id[2];
            sensor_lo3 <= (svalid && pos == 3'd3) ? addr : (svalid && pos <= 3'd2) ? w_id[2] : w_id[3];
          end
          for (int i = 0; i < 4; i++) begin w_id[i] <= '0; w_val[i] <= '1; end
          if (clr_req || clear) begin clearing <= 1'b1; halving <= 1'b1; clr_req <= 1'b0; end
        end else begin
          addr <= addr + 1'b1;
        end
      end
    end
  end
endmodule
