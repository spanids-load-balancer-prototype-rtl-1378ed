// hotlist: the 16 hottest hash buckets of every sensor.
//
// A 64 x 16 entry memory; an entry holds a valid bit, the hash level (2
// bits, which table the bucket is in), the 12-bit bucket number and its
// 24-bit intensity (packet count). Entry 0 of a sensor is its hottest.
//
// update pushes {sensor, level, bucket, intensity} into a 16-entry command
// FIFO. The controller takes one command at a time and walks the sensor's
// list from entry 0, reading an entry in one cycle and deciding/writing in
// the next (2 cycles per entry, at most 32 per update). A working register
// starts with the new value. While the new value has not been placed, an
// entry with a lower intensity is overwritten by it and the displaced
// entry becomes the working value; from then on every entry is replaced by
// the working value and passes its old content down, so the list shifts.
// An entry holding the same bucket (and level) as the command ends the
// walk after it has been overwritten (or at once if the new value is not
// hotter), which keeps buckets unique. clear (whole list, 1024 cycles) and
// clear_one (the 16 entries of sensor clear_idx) are latched and executed
// when no update is running. lock stops the controller from starting new
// work; busy shows that work is under way, so a reader holding lock may
// use the read port once busy is low. sensor_rd/idx_rd give
// bucket_rd/level_rd/data_rd one cycle later. Behaviour as specified,
// except the level field and clear_one, which this design adds so that the
// feedback controller can address the bucket's table and clear one sensor.
module hotlist (
  input  logic        clk,
  input  logic        reset,
  input  logic        clear,
  input  logic        clear_one,
  input  logic [5:0]  clear_idx,
  output logic        busy,
  input  logic [5:0]  sensor_up,
  input  logic [1:0]  level_up,
  input  logic [11:0] bucket_up,
  input  logic [23:0] data_up,
  input  logic        update,
  input  logic [5:0]  sensor_rd,
  input  logic [3:0]  idx_rd,
  output logic        valid_rd,
  output logic [1:0]  level_rd,
  output logic [11:0] bucket_rd,
  output logic [23:0] data_rd,
  input  logic        lock
);
  typedef struct packed {
    logic        valid;
    logic [1:0]  level;
    logic [11:0] bucket;
    logic [23:0] data;
  } hl_entry_t;

  hl_entry_t mem [1024];
  hl_entry_t rq, work, newv;

  logic [43:0] cmd;
  logic fifo_empty, fifo_full, pop;
  sync_fifo #(.W(44), .AW(4)) u_cmd (
    .clk, .reset, .wr_en(update), .wr_data({sensor_up, level_up, bucket_up, data_up}),
    .rd_en(pop), .rd_data(cmd), .empty(fifo_empty), .full(fifo_full)
  );

  typedef enum logic [2:0] {H_IDLE, H_RD, H_WR, H_CLR_ALL, H_CLR_ONE} state_e;
  state_e st;
  logic [5:0]  sen;
  logic [3:0]  i;
  logic [9:0]  ca;
  logic        placed, clr_all_req, clr_one_req;
  logic [5:0]  clr_one_idx;
  logic        same;

  assign busy = (st != H_IDLE);
  assign same = rq.valid && rq.bucket == newv.bucket && rq.level == newv.level;

  // decision in the write cycle
  logic      wr_en, stop;
  hl_entry_t wr_val;
  always_comb begin
    wr_en  = 1'b0;
    stop   = 1'b0;
    wr_val = work;
    if (!placed) begin
      if (!rq.valid || work.data > rq.data) begin
        wr_en = 1'b1;                   // new value goes here
        stop  = same || !rq.valid;
      end else if (same) begin
        stop  = 1'b1;                   // already listed at least as hot
      end
    end else begin
      wr_en = 1'b1;                     // shift down
      stop  = same || !rq.valid;
    end
  end

  always_ff @(posedge clk) begin
    if (st == H_WR && wr_en)  mem[{sen, i}] <= wr_val;
    if (st == H_CLR_ALL)      mem[ca] <= '0;
    if (st == H_CLR_ONE)      mem[{clr_one_idx, i}] <= '0;
  end

  assign pop = (st == H_WR) && (stop || i == 4'd15);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st <= H_CLR_ALL; ca <= '0; sen <= '0; i <= '0; placed <= 1'b0;
      work <= '0; newv <= '0; rq <= '0; clr_all_req <= 1'b0; clr_one_req <= 1'b0;
      clr_one_idx <= '0;
      valid_rd <= 1'b0; level_rd <= '0; bucket_rd <= '0; data_rd <= '0;
    end else begin
      {valid_rd, level_rd, bucket_rd, data_rd} <= mem[{sensor_rd, idx_rd}];
      if (clear) clr_all_req <= 1'b1;
      if (clear_one) begin clr_one_req <= 1'b1; clr_one_idx <= clear_idx; end
      case (st)
        H_IDLE: if (!lock || clear || clear_one) begin
          if (clr_all_req || clear) begin
            st <= H_CLR_ALL; ca <= '0; clr_all_req <= 1'b0;
          end else if (clr_one_req || clear_one) begin
            st <= H_CLR_ONE; i <= '0; clr_one_req <= 1'b0;
            if (clear_one) clr_one_idx <= clear_idx;
          end else if (!fifo_empty && !lock) begin
            sen  <= cmd[43:38];
            newv <= {1'b1, cmd[37:36], cmd[35:24], cmd[23:0]};
            work <= {1'b1, cmd[37:36], cmd[35:24], cmd[23:0]};
            i <= '0; placed <= 1'b0; st <= H_RD;
          end
        end
        H_RD: begin
          rq <= mem[{sen, i}];
          st <= H_WR;
        end
        H_WR: begin
          if (wr_en) begin
            placed <= 1'b1;
            work   <= rq;
          end
          if (stop || i == 4'd15) st <= H_IDLE;
          else begin i <= i + 1'b1; st <= H_RD; end
        end
        H_CLR_ALL: begin
          ca <= ca + 1'b1;
          if (ca == 10'h3FF) st <= H_IDLE;
        end
        H_CLR_ONE: begin
          i <= i + 1'b1;
          if (i == 4'd15) st <= H_IDLE;
        end
        default: st <= H_IDLE;
      endcase
    end
  end
endmodule
