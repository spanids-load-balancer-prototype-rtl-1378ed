// hash_table: the routing hash tables of the load balancer and the
// controllers that use them.
//
// Four tables of 4096 buckets each (bucket_t: destination sensor, 24-bit
// packet count, promote bit, 5-bit timeout) plus a fifth, round-robin
// level. Every table has one logic port (read or write each cycle, read
// data registered) and one read port for PCI in the pci_clk domain
// ({1'b0, count, promote, sensor}, i.e. intensity, promoted, sensor, at
// pci_addr, one pci_clk later). Per table a fixed-priority multiplexer
// gives the port to: initialization, then routing, then the periodic scan
// ("clear"), then feedback.
//
// Initialization (rising init_start): the used buckets (index 0 up to
// bkt_mask) of all four tables get destination sensors
// 0,1,..,sensor_count-1,0,1,.. with count,
// promote and timeout zero; each level-0 assignment increments the
// per-sensor bucket count table, which is then dumped to the performance
// monitor.
// Routing (lookup, after init_done): table 0 is read at hash0; in the next
// cycle the bucket is written back with its count incremented and table 1
// is read at hash1. A bucket that is not promoted ends the walk: its
// sensor goes to sensor_idx with a load_idx pulse, the hot list gets the
// bucket's new count and the packet rate table an increment. A promoted
// bucket at level 3 hands the packet to the round-robin counter (wraps at
// sensor_count). route_lN pulses once per packet for the level used.
// Clear scan (latched pulse, not during feedback): every used bucket of
// every table is read and written back with its count halved and its
// timeout decremented. A promoted bucket whose timeout is already zero is
// re-evaluated (5 extra cycles through lb_policy with its own count and
// sensor): it is demoted (promote bit cleared) unless the heuristic says
// to keep it, in which case it gets a new random timeout. A routing access
// to the table between the scan's read and write restarts that bucket.
// At the end the hot list is cleared and the packet rates are halved.
// Feedback (fc_val, not during a scan): the index is acknowledged, the
// hot list and cold list are locked, and the policy decides between
// moving and promoting: always-move, always-promote, random (random_val
// bit 0), intensity (lb_policy with the sensor's hottest bucket), static
// (nothing). Then for up to `buckets` hot list entries of that sensor the
// bucket is read and rewritten: promoted with a random timeout, or moved
// to the least busy sensor (the second least busy if the first is the
// reporting sensor) with the bucket count table updated for level 0.
// The sensor's hot list is cleared afterwards.
// Structure, priorities and policies follow the specification. This design
// uses one scan controller for the four tables (the original runs four in
// parallel) so that the scan and feedback never compete for the policy
// datapath; the random-policy bit and the choice of target sensor are
// this design's.
module hash_table
  import spanids_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        init_start,
  input  logic        init_done,
  input  logic [6:0]  sensor_count,
  input  logic        pulse,
  input  logic [7:0]  threshold,
  input  logic [3:0]  buckets,
  input  logic [4:0]  random_val,
  input  logic [2:0]  lb_mode,
  output logic        move_bkt,
  output logic        promote_bkt,
  output logic        demote_bkt,
  output logic        route_l0,
  output logic        route_l1,
  output logic        route_l2,
  output logic        route_l3,
  output logic        route_l4,
  input  logic [11:0] hash0,
  input  logic [11:0] hash1,
  input  logic [11:0] hash2,
  input  logic [11:0] hash3,
  input  logic [11:0] bkt_mask,
  input  logic        lookup,
  output logic [5:0]  sensor_idx,
  output logic        load_idx,
  input  logic [5:0]  fc_idx,
  input  logic        fc_val,
  output logic        fc_ack,
  output logic [1:0]  perfmon_cmd,
  output logic [9:0]  perfmon_addr,
  output logic [15:0] perfmon_data,
  output logic        perfmon_load,
  input  logic        perfmon_busy,
  input  logic        pci_clk,
  input  logic [11:0] pci_addr,
  output logic [31:0] pci_data0,
  output logic [31:0] pci_data1,
  output logic [31:0] pci_data2,
  output logic [31:0] pci_data3,
  output logic [31:0] mult0_op0,
  output logic [31:0] mult0_op1,
  output logic [63:0] mult0_res,
  output logic [31:0] mult1_op0,
  output logic [31:0] mult1_op1,
  output logic [63:0] mult1_res
);
  // ------------------------------------------------------------------
  // tables
  // ------------------------------------------------------------------
  bucket_t tbl0 [4096];
  bucket_t tbl1 [4096];
  bucket_t tbl2 [4096];
  bucket_t tbl3 [4096];
  logic [11:0] t_addr [4];
  logic        t_we   [4];
  bucket_t     t_wd   [4];
  bucket_t     t_rd   [4];

  always_ff @(posedge clk) begin
    if (t_we[0]) tbl0[t_addr[0]] <= t_wd[0];
    if (t_we[1]) tbl1[t_addr[1]] <= t_wd[1];
    if (t_we[2]) tbl2[t_addr[2]] <= t_wd[2];
    if (t_we[3]) tbl3[t_addr[3]] <= t_wd[3];
    t_rd[0] <= tbl0[t_addr[0]];
    t_rd[1] <= tbl1[t_addr[1]];
    t_rd[2] <= tbl2[t_addr[2]];
    t_rd[3] <= tbl3[t_addr[3]];
  end

  function automatic logic [31:0] pci_fmt(input bucket_t b);
    return {1'b0, b.count, b.promote, b.sensor};
  endfunction
  always_ff @(posedge pci_clk) begin
    pci_data0 <= pci_fmt(tbl0[pci_addr]);
    pci_data1 <= pci_fmt(tbl1[pci_addr]);
    pci_data2 <= pci_fmt(tbl2[pci_addr]);
    pci_data3 <= pci_fmt(tbl3[pci_addr]);
  end

  // per-controller requests
  logic        i_use;                 // init writes all tables
  logic [11:0] i_addr;
  bucket_t     i_wd;
  logic [3:0]  r_use, r_we, c_use, c_we, f_use, f_we;
  logic [11:0] r_addr [4];
  bucket_t     r_wd   [4];
  logic [11:0] c_addr, f_addr;
  bucket_t     c_wd, f_wd;

  always_comb begin
    for (int t = 0; t < 4; t++) begin
      if (i_use) begin
        t_addr[t] = i_addr;      t_we[t] = 1'b1;     t_wd[t] = i_wd;
      end else if (r_use[t]) begin
        t_addr[t] = r_addr[t];   t_we[t] = r_we[t];  t_wd[t] = r_wd[t];
      end else if (c_use[t]) begin
        t_addr[t] = c_addr;      t_we[t] = c_we[t];  t_wd[t] = c_wd;
      end else begin
        t_addr[t] = f_addr;      t_we[t] = f_we[t] & f_use[t]; t_wd[t] = f_wd;
      end
    end
  end

  // ------------------------------------------------------------------
  // shared tables: bucket counts, packet rates, hot list, policy datapath
  // ------------------------------------------------------------------
  logic        sb_incr, sb_dump, sb_move, sb_busy;
  logic [5:0]  sb_incr_idx, sb_up, sb_down, rd_idx;
  logic [11:0] sb_val;
  logic [23:0] sp_val;
  logic        sp_clear, sp_update, sp_lock;
  logic [5:0]  sp_up;
  logic [5:0]  lo0, lo1, lo2, lo3;
  logic        hl_clear, hl_clear_one, hl_busy, hl_update, hl_lock;
  logic [5:0]  hl_sensor_up, hl_sensor_rd, hl_clear_idx;
  logic [1:0]  hl_level_up, hl_level_rd;
  logic [11:0] hl_bucket_up, hl_bucket_rd;
  logic [23:0] hl_data_up, hl_data_rd;
  logic [3:0]  hl_idx_rd;
  logic        hl_valid_rd;
  logic [23:0] pol_rate;
  logic        hot;

  sensor_buckets u_sb (
    .clk, .reset, .incr_idx(sb_incr_idx), .incr(sb_incr), .dump(sb_dump),
    .move_up_idx(sb_up), .move_down_idx(sb_down), .move(sb_move),
    .read_idx(rd_idx), .read_val(sb_val), .busy(sb_busy),
    .pm_cmd(perfmon_cmd), .pm_addr(perfmon_addr), .pm_data(perfmon_data),
    .pm_load(perfmon_load), .pm_busy(perfmon_busy)
  );

  sensor_packets u_sp (
    .clk, .reset, .sensor_count, .clear(sp_clear), .sensor_up(sp_up), .update(sp_update),
    .lock_lo(sp_lock), .sensor_rd(rd_idx), .data_rd(sp_val),
    .sensor_lo0(lo0), .sensor_lo1(lo1), .sensor_lo2(lo2), .sensor_lo3(lo3)
  );

  hotlist u_hl (
    .clk, .reset, .clear(hl_clear), .clear_one(hl_clear_one), .clear_idx(hl_clear_idx),
    .busy(hl_busy), .sensor_up(hl_sensor_up), .level_up(hl_level_up),
    .bucket_up(hl_bucket_up), .data_up(hl_data_up), .update(hl_update),
    .sensor_rd(hl_sensor_rd), .idx_rd(hl_idx_rd), .valid_rd(hl_valid_rd),
    .level_rd(hl_level_rd), .bucket_rd(hl_bucket_rd), .data_rd(hl_data_rd), .lock(hl_lock)
  );

  lb_policy u_pol (
    .clk, .reset, .rate(pol_rate), .buckets(sb_val), .total(sp_val), .threshold,
    .hot, .mult0_op0, .mult0_op1, .mult0_res, .mult1_op0, .mult1_op1, .mult1_res
  );

  // ------------------------------------------------------------------
  // initialization
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {I_IDLE, I_RUN, I_WAIT, I_DUMP} istate_e;
  istate_e ist;
  logic    init_start_d;
  logic [5:0] i_sensor;

  assign i_use       = (ist == I_RUN) && !sb_busy;
  assign i_wd        = '{timeout: '0, promote: 1'b0, sensor: i_sensor, count: '0};
  assign sb_incr     = i_use;
  assign sb_incr_idx = i_sensor;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ist <= I_IDLE; init_start_d <= 1'b0; i_addr <= '0; i_sensor <= '0; sb_dump <= 1'b0;
    end else begin
      init_start_d <= init_start;
      sb_dump <= 1'b0;
      case (ist)
        I_IDLE: if (init_start && !init_start_d) begin
          ist <= I_RUN; i_addr <= '0; i_sensor <= '0;
        end
        I_RUN: if (i_use) begin
          i_sensor <= (7'(i_sensor) + 7'd1 >= sensor_count) ? 6'd0 : i_sensor + 1'b1;
          if (i_addr == bkt_mask) ist <= I_DUMP;
          else begin i_addr <= i_addr + 1'b1; ist <= I_WAIT; end
        end
        I_WAIT: if (!sb_busy) ist <= I_RUN;
        I_DUMP: if (!sb_busy) begin sb_dump <= 1'b1; ist <= I_IDLE; end
        default: ist <= I_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // routing
  // ------------------------------------------------------------------
  typedef enum logic {R_IDLE, R_LVL} rstate_e;
  rstate_e rst_q;
  logic [11:0] h [4];
  logic [1:0]  lvl;
  logic [5:0]  rr;
  bucket_t     cur;
  logic        route_go;
  assign route_go = lookup && init_done && ist == I_IDLE && rst_q == R_IDLE;
  assign cur = t_rd[lvl];

  always_comb begin
    r_use = '0; r_we = '0;
    for (int t = 0; t < 4; t++) begin
      r_addr[t] = h[t];
      r_wd[t]   = cur;
    end
    if (route_go) begin
      r_use[0] = 1'b1; r_addr[0] = hash0;
    end
    if (rst_q == R_LVL) begin
      r_use[lvl] = 1'b1; r_we[lvl] = 1'b1;
      r_wd[lvl].count = (cur.count == '1) ? cur.count : cur.count + 1'b1;
      if (cur.promote && lvl != 2'd3) r_use[lvl + 2'd1] = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      rst_q <= R_IDLE; lvl <= '0; rr <= '0;
      for (int t = 0; t < 4; t++) h[t] <= '0;
      sensor_idx <= '0; load_idx <= 1'b0;
      {route_l0, route_l1, route_l2, route_l3, route_l4} <= '0;
      hl_update <= 1'b0; hl_sensor_up <= '0; hl_level_up <= '0; hl_bucket_up <= '0; hl_data_up <= '0;
      sp_update <= 1'b0; sp_up <= '0;
    end else begin
      load_idx <= 1'b0; hl_update <= 1'b0; sp_update <= 1'b0;
      {route_l0, route_l1, route_l2, route_l3, route_l4} <= '0;
      if (ist == I_RUN) rr <= '0;
      case (rst_q)
        R_IDLE: if (route_go) begin
          h[0] <= hash0; h[1] <= hash1; h[2] <= hash2; h[3] <= hash3;
          lvl <= '0; rst_q <= R_LVL;
        end
        R_LVL: begin
          if (!cur.promote) begin
            sensor_idx <= cur.sensor; load_idx <= 1'b1; rst_q <= R_IDLE;
            route_l0 <= (lvl == 2'd0); route_l1 <= (lvl == 2'd1);
            route_l2 <= (lvl == 2'd2); route_l3 <= (lvl == 2'd3);
            hl_update <= 1'b1; hl_sensor_up <= cur.sensor; hl_level_up <= lvl;
            hl_bucket_up <= h[lvl];
            hl_data_up <= (cur.count == '1) ? cur.count : cur.count + 1'b1;
            sp_update <= 1'b1; sp_up <= cur.sensor;
          end else if (lvl == 2'd3) begin
            sensor_idx <= rr; load_idx <= 1'b1; rst_q <= R_IDLE; route_l4 <= 1'b1;
            rr <= (7'(rr) + 7'd1 >= sensor_count) ? 6'd0 : rr + 1'b1;
            sp_update <= 1'b1; sp_up <= rr;
          end else begin
            lvl <= lvl + 1'b1;
          end
        end
        default: rst_q <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // periodic scan (clear) and demotion
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {C_IDLE, C_RD, C_CHK, C_EVAL, C_WR, C_DONE} cstate_e;
  typedef enum logic [3:0] {F_IDLE, F_LOCK, F_POL, F_HRD, F_HGET, F_TRD, F_TWR,
                            F_SB, F_SBW, F_NEXT, F_CLR} fstate_e;
  cstate_e cst;
  fstate_e fst;
  logic        pend, c_conf;
  logic [1:0]  ct;
  logic [2:0]  ccnt;
  bucket_t     ce;

  logic demote_dec;
  always_comb begin
    case (lb_mode)
      MODE_INTENSITY: demote_dec = !hot;
      MODE_STATIC:    demote_dec = 1'b0;
      default:        demote_dec = 1'b1;
    endcase
  end

  always_comb begin
    c_use = '0; c_we = '0;
    c_wd  = ce;
    c_wd.count = ce.count >> 1;
    if (ce.promote) begin
      if (ce.timeout != '0) c_wd.timeout = ce.timeout - 1'b1;
      else if (demote_dec) begin c_wd.promote = 1'b0; c_wd.timeout = '0; end
      else c_wd.timeout = random_val;
    end
    if (cst == C_RD && !r_use[ct]) c_use[ct] = 1'b1;
    if (cst == C_WR && !r_use[ct] && !c_conf) begin c_use[ct] = 1'b1; c_we[ct] = 1'b1; end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cst <= C_IDLE; pend <= 1'b0; c_conf <= 1'b0; ct <= '0; c_addr <= '0; ccnt <= '0;
      ce <= '0; demote_bkt <= 1'b0; hl_clear <= 1'b0; sp_clear <= 1'b0;
    end else begin
      demote_bkt <= 1'b0; hl_clear <= 1'b0; sp_clear <= 1'b0;
      if (pulse) pend <= 1'b1;
      if (cst != C_IDLE && cst != C_RD && r_use[ct]) c_conf <= 1'b1;
      case (cst)
        C_IDLE: if (pend && init_done && ist == I_IDLE && fst == F_IDLE) begin
          pend <= 1'b0; ct <= '0; c_addr <= '0; cst <= C_RD;
        end
        C_RD: if (c_use[ct]) begin c_conf <= 1'b0; cst <= C_CHK; end
        C_CHK: begin
          ce <= t_rd[ct];
          ccnt <= '0;
          cst <= (t_rd[ct].promote && t_rd[ct].timeout == '0) ? C_EVAL : C_WR;
        end
        C_EVAL: begin
          ccnt <= ccnt + 1'b1;
          if (ccnt == 3'd4) cst <= C_WR;
        end
        C_WR: begin
          if (c_conf || r_use[ct]) cst <= C_RD;
          else begin
            if (ce.promote && ce.timeout == '0 && demote_dec) demote_bkt <= 1'b1;
            ct <= ct + 1'b1;
            cst <= C_RD;
            if (ct == 2'd3) begin
              if (c_addr == bkt_mask) cst <= C_DONE;
              else c_addr <= c_addr + 1'b1;
            end
          end
        end
        C_DONE: begin hl_clear <= 1'b1; sp_clear <= 1'b1; cst <= C_IDLE; end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // feedback processing
  // ------------------------------------------------------------------
  logic [5:0]  fi;
  logic [2:0]  fcnt;
  logic [3:0]  fidx;
  logic        promote_dec, f_conf;
  logic [1:0]  flvl;
  logic [11:0] fbkt;
  bucket_t     fe;
  logic [5:0]  newsen;
  assign newsen = (lo0 == fi) ? lo1 : lo0;

  // the policy datapath and the per-sensor tables follow the scan when it
  // evaluates a bucket, and the feedback controller otherwise
  assign rd_idx   = (cst != C_IDLE) ? ce.sensor : fi;
  assign pol_rate = (cst != C_IDLE) ? ce.count  : hl_data_rd;

  assign hl_lock      = (fst != F_IDLE);
  assign sp_lock      = (fst != F_IDLE);
  assign hl_sensor_rd = fi;
  assign hl_idx_rd    = fidx;
  assign hl_clear_idx = fi;

  always_comb begin
    f_use = '0; f_we = '0; f_addr = fbkt;
    f_wd  = fe;
    if (promote_dec) begin
      f_wd.promote = 1'b1; f_wd.timeout = random_val;
    end else begin
      f_wd.promote = 1'b0; f_wd.timeout = '0; f_wd.sensor = newsen;
    end
    if (fst == F_TRD && !r_use[flvl]) f_use[flvl] = 1'b1;
    if (fst == F_TWR && !r_use[flvl] && !f_conf) begin f_use[flvl] = 1'b1; f_we[flvl] = 1'b1; end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      fst <= F_IDLE; fi <= '0; fcnt <= '0; fidx <= '0; promote_dec <= 1'b0; f_conf <= 1'b0;
      flvl <= '0; fbkt <= '0; fe <= '0; fc_ack <= 1'b0; move_bkt <= 1'b0; promote_bkt <= 1'b0;
      sb_move <= 1'b0; sb_up <= '0; sb_down <= '0; hl_clear_one <= 1'b0;
    end else begin
      fc_ack <= 1'b0; move_bkt <= 1'b0; promote_bkt <= 1'b0; sb_move <= 1'b0; hl_clear_one <= 1'b0;
      if (fst == F_TWR && r_use[flvl]) f_conf <= 1'b1;
      case (fst)
        F_IDLE: if (fc_val && !fc_ack && init_done && ist == I_IDLE && cst == C_IDLE && !pend) begin
          fc_ack <= 1'b1; fi <= fc_idx; fst <= F_LOCK; fidx <= '0;
        end
        F_LOCK: if (!hl_busy) begin fcnt <= '0; fst <= F_POL; end
        F_POL: begin                       // table reads, then 3 policy stages
          fcnt <= fcnt + 1'b1;
          if (fcnt == 3'd4) begin
            case (lb_mode)
              MODE_MOVE:      promote_dec <= 1'b0;
              MODE_PROMOTE:   promote_dec <= 1'b1;
              MODE_RANDOM:    promote_dec <= random_val[0];
              MODE_INTENSITY: promote_dec <= hot;
              default:        promote_dec <= 1'b0;
            endcase
            fst <= (lb_mode == MODE_STATIC || buckets == '0) ? F_CLR : F_HRD;
          end
        end
        F_HRD:  fst <= F_HGET;
        F_HGET: begin
          flvl <= hl_level_rd; fbkt <= hl_bucket_rd;
          fst <= hl_valid_rd ? F_TRD : F_CLR;
        end
        F_TRD: if (f_use[flvl]) begin f_conf <= 1'b0; fst <= F_TWR; fe <= t_rd[flvl]; end
        F_TWR: begin
          if (f_conf || r_use[flvl]) fst <= F_TRD;
          else begin
            if (promote_dec) begin promote_bkt <= 1'b1; fst <= F_NEXT; end
            else begin
              move_bkt <= 1'b1;
              sb_up <= newsen; sb_down <= t_rd[flvl].sensor;
              fst <= (flvl == 2'd0 && t_rd[flvl].sensor != newsen) ? F_SB : F_NEXT;
            end
          end
        end
        F_SB:   if (!sb_busy) begin sb_move <= 1'b1; fst <= F_SBW; end
        F_SBW:  if (!sb_move && !sb_busy) fst <= F_NEXT;
        F_NEXT: begin
          if (fidx + 4'd1 >= buckets || fidx == 4'd15) fst <= F_CLR;
          else begin fidx <= fidx + 1'b1; fst <= F_HRD; end
        end
        F_CLR:  begin hl_clear_one <= 1'b1; fst <= F_IDLE; end
        default: fst <= F_IDLE;
      endcase
    end
  end
endmodule
