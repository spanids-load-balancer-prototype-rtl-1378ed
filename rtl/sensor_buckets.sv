// sensor_buckets: per-sensor count of level-0 hash buckets.
//
// A 64 x 12-bit table, zeroed by the controller after reset (64 cycles).
// incr adds one to entry incr_idx (read, then write: two cycles, not
// pipelined; used while the hash tables are initialised). move takes one
// bucket from move_down_idx and gives it to move_up_idx: two read-write
// sequences, each written value also sent to the performance monitor
// (half-word 0 of the sensor's record), stalling while pm_busy is high.
// dump writes every entry to the performance monitor, one per cycle unless
// pm_busy stalls it. Commands arriving while the controller is busy are
// ignored, so users wait for busy to fall. read_val returns the entry of
// read_idx one cycle later. The operations follow the specification; the
// busy output is this design's addition for the caller's handshake.
module sensor_buckets
  import spanids_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [5:0]  incr_idx,
  input  logic        incr,
  input  logic        dump,
  input  logic [5:0]  move_up_idx,
  input  logic [5:0]  move_down_idx,
  input  logic        move,
  input  logic [5:0]  read_idx,
  output logic [11:0] read_val,
  output logic        busy,
  output logic [1:0]  pm_cmd,
  output logic [9:0]  pm_addr,
  output logic [15:0] pm_data,
  output logic        pm_load,
  input  logic        pm_busy
);
  logic [11:0] tab [64];
  typedef enum logic [3:0] {S_CLEAR, S_IDLE, S_INC_RD, S_INC_WR, S_DN_RD, S_DN_WR, S_UP_RD, S_UP_WR, S_DUMP} state_e;
  state_e st;
  logic [5:0]  a, up;
  logic [11:0] v;

  assign busy   = (st != S_IDLE);
  assign pm_cmd = PM_WRITE;

  always_ff @(posedge clk) begin
    case (st)
      S_CLEAR:  tab[a] <= '0;
      S_INC_WR: tab[a] <= v + 1'b1;
      S_DN_WR:  if (!pm_busy) tab[a] <= v - 1'b1;
      S_UP_WR:  if (!pm_busy) tab[a] <= v + 1'b1;
      default: ;
    endcase
  end

  always_comb begin
    pm_load = 1'b0;
    pm_addr = {a, 4'd0};
    pm_data = '0;
    case (st)
      S_DN_WR: begin pm_load = !pm_busy; pm_data = {4'h0, v - 1'b1}; end
      S_UP_WR: begin pm_load = !pm_busy; pm_data = {4'h0, v + 1'b1}; end
      S_DUMP:  begin pm_load = !pm_busy; pm_data = {4'h0, tab[a]}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st <= S_CLEAR; a <= '0; up <= '0; v <= '0; read_val <= '0;
    end else begin
      read_val <= tab[read_idx];
      case (st)
        S_CLEAR: begin a <= a + 1'b1; if (a == 6'd63) st <= S_IDLE; end
        S_IDLE: begin
          if (incr)      begin a <= incr_idx; st <= S_INC_RD; end
          else if (move) begin a <= move_down_idx; up <= move_up_idx; st <= S_DN_RD; end
          else if (dump) begin a <= '0; st <= S_DUMP; end
        end
        S_INC_RD: begin v <= tab[a]; st <= S_INC_WR; end
        S_INC_WR: st <= S_IDLE;
        S_DN_RD:  begin v <= tab[a]; st <= S_DN_WR; end
        S_DN_WR:  if (!pm_busy) begin a <= up; st <= S_UP_RD; end
        S_UP_RD:  begin v <= tab[a]; st <= S_UP_WR; end
        S_UP_WR:  if (!pm_busy) st <= S_IDLE;
        S_DUMP:   if (!pm_busy) begin a <= a + 1'b1; if (a == 6'd63) st <= S_IDLE; end
        default:  st <= S_IDLE;
      endcase
    end
  end
endmodule
