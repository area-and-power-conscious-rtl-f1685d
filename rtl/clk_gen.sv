// clk_gen: per-finger clock generator (CLK_GEN).
//
// Works out where the finger's frame starts and produces the chip-rate
// enable CHIPX1 from the CHIPX8 clock. Six small state machines share the
// work, as in the receiver's clock generator:
//   frame       - F_CNT counts CHIPX8 cycles from each falling edge of the
//                 active-low SYNC_10M (0 .. 8*CHIPS_PER_FRAME-1, wraps).
//   operation   - 15 cycles before the expected next sync (F_CNT = 307185
//                 at default size) it requests the tracking result
//                 (TIME_REQ), loads TIMEOFF_SC / LEAD_LAG / recovery flag,
//                 computes the frame offset and counts it out; CLK_START
//                 then launches CHIPX1.
//   reset       - drives RESET_SYS low for one cycle when START
//                 (= START_USER & FINGER_LOCK) falls.
//   frame edge  - raises FRAME_EDGE_CODE for two cycles around the first
//                 CHIPX1 of a frame and raises START_CODE_GEN on the first
//                 frame after START.
//   chipx1      - one CHIPX1 pulse at CLK_START, then one every 8 cycles.
//   chipx1 count- counts data chips; after CHIPS_PER_FRAME-1 of them it
//                 HOLDs CHIPX1 until the next CLK_START. The CLK_START pulse
//                 takes the slot of the frame's last chip: it is both the
//                 last data chip of the ending frame and the
//                 code-initialisation chip of the next one, so every frame
//                 has exactly CHIPS_PER_FRAME chips and a LEAD / LAG moves
//                 only that one chip by 1/8 chip.
// Offset rule: when TIMEOFF_SC differs from the last one (TRACK_OFF) the
// offset is TIMEOFF_SC, otherwise the previous offset moved by LEAD_LAG
// (lead -1, lag +1). An offset outside 0 .. 8*CHIPS_PER_FRAME-1 is a
// failure: TIMEOFF_FAIL pulses and the offset becomes TIMEOFF_SC if
// TIMEOFF_FAIL_RECOVER is set, else the previous offset.
// Timing: with offset D the first (code-initialisation) CHIPX1 pulse is in
// the cycle where F_CNT = 8*CHIPS_PER_FRAME - 8 + D (mod frame), so the
// first data chip is sampled at F_CNT = D; FRAME_EDGE_CODE rises one cycle
// before that first pulse. This reproduces the example of the receiver's
// clock generator waveform (offset 2 plus lag gives the first CHIPX1 at
// F_CNT = 307195). The exact cycle at which the offset count starts, the
// single-clock enable style and the LEAD_LAG encoding are this design's.
module clk_gen
  import rake_pkg::*;
#(
  parameter int unsigned CHIPS_PER_FRAME = rake_pkg::FRAME_CHIPS,
  parameter int unsigned OSR             = rake_pkg::CHIP_OSR
) (
  input  logic              clk,                  // CHIPX8
  input  logic              rst_n,                // RESET, active low
  input  logic              sync_10m,             // frame sync, active low
  input  logic              start_user,
  input  logic              finger_lock,
  input  logic              timeoff_fail_recover,
  input  logic [TOFF_W-1:0] timeoff_sc,           // 1/8-chip offset from cell searcher
  input  lead_lag_e         lead_lag,             // tracking result
  output logic              reset_sys_n,          // finger reset, active low
  output logic              chipx1,               // chip-rate enable
  output logic              frame_edge_code,
  output logic              start_code_gen,
  output logic              time_req,
  output logic              timeoff_fail,
  output logic [TOFF_W-1:0] f_cnt_o,              // frame counter (observation)
  output logic              chipx1_hold_o         // chipx1 count state is HOLD
);
  localparam int unsigned FRAME_LEN = CHIPS_PER_FRAME * OSR;
  localparam int unsigned REQ_POINT = FRAME_LEN - 15;   // 307185
  localparam int unsigned CALC_END  = FRAME_LEN - 11;   // count starts next cycle
  localparam int unsigned CW        = $clog2(OSR);

  typedef enum logic [1:0] {FR_INITIAL_WAITING_SYNC, FR_SYNC_DETECTED, FR_WAITING_SYNC} frame_st_e;
  typedef enum logic [2:0] {OP_INITIAL, OP_TIMEOFF_REQ, OP_LOAD_TIMEOFF, OP_CALC_TIMEOFF,
                            OP_COUNT_TIMEOFF, OP_CLK_START} op_st_e;
  typedef enum logic {RS_START_DEACTIVATED, RS_START_ACTIVATED} rst_st_e;
  typedef enum logic [1:0] {FE_INITIAL, FE_HOLDING, FE_FRAME_EDGE_RESET} fe_st_e;
  typedef enum logic {C1_INITIAL, C1_FREE_RUN} c1_st_e;
  typedef enum logic [1:0] {CC_INITIAL, CC_FREE_RUN, CC_HOLD} cc_st_e;

  frame_st_e fr_st;
  op_st_e    op_st;
  rst_st_e   rs_st;
  fe_st_e    fe_st;
  c1_st_e    c1_st;
  cc_st_e    cc_st;

  logic              start;
  logic              sync_d, sync_fall;
  logic [TOFF_W-1:0] f_cnt;
  logic [TOFF_W-1:0] toff_cnt, off_r, prev_off, sc_r, prev_sc;
  lead_lag_e         ll_r;
  logic              recover_r, track_off, first_sc;
  logic              reset_sig;
  logic [CW-1:0]     clk_cnt;
  logic [15:0]       chipx1_cnt;
  logic              launch;      // operation state machine leaves COUNT_TIMEOFF
  logic              chipx1_nxt;

  // offset calculation (combinational, used when CALC_TIMEOFF ends)
  logic signed [TOFF_W+1:0] calc;
  logic                     calc_bad;
  logic [TOFF_W-1:0]        new_off;

  assign start     = start_user & finger_lock;
  assign sync_fall = sync_d & ~sync_10m;
  assign launch    = (op_st == OP_COUNT_TIMEOFF) && (toff_cnt == off_r);

  always_comb begin
    if (track_off)               calc = $signed({2'b00, sc_r});
    else if (ll_r == LL_LAG)     calc = $signed({2'b00, prev_off}) + 1;
    else if (ll_r == LL_LEAD)    calc = $signed({2'b00, prev_off}) - 1;
    else                         calc = $signed({2'b00, prev_off});
    calc_bad = (calc < 0) || (calc >= $signed((TOFF_W+2)'(FRAME_LEN)));
    if (!calc_bad)      new_off = TOFF_W'(calc);
    else if (recover_r) new_off = sc_r;
    else                new_off = prev_off;
  end

  // ---------------- frame state machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fr_st  <= FR_INITIAL_WAITING_SYNC;
      f_cnt  <= '0;
      sync_d <= 1'b1;
    end else begin
      sync_d <= sync_10m;
      if (sync_fall) begin
        fr_st <= FR_SYNC_DETECTED;
        f_cnt <= '0;
      end else begin
        if (fr_st != FR_INITIAL_WAITING_SYNC)
          f_cnt <= (f_cnt == TOFF_W'(FRAME_LEN - 1)) ? '0 : f_cnt + 1'b1;
        if (fr_st == FR_SYNC_DETECTED && sync_10m) fr_st <= FR_WAITING_SYNC;
      end
    end
  end

  // ---------------- operation state machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_st        <= OP_INITIAL;
      toff_cnt     <= '0;
      off_r        <= '0;
      prev_off     <= '0;
      sc_r         <= '0;
      prev_sc      <= '0;
      ll_r         <= LL_NONE;
      recover_r    <= 1'b0;
      track_off    <= 1'b1;
      first_sc     <= 1'b1;
      timeoff_fail <= 1'b0;
    end else begin
      timeoff_fail <= 1'b0;
      if (!start) begin
        op_st    <= OP_INITIAL;
        first_sc <= 1'b1;
      end else begin
        unique case (op_st)
          OP_INITIAL:
            if (fr_st != FR_INITIAL_WAITING_SYNC && f_cnt == TOFF_W'(REQ_POINT) && !sync_fall)
              op_st <= OP_TIMEOFF_REQ;
          OP_TIMEOFF_REQ: op_st <= OP_LOAD_TIMEOFF;
          OP_LOAD_TIMEOFF: begin
            toff_cnt  <= '0;
            sc_r      <= timeoff_sc;
            ll_r      <= lead_lag;
            recover_r <= timeoff_fail_recover;
            track_off <= first_sc || (timeoff_sc != prev_sc);
            prev_sc   <= timeoff_sc;
            first_sc  <= 1'b0;
            op_st     <= OP_CALC_TIMEOFF;
          end
          OP_CALC_TIMEOFF:
            if (f_cnt == TOFF_W'(CALC_END)) begin
              off_r        <= new_off;
              prev_off     <= new_off;
              timeoff_fail <= calc_bad;
              toff_cnt     <= '0;
              op_st        <= OP_COUNT_TIMEOFF;
            end
          OP_COUNT_TIMEOFF:
            if (launch) op_st <= OP_CLK_START;
            else        toff_cnt <= toff_cnt + 1'b1;
          OP_CLK_START: op_st <= OP_INITIAL;
          default: op_st <= OP_INITIAL;
        endcase
      end
    end
  end

  assign time_req = (op_st == OP_TIMEOFF_REQ);

  // ---------------- reset state machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs_st     <= RS_START_DEACTIVATED;
      reset_sig <= 1'b1;
    end else begin
      unique case (rs_st)
        RS_START_DEACTIVATED: begin
          reset_sig <= 1'b1;
          if (start) rs_st <= RS_START_ACTIVATED;
        end
        RS_START_ACTIVATED:
          if (!start) begin
            reset_sig <= 1'b0;
            rs_st     <= RS_START_DEACTIVATED;
          end
        default: rs_st <= RS_START_DEACTIVATED;
      endcase
    end
  end

  assign reset_sys_n = rst_n & reset_sig;

  // ---------------- frame edge state machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fe_st           <= FE_INITIAL;
      frame_edge_code <= 1'b0;
      start_code_gen  <= 1'b0;
    end else if (!start) begin
      fe_st           <= FE_INITIAL;
      frame_edge_code <= 1'b0;
      start_code_gen  <= 1'b0;
    end else begin
      unique case (fe_st)
        FE_INITIAL:
          if (launch) begin
            frame_edge_code <= 1'b1;
            start_code_gen  <= 1'b1;
            fe_st           <= FE_HOLDING;
          end
        FE_HOLDING: fe_st <= FE_FRAME_EDGE_RESET;
        FE_FRAME_EDGE_RESET: begin
          frame_edge_code <= 1'b0;
          fe_st           <= FE_INITIAL;
        end
        default: fe_st <= FE_INITIAL;
      endcase
    end
  end

  // ---------------- chipx1 and chipx1 count state machines ----------------
  assign chipx1_nxt = (op_st == OP_CLK_START) ||
                      (c1_st == C1_FREE_RUN && cc_st != CC_HOLD && clk_cnt == CW'(OSR - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || !start) begin
      c1_st      <= C1_INITIAL;
      cc_st      <= CC_INITIAL;
      clk_cnt    <= '0;
      chipx1     <= 1'b0;
      chipx1_cnt <= '1;
    end else begin
      chipx1  <= chipx1_nxt;
      clk_cnt <= (op_st == OP_CLK_START) ? '0 : clk_cnt + 1'b1;
      if (op_st == OP_CLK_START) c1_st <= C1_FREE_RUN;
      if (chipx1_nxt) begin
        if (op_st == OP_CLK_START) begin
          cc_st      <= CC_FREE_RUN;
          chipx1_cnt <= '1;
        end else if (cc_st == CC_FREE_RUN) begin
          chipx1_cnt <= chipx1_cnt + 1'b1;
          if (chipx1_cnt + 1'b1 == 16'(CHIPS_PER_FRAME - 2)) cc_st <= CC_HOLD;
        end
      end
    end
  end

  assign f_cnt_o       = f_cnt;
  assign chipx1_hold_o = (cc_st == CC_HOLD);
endmodule
