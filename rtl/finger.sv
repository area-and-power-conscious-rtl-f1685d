// finger: one rake finger.
//
// A finger follows one propagation path. Its clock generator turns the
// frame sync, the path's time offset and the time tracker's verdict into
// the finger's own chip-rate enable, so that the on-time sample of the
// shared input buffer falls on the path's chip peak; the early and late
// samples lie 1/8 chip either side. Per frame:
//   codes      - one OVSF and one scrambling generator each for the data
//                channel (DPCH) and the pilot channel (CPICH, C(256,0)).
//   despread   - four despreaders: DPCH on-time and CPICH early, on-time
//                and late, 9-bit symbols.
//   estimate   - the on-time pilot symbols are averaged over 4 symbols and
//                feed the channel/frequency-offset estimator (cos, -sin),
//                the frequency-offset estimator (per-frame sums for the
//                DSP) and the power estimator (MAG per pilot symbol, POWER
//                per frame).
//   compensate - DPCH symbols times the CF estimate: phase and frequency
//                offset removed, weighted by path power (15 bits).
//   track      - early/late pilot power difference through a loop filter;
//                LEAD/LAG once a frame back to the clock generator.
//   decide     - MAG against ON_TH/OFF_TH switches the finger on or off.
// The composition follows the receiver's finger. All blocks run on CHIPX8
// with CHIPX1 as an enable.
module finger
  import rake_pkg::*;
#(
  parameter int unsigned CHIPS_PER_FRAME = rake_pkg::FRAME_CHIPS,
  parameter int unsigned OSR             = rake_pkg::CHIP_OSR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sync_10m,
  input  logic                     start_user,
  input  logic                     finger_lock,
  input  logic                     timeoff_fail_recover,
  input  logic [TOFF_W-1:0]        timeoff_sc,
  input  logic [SF_W-1:0]          sf_ref,        // DPCH spreading factor
  input  logic [SF_W-1:0]          dpch_code_k,   // DPCH OVSF code number
  input  logic [17:0]              x_seed_d,      // DPCH scrambling x seed
  input  logic [17:0]              x_seed_p,      // CPICH scrambling x seed
  input  logic [17:0]              time_trk_th,
  input  logic [MAG_W-1:0]         off_th,
  input  logic [MAG_W-1:0]         on_th,
  input  eol_t                     eol,           // input buffer samples
  output logic                     reset_sys_n,
  output comp_sym_t                comp_o,
  output logic                     data_av,
  output logic [SF_W-1:0]          sf_frame,
  output logic                     finger_on,
  output logic                     timeoff_fail,
  output logic signed [FREQ_W-1:0] freq_est_cos,
  output logic signed [FREQ_W-1:0] freq_est_sin,
  output logic                     freq_est_av,
  output logic [MAG_W-1:0]         mag,
  output logic [POW_W-1:0]         power,
  output logic                     power_av,
  output lead_lag_e                lead_lag,
  output logic                     chipx1_hold,
  output logic [TOFF_W-1:0]        f_cnt        // frame counter (monitoring)
);
  localparam int unsigned PL_PER_FRAME = CHIPS_PER_FRAME / CPICH_SF;

  logic chipx1, frame_edge_code, start_code_gen, time_req;
  logic clk_sym, clk_sym_pl, chipx_pl, start_demod, start_comp, start_avg;
  logic sd_i, sd_q, sp_i, sp_q, c_d, c_p;
  logic mag_av;
  sym_t d_dpch, p_on, p_early, p_late, p_avg;
  logic signed [SYM_W-1:0] cf_cos, cf_sin;
  logic cf_valid;

  clk_gen #(.CHIPS_PER_FRAME(CHIPS_PER_FRAME), .OSR(OSR)) u_clk_gen (
    .clk, .rst_n, .sync_10m, .start_user, .finger_lock, .timeoff_fail_recover,
    .timeoff_sc, .lead_lag, .reset_sys_n, .chipx1, .frame_edge_code, .start_code_gen,
    .time_req, .timeoff_fail, .f_cnt_o(f_cnt), .chipx1_hold_o(chipx1_hold));

  ctrl_gen u_ctrl_gen (
    .clk, .rst_n(reset_sys_n), .start_code_gen, .frame_edge_code, .chipx1,
    .sf_ref, .sf_pl_ref(SF_W'(CPICH_SF)), .sf_frame, .clk_sym, .clk_sym_pl, .chipx_pl,
    .start_demod, .start_comp, .start_avg);

  ovsf_gen u_ovsf_d (.clk, .rst_n(reset_sys_n), .chipx1, .frame_edge_code, .start_code_gen,
                     .sf(sf_ref), .code_k(dpch_code_k), .c(c_d));
  ovsf_gen u_ovsf_p (.clk, .rst_n(reset_sys_n), .chipx1, .frame_edge_code, .start_code_gen,
                     .sf(SF_W'(CPICH_SF)), .code_k('0), .c(c_p));
  scrambling_gen u_scr_d (.clk, .rst_n(reset_sys_n), .chipx1, .frame_edge_code, .start_code_gen,
                          .x_seed(x_seed_d), .s_i(sd_i), .s_q(sd_q));
  scrambling_gen u_scr_p (.clk, .rst_n(reset_sys_n), .chipx1, .frame_edge_code, .start_code_gen,
                          .x_seed(x_seed_p), .s_i(sp_i), .s_q(sp_q));

  demod u_dem_dpch (.clk, .rst_n(reset_sys_n), .start_demod, .frame_edge_code, .chipx1,
                    .sf_ref, .r(eol.ontime), .s_i(sd_i), .s_q(sd_q), .c(c_d), .demod_o(d_dpch));
  demod u_dem_pon  (.clk, .rst_n(reset_sys_n), .start_demod, .frame_edge_code, .chipx1,
                    .sf_ref(SF_W'(CPICH_SF)), .r(eol.ontime), .s_i(sp_i), .s_q(sp_q), .c(c_p),
                    .demod_o(p_on));
  demod u_dem_pe   (.clk, .rst_n(reset_sys_n), .start_demod, .frame_edge_code, .chipx1,
                    .sf_ref(SF_W'(CPICH_SF)), .r(eol.early), .s_i(sp_i), .s_q(sp_q), .c(c_p),
                    .demod_o(p_early));
  demod u_dem_pl   (.clk, .rst_n(reset_sys_n), .start_demod, .frame_edge_code, .chipx1,
                    .sf_ref(SF_W'(CPICH_SF)), .r(eol.late), .s_i(sp_i), .s_q(sp_q), .c(c_p),
                    .demod_o(p_late));

  mv_avg u_avg (.clk, .rst_n(reset_sys_n), .start_avg, .clk_sym_pl, .p_demod(p_on), .mv_avg_o(p_avg));

  cf_est u_cf_est (.clk, .rst_n(reset_sys_n), .chipx_pl, .mv_avg(p_avg),
                   .cf_est_cos(cf_cos), .cf_est_sin(cf_sin), .cf_valid);

  comp u_comp (.clk, .rst_n(reset_sys_n), .start_comp, .clk_sym, .demod(d_dpch),
               .cf_est_cos(cf_cos), .cf_est_sin(cf_sin), .cf_valid, .comp_o, .data_av);

  freq_est #(.SYMS_PER_FRAME(PL_PER_FRAME)) u_freq_est (
    .clk, .rst_n(reset_sys_n), .chipx_pl, .mv_avg(p_avg),
    .freq_est_cos, .freq_est_sin, .freq_est_av);

  pow_est #(.SYMS_PER_FRAME(PL_PER_FRAME)) u_pow_est (
    .clk, .rst_n(reset_sys_n), .chipx_pl, .mv_avg(p_avg), .mag, .mag_av, .power, .power_av);

  time_trk u_time_trk (.clk, .rst_n(reset_sys_n), .start_time_trk(start_avg), .clk_sym_pl,
                       .time_req, .time_trk_th, .p_early, .p_late, .lead_lag);

  finger_decision u_dec (.clk, .rst_n(reset_sys_n), .frame_edge_code, .mag_av, .mag,
                         .off_th, .on_th, .finger_on);

endmodule
