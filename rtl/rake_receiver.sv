// rake_receiver: four-finger WCDMA downlink rake receiver.
//
// A 6-bit I/Q sample stream at eight samples per chip (CHIPX8, 30.72 MHz)
// enters a three-stage input buffer. Each of N_FINGERS fingers is locked
// to one propagation path by its own 1/8-chip time offset, despreads the
// data (DPCH) and pilot (CPICH) channels at that timing, removes the
// path's phase rotation and frequency offset using the pilot, and emits
// symbols weighted by the path power. The deskew-combiner lines up the
// symbols of all fingers by their number in the frame, adds them
// (maximal ratio combining), and writes one combined symbol per symbol
// period into a two-bank SRAM, one bank per frame, read by the upper
// layer through the read port.
// Per finger the top brings out the interfaces to the cell searcher (lock,
// time offset) and the DSP (frequency-offset sums, power, time-offset
// failure); code numbers and thresholds are shared by all fingers.
// Everything is clocked by CLK; RST_N is the active-low receiver reset.
module rake_receiver
  import rake_pkg::*;
#(
  parameter int unsigned N_FINGERS       = 4,
  parameter int unsigned CHIPS_PER_FRAME = rake_pkg::FRAME_CHIPS,
  parameter int unsigned OSR             = rake_pkg::CHIP_OSR,
  parameter int unsigned BANK_WORDS      = 9600
) (
  input  logic                     clk,                   // CHIPX8
  input  logic                     rst_n,
  input  sample_t                  adc,                   // ADC I/Q sample
  input  logic                     sync_10m,              // frame sync, active low
  input  logic                     start_user,
  input  logic                     finger_lock          [N_FINGERS],
  input  logic [TOFF_W-1:0]        timeoff_sc           [N_FINGERS],
  input  logic                     timeoff_fail_recover,
  input  logic [SF_W-1:0]          sf_ref,
  input  logic [SF_W-1:0]          dpch_code_k,
  input  logic [17:0]              x_seed_d,
  input  logic [17:0]              x_seed_p,
  input  logic [17:0]              time_trk_th,
  input  logic [MAG_W-1:0]         off_th,
  input  logic [MAG_W-1:0]         on_th,
  output logic                     finger_on            [N_FINGERS],
  output logic                     timeoff_fail         [N_FINGERS],
  output logic signed [FREQ_W-1:0] freq_est_cos         [N_FINGERS],
  output logic signed [FREQ_W-1:0] freq_est_sin         [N_FINGERS],
  output logic                     freq_est_av          [N_FINGERS],
  output logic [POW_W-1:0]         power                [N_FINGERS],
  output logic                     power_av             [N_FINGERS],
  // per-finger status for monitoring: symbol magnitude, last time-tracker
  // decision, and the clock generator's chip-clock HOLD indication
  output logic [MAG_W-1:0]         mag                  [N_FINGERS],
  output lead_lag_e                lead_lag             [N_FINGERS],
  output logic                     chipx1_hold          [N_FINGERS],
  output logic [TOFF_W-1:0]        f_cnt                [N_FINGERS],  // finger frame counter
  // deskew-combiner SRAM dump mode: 0 NORMAL, 1 NORMAL_FAST, 2 FAST
  output logic [1:0]               dump_mode,
  // combined symbol stream as written into the SRAM
  output logic                     sym_wr,
  output logic                     sym_wr_bank,
  output logic [13:0]              sym_wr_addr,
  output comb_sym_t                sym_wr_data,
  // SRAM read port for the upper layer
  input  logic                     rd_bank,
  input  logic [13:0]              rd_addr,
  output comb_sym_t                rd_data
);
  eol_t                eol;
  logic                reset_sys_n     [N_FINGERS];
  comp_sym_t           comp_d          [N_FINGERS];
  logic                data_av         [N_FINGERS];
  logic [SF_W-1:0]     sf_frame        [N_FINGERS];
  comp_sym_t           store           [N_FINGERS];
  logic [SYMCNT_W-1:0] symbol_cnt      [N_FINGERS];
  logic                desk_data_av    [N_FINGERS];
  logic                finger_blk_flag [N_FINGERS];
  logic                comb_done       [N_FINGERS];
  logic                main_blk_flag;
  logic                sram_wen;

  input_buffer u_in_buff (.clk, .rst_n, .in_valid(1'b1), .in_s(adc), .eol_o(eol));

  for (genvar f = 0; f < int'(N_FINGERS); f++) begin : g_finger
    finger #(.CHIPS_PER_FRAME(CHIPS_PER_FRAME), .OSR(OSR)) u_finger (
      .clk, .rst_n, .sync_10m, .start_user, .finger_lock(finger_lock[f]),
      .timeoff_fail_recover, .timeoff_sc(timeoff_sc[f]), .sf_ref, .dpch_code_k,
      .x_seed_d, .x_seed_p, .time_trk_th, .off_th, .on_th, .eol,
      .reset_sys_n(reset_sys_n[f]), .comp_o(comp_d[f]), .data_av(data_av[f]),
      .sf_frame(sf_frame[f]), .finger_on(finger_on[f]), .timeoff_fail(timeoff_fail[f]),
      .freq_est_cos(freq_est_cos[f]), .freq_est_sin(freq_est_sin[f]),
      .freq_est_av(freq_est_av[f]), .mag(mag[f]), .power(power[f]), .power_av(power_av[f]),
      .lead_lag(lead_lag[f]), .chipx1_hold(chipx1_hold[f]), .f_cnt(f_cnt[f]));

    data_load #(.CHIPS_PER_FRAME(CHIPS_PER_FRAME)) u_data_load (
      .clk, .rst_n(reset_sys_n[f]), .data_av(data_av[f]), .comb_done(comb_done[f]),
      .finger_on(finger_on[f]), .main_blk_flag, .sf_ref(sf_frame[f]), .finger_d(comp_d[f]),
      .store(store[f]), .symbol_cnt(symbol_cnt[f]), .desk_data_av(desk_data_av[f]),
      .finger_blk_flag(finger_blk_flag[f]));
  end

  deskew_combiner #(.N_FINGERS(N_FINGERS), .REG_LEN(8)) u_deskew (
    .clk, .rst_n, .desk_data_av, .store, .symbol_cnt, .finger_blk_flag, .comb_done,
    .main_blk_flag, .sram_en(sym_wr_bank), .sram_addr(sym_wr_addr), .sram_wen,
    .sram_data(sym_wr_data), .dump_mode_o(dump_mode));

  assign sym_wr = !sram_wen;

  sym_sram #(.BANK_WORDS(BANK_WORDS)) u_sram (
    .clk, .wr_bank(sym_wr_bank), .wr_addr(sym_wr_addr), .wr_en_n(sram_wen),
    .wr_data(sym_wr_data), .rd_bank, .rd_addr, .rd_data);
endmodule
