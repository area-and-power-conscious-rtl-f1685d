// Testbench for finger (with the input buffer in front), at full size:
// 38400 chips per frame, 8 samples per chip, DPCH at SF 32 with OVSF code
// 9. The transmitter and channel model here (Gold scrambling code 0, code
// tree OVSF codes, QPSK data, CPICH 1+j) sends one path 40 samples after
// the frame sync with a 90 degree phase rotation, plus from frame 3 on a
// second path (a different delay) that this finger must not follow. The
// finger's offset is set for the centre of the main path's chips.
// Checks:
//   - DATA_AV comes once per DPCH symbol, 256 CHIPX8 cycles apart inside a
//     frame, 1200 per frame (rate of SF 32);
//   - every compensated symbol from the second processed frame on has the sign of
//     the transmitted data (phase removed by the CPICH estimate); with the
//     second path present a symbol error rate below 0.5 % is accepted;
//   - POWER_AV and FREQ_EST_AV once per frame, 307200 cycles apart; the
//     frequency estimate shows no offset (sine sum small against cosine);
//   - the finger switches on at a frame edge and stays on; the tracker
//     reports no lead or lag for a centred path.
module tb_finger;
  import rake_pkg::*;
  localparam int NP     = 2;
  localparam int CHIPS  = 38400;
  localparam int FL     = CHIPS * 8;
  localparam int SF     = 32;
  localparam int CODE_K = 9;
  localparam int NSYM   = CHIPS / SF;
  localparam int NFRAME = 5;
  localparam int QOFS   = 131072;

  logic clk = 1'b0, rst_n = 1'b0, sync_10m = 1'b1, start_user = 1'b0;
  sample_t adc = '0;
  eol_t eol;
  logic reset_sys_n, data_av, finger_on, timeoff_fail, freq_est_av, power_av, chipx1_hold;
  comp_sym_t comp_o;
  logic [SF_W-1:0] sf_frame;
  logic signed [FREQ_W-1:0] freq_est_cos, freq_est_sin;
  logic [MAG_W-1:0] mag;
  logic [POW_W-1:0] power;
  lead_lag_e lead_lag;
  logic [TOFF_W-1:0] f_cnt;
  int checks = 0, failures = 0;

  input_buffer u_buf (.clk, .rst_n, .in_valid(1'b1), .in_s(adc), .eol_o(eol));

  finger dut (
    .clk, .rst_n, .sync_10m, .start_user, .finger_lock(1'b1), .timeoff_fail_recover(1'b1),
    .timeoff_sc(TOFF_W'(46)), .sf_ref(SF_W'(SF)), .dpch_code_k(SF_W'(CODE_K)), .x_seed_d(18'h1),
    .x_seed_p(18'h1), .time_trk_th(18'd150), .off_th(MAG_W'(4)), .on_th(MAG_W'(7)), .eol,
    .reset_sys_n, .comp_o, .data_av, .sf_frame, .finger_on, .timeoff_fail, .freq_est_cos,
    .freq_est_sin, .freq_est_av, .mag, .power, .power_av, .lead_lag, .chipx1_hold, .f_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat ((NFRAME + 2) * FL) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit xs [CHIPS + QOFS + 32];
  bit ys [CHIPS + QOFS + 32];
  bit scr_i [CHIPS], scr_q [CHIPS];
  int ovsf_tab [SF];
  int path_delay [NP] = '{40, 70};
  int path_rot   [NP] = '{1, 0};

  function automatic int tree(input int sff, input int kk, input int j);
    int parent;
    if (sff == 1) return 1;
    parent = tree(sff / 2, kk / 2, j % (sff / 2));
    if ((kk % 2) == 1 && j >= sff / 2) return -parent;
    return parent;
  endfunction

  // transmitted QPSK data bit (0 -> +1) of symbol s in frame fr
  function automatic bit dbit(input int fr, input int s, input int q);
    logic [31:0] h, a, b, c;
    a = 32'(fr + 11);
    b = 32'(s);
    c = 32'(q);
    h = (a * 32'd2654435761) ^ (b * 32'd40503) ^ (c * 32'd2246822519);
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    return h[13];
  endfunction

  // the second path (an interferer for this finger) is present from frame 3
  function automatic bit path_on(input int p, input int fr);
    return (p == 0) || (fr >= 3);
  endfunction

  // received sample at absolute sample index n (frame 0 starts at n = 0)
  function automatic sample_t rx(input int n);
    int re = 0, im = 0;
    sample_t o;
    for (int p = 0; p < NP; p++) begin
      int m, cg, fr, c, s, di, dq, cd, si, sq, pr, pi, t;
      m  = n - path_delay[p] + 4 * FL;
      cg = m / 8 - 4 * CHIPS;
      fr = (cg >= 0) ? cg / CHIPS : -1;
      c  = cg - fr * CHIPS;
      if (path_on(p, fr)) begin
        s  = c / SF;
        di = dbit(fr, s, 0) ? -1 : 1;
        dq = dbit(fr, s, 1) ? -1 : 1;
        cd = ovsf_tab[c % SF];
        si = scr_i[c] ? -1 : 1;
        sq = scr_q[c] ? -1 : 1;
        pr = 2 * cd * (di * si - dq * sq) + (si - sq);
        pi = 2 * cd * (di * sq + dq * si) + (si + sq);
        for (int r = 0; r < path_rot[p]; r++) begin
          t  = pr;
          pr = -pi;
          pi = t;
        end
        re += pr;
        im += pi;
      end
    end
    o.i = SAMPLE_W'((re > 31) ? 31 : (re < -32) ? -32 : re);
    o.q = SAMPLE_W'((im > 31) ? 31 : (im < -32) ? -32 : im);
    return o;
  endfunction


  int cyc = 0, n_abs = -1000000, cur_frame = -1;
  initial begin
    for (int k = 0; k < NFRAME + 2; k++) av_per_frame[k] = 0;
    for (int i = 0; i < 18; i++) begin
      xs[i] = (i == 0);
      ys[i] = 1'b1;
    end
    for (int i = 0; i + 18 < CHIPS + QOFS + 32; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    for (int c = 0; c < CHIPS; c++) begin
      scr_i[c] = xs[c] ^ ys[c];
      scr_q[c] = xs[c+QOFS] ^ ys[c+QOFS];
    end
    for (int j = 0; j < SF; j++) ovsf_tab[j] = tree(SF, CODE_K, j);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start_user = 1'b1;
    forever begin
      sync_10m = !((cyc % FL) == 100);
      if ((cyc % FL) == 102) begin
        cur_frame++;
        n_abs = cur_frame * FL;
      end
      adc = (n_abs >= -FL) ? rx(n_abs) : '0;
      @(posedge clk);
      #1;
      cyc++;
      n_abs++;
    end
  end

  // symbol numbering from the sample counter: DATA_AV follows the chip
  // pulse of a symbol's last chip by a few cycles, and data chip j of
  // frame k is sampled at sample k*307200 + 46 + 8*j (finger offset 46)
  int last_av = -1, n_av = 0, n_err = 0, n_chk = 0;
  int av_per_frame [NFRAME + 2];
  int last_pow = -1, last_freq = -1, n_pow = 0, n_freq = 0, n_ll = 0, n_on = 0;
  bit on_d = 0;
  always @(posedge clk) begin
    #2;
    if (finger_on && !on_d) n_on++;
    if (!finger_on && on_d) begin
      failures++;
      $display("FAIL finger switched off");
    end
    on_d = finger_on;
    if (lead_lag != LL_NONE) n_ll++;
    if (data_av) begin
      int t, fr, sym, di, dq;
      t   = n_abs - 46;
      fr  = t / FL;
      sym = (t % FL) / 8 / SF;
      if (fr >= 0 && fr < NFRAME + 2) av_per_frame[fr]++;
      checks++;
      if (last_av >= 0 && cyc - last_av != 256) begin
        failures++;
        $display("FAIL DATA_AV spacing %0d at frame %0d symbol %0d", cyc - last_av, fr, sym);
      end
      last_av = cyc;
      // the finger starts with frame 1; its first 8 symbols precede the
      // first channel estimate and are passed on uncompensated
      if (fr >= 2) begin
        di = dbit(fr, sym, 0) ? -1 : 1;
        dq = dbit(fr, sym, 1) ? -1 : 1;
        checks++;
        n_chk++;
        if (int'($signed(comp_o.i)) * di <= 0 || int'($signed(comp_o.q)) * dq <= 0) begin
          n_err++;
          if (fr < 3) failures++;
          if (n_err < 10)
            $display("symbol error: frame %0d symbol %0d data (%0d,%0d) sent (%0d,%0d)", fr, sym,
                     $signed(comp_o.i), $signed(comp_o.q), di, dq);
        end
      end
    end
    if (power_av) begin
      n_pow++;
      checks++;
      if (last_pow >= 0 && cyc - last_pow != FL) begin
        failures++;
        $display("FAIL power report spacing %0d", cyc - last_pow);
      end
      last_pow = cyc;
    end
    if (freq_est_av) begin
      n_freq++;
      checks++;
      if ((last_freq >= 0 && cyc - last_freq != FL) ||
          (n_freq > 1 && (freq_est_cos <= 0 || 8 * (freq_est_sin < 0 ? -freq_est_sin : freq_est_sin) > freq_est_cos))) begin
        failures++;
        $display("FAIL frequency report spacing %0d cos %0d sin %0d", cyc - last_freq, freq_est_cos, freq_est_sin);
      end
      last_freq = cyc;
    end
  end

  initial begin
    wait (cur_frame == NFRAME);
    #1;
    $display("checked symbols %0d errors %0d power %0d freq %0d on %0d lead/lag cycles %0d", n_chk, n_err,
             n_pow, n_freq, n_on, n_ll);
    for (int k = 1; k < NFRAME - 1; k++) begin
      checks++;
      if (av_per_frame[k] != NSYM) begin
        failures++;
        $display("FAIL frame %0d: %0d symbols, expected %0d", k, av_per_frame[k], NSYM);
      end
    end
    checks++;
    if (n_chk < (NFRAME - 3) * NSYM || n_pow < NFRAME - 2 || n_freq < NFRAME - 2 || n_on != 1 || n_ll != 0) begin
      failures++;
      $display("FAIL summary counts");
    end
    checks++;
    if (n_err * 200 > n_chk) begin
      failures++;
      $display("FAIL symbol error rate %0d / %0d", n_err, n_chk);
    end
    checks++;
    if (int'(sf_frame) != SF || timeoff_fail) begin
      failures++;
      $display("FAIL SF_FRAME %0d", sf_frame);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
