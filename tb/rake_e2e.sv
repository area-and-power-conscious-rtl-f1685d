// rake_e2e: end-to-end stimulus and checking harness for rake_receiver,
// used by the end-to-end testbenches. It instantiates the receiver with all
// parameters at their defaults (4 fingers, 38400 chips per 10 ms frame,
// 8 samples per chip, 2 x 9600-word symbol SRAM); only the channel set-up
// (spreading factor, code, number of frames, error limit) is a parameter
// of the harness. DONE rises when all checks have been made; CHECKS and
// FAILURES are then final. The clock is generated inside.
//
// Transmitter and channel model (written here, independent of the RTL):
// downlink scrambling code 0 (Gold sequence from the x / y m-sequences,
// Q branch 131072 chips later), OVSF codes from the code tree, a DPCH with
// QPSK data at SF (code CODE_K, amplitude 2) and the CPICH (C(256,0), symbol
// 1+j, amplitude 1). Four paths with delays in 1/8 chip, phase rotations of
// 0/90/180/270 degrees and rectangular chip pulses are added and clipped
// to 6 bits. The finger time offsets are chosen so that:
//   finger 0: path 10 samples before the frame sync, offset 0: its late
//             sample falls in the next chip, the tracker asks for LEAD,
//             the offset would become -1, TIMEOFF_FAIL (recover) each frame;
//   finger 1: offset one sample late: one LEAD, then balanced;
//   finger 2: offset one sample early: one LAG, then balanced;
//   finger 3: balanced; its path fades out in frame 3 and returns in frame
//             4, so the finger switches off and on again.
// Checks: the combined symbols written to the SRAM have the signs of the
// transmitted QPSK data (at most one error per SER_DIV symbols; the paths
// interfere with each other, more so at small SF), every SRAM frame holds
// 38400/SF symbols at consecutive addresses, SRAM read-back matches,
// frequency and power reports come once per frame with a plausible value,
// and each mechanism occurs at least once: dump modes NORMAL_FAST and FAST,
// chip clock HOLD, LEAD, LAG, TIMEOFF_FAIL, finger off and on, bank flips.
module rake_e2e
  import rake_pkg::*;
#(
  parameter int SF      = 16,   // DPCH spreading factor
  parameter int CODE_K  = 5,    // DPCH OVSF code number
  parameter int NFRAME  = 7,    // frames simulated
  parameter int SER_DIV = 200   // symbol errors allowed: one per SER_DIV symbols
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NF     = 4;
  localparam int CHIPS  = 38400;
  localparam int FL     = CHIPS * 8;
  localparam int NSYM   = CHIPS / SF;
  localparam int QOFS   = 131072;

  logic clk = 1'b0, rst_n = 1'b0, sync_10m = 1'b1, start_user = 1'b0, recover = 1'b1;
  sample_t adc = '0;
  logic finger_lock [NF];
  logic [TOFF_W-1:0] timeoff_sc [NF];
  logic rd_bank = 1'b0;
  logic [13:0] rd_addr = '0;
  logic finger_on [NF], timeoff_fail [NF], freq_est_av [NF], power_av [NF], chipx1_hold [NF];
  logic signed [FREQ_W-1:0] freq_est_cos [NF], freq_est_sin [NF];
  logic [POW_W-1:0] power [NF];
  logic [MAG_W-1:0] mag [NF];
  lead_lag_e lead_lag [NF];
  logic [TOFF_W-1:0] f_cnt [NF];
  logic [1:0] dump_mode;
  logic sym_wr, sym_wr_bank;
  logic [13:0] sym_wr_addr;
  comb_sym_t sym_wr_data, rd_data;
  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  rake_receiver dut (
    .clk, .rst_n, .adc, .sync_10m, .start_user, .finger_lock, .timeoff_sc,
    .timeoff_fail_recover(recover), .sf_ref(SF_W'(SF)), .dpch_code_k(SF_W'(CODE_K)),
    .x_seed_d(18'h1), .x_seed_p(18'h1), .time_trk_th(18'd150), .off_th(MAG_W'(4)), .on_th(MAG_W'(7)),
    .finger_on, .timeoff_fail, .freq_est_cos, .freq_est_sin, .freq_est_av, .power, .power_av,
    .mag, .lead_lag, .chipx1_hold, .f_cnt, .dump_mode,
    .sym_wr, .sym_wr_bank, .sym_wr_addr, .sym_wr_data, .rd_bank, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  // ---------------- transmitter and channel model ----------------
  bit xs [CHIPS + QOFS + 32];
  bit ys [CHIPS + QOFS + 32];
  bit scr_i [CHIPS], scr_q [CHIPS];
  int ovsf_tab [SF];
  int path_delay [NF] = '{-10, 3, 21, 60};
  int path_rot   [NF] = '{0, 1, 2, 3};
  int finger_off [NF] = '{0, 13, 24, 66};

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

  function automatic bit path_on(input int p, input int fr);
    return !(p == 3 && fr == 3);
  endfunction

  // received sample at absolute sample index n (frame 0 starts at n = 0)
  function automatic sample_t rx(input int n);
    int re = 0, im = 0;
    sample_t o;
    for (int p = 0; p < NF; p++) begin
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

  // ---------------- stimulus ----------------
  int cyc = 0, n_abs = -1000000, cur_frame = -1;
  initial begin
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
    for (int f = 0; f < NF; f++) begin
      finger_lock[f] = 1'b1;
      timeoff_sc[f]  = TOFF_W'(finger_off[f]);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start_user = 1'b1;
    forever begin
      // frame sync: active low for one cycle; the receiver's frame counter
      // is 0 two cycles later, which is sample 0 of the frame
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

  // ---------------- monitors ----------------
  int n_nf = 0, n_fast = 0, n_hold = 0, n_lead = 0, n_lag = 0, n_fail = 0, n_on = 0, n_off = 0;
  int n_flip = 0, n_freq = 0, n_pow = 0, n_err = 0, n_sym = 0, n_align = 0;
  int wr_bank = -1, wr_tx_frame = 0, wr_next = 0, sram_frames = 0;
  int frame_syms [16];
  comb_sym_t saved [2][NSYM];
  logic [1:0] dm_d = '0;
  bit hold_d [NF], on_d [NF];

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (dump_mode == 2'd1 && dm_d != 2'd1) n_nf++;
      if (dump_mode == 2'd2 && dm_d != 2'd2) n_fast++;
      dm_d = dump_mode;
      for (int f = 0; f < NF; f++) begin
        if (chipx1_hold[f] && !hold_d[f]) n_hold++;
        hold_d[f] = chipx1_hold[f];
        if (finger_on[f] && !on_d[f]) n_on++;
        if (!finger_on[f] && on_d[f]) begin
          n_off++;
          $display("finger %0d off in frame %0d", f, cur_frame);
        end
        on_d[f] = finger_on[f];
        if (timeoff_fail[f]) n_fail++;
        // the tracker's decision is sampled once per frame
        if (int'(f_cnt[f]) == 1000 && cur_frame >= 1) begin
          if (lead_lag[f] == LL_LEAD) n_lead++;
          if (lead_lag[f] == LL_LAG) n_lag++;
        end
        if (freq_est_av[f]) begin
          n_freq++;
          checks++;
          if (cur_frame >= 2 && (freq_est_cos[f] <= 0 || 8 * (freq_est_sin[f] < 0 ? -freq_est_sin[f] : freq_est_sin[f]) > freq_est_cos[f])) begin
            if (!(f == 3 && (cur_frame == 4 || cur_frame == 5))) begin
              failures++;
              $display("FAIL finger %0d frequency report cos %0d sin %0d (no offset sent)", f,
                       freq_est_cos[f], freq_est_sin[f]);
            end
          end
        end
        if (power_av[f]) n_pow++;
      end
      if (sym_wr) begin
        int di, dq;
        if (int'(sym_wr_bank) != wr_bank) begin
          if (wr_bank >= 0) begin
            n_flip++;
            frame_syms[sram_frames] = wr_next;
            sram_frames++;
          end
          wr_bank = int'(sym_wr_bank);
          wr_tx_frame = cur_frame;
          wr_next = 0;
        end
        checks++;
        if (int'(sym_wr_addr) != wr_next) begin
          failures++;
          n_align++;
          $display("FAIL SRAM address %0d expected %0d", sym_wr_addr, wr_next);
        end
        wr_next = int'(sym_wr_addr) + 1;
        saved[sym_wr_bank][sym_wr_addr] = sym_wr_data;
        di = dbit(wr_tx_frame, int'(sym_wr_addr), 0) ? -1 : 1;
        dq = dbit(wr_tx_frame, int'(sym_wr_addr), 1) ? -1 : 1;
        n_sym++;
        checks++;
        if (int'($signed(sym_wr_data.i)) * di <= 0 || int'($signed(sym_wr_data.q)) * dq <= 0) begin
          n_err++;
          if (n_err < 10)
            $display("symbol error frame %0d addr %0d data (%0d,%0d) sent (%0d,%0d)", wr_tx_frame,
                     sym_wr_addr, $signed(sym_wr_data.i), $signed(sym_wr_data.q), di, dq);
        end
      end
    end
  end

  task automatic need(input int v, input int lo, input string name);
    checks++;
    if (v < lo) begin
      failures++;
      $display("FAIL mechanism %s seen %0d times, expected at least %0d", name, v, lo);
    end
  endtask

  initial begin
    wait (cur_frame == NFRAME);
    // read back the last complete SRAM frame
    for (int a = 0; a < NSYM; a += 97) begin
      rd_bank = 1'(1 - wr_bank);
      rd_addr = 14'(a);
      @(posedge clk);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== saved[1 - wr_bank][a]) begin
        failures++;
        $display("FAIL SRAM read bank %0d addr %0d", 1 - wr_bank, a);
      end
    end
    for (int k = 0; k < sram_frames; k++) begin
      checks++;
      if (frame_syms[k] != NSYM) begin
        failures++;
        $display("FAIL SRAM frame %0d holds %0d symbols, expected %0d", k, frame_syms[k], NSYM);
      end
    end
    $display("SF %0d: symbols %0d errors %0d, SRAM frames %0d", SF, n_sym, n_err, sram_frames);
    $display("NORMAL_FAST %0d FAST %0d HOLD %0d LEAD %0d LAG %0d TIMEOFF_FAIL %0d on %0d off %0d flips %0d freq %0d power %0d",
             n_nf, n_fast, n_hold, n_lead, n_lag, n_fail, n_on, n_off, n_flip, n_freq, n_pow);
    checks++;
    if (n_err * SER_DIV > n_sym || n_sym == 0) begin
      failures++;
      $display("FAIL SF %0d symbol error rate %0d / %0d above 1/%0d", SF, n_err, n_sym, SER_DIV);
    end
    need(sram_frames, NFRAME - 3, "complete SRAM frames");
    need(n_nf, 1, "dump mode NORMAL_FAST");
    need(n_fast, 1, "dump mode FAST");
    need(n_hold, 1, "chipx1 HOLD");
    need(n_lead, 1, "LEAD");
    need(n_lag, 1, "LAG");
    need(n_fail, 1, "TIMEOFF_FAIL");
    need(n_on, 1, "finger on");
    need(n_off, 1, "finger off");
    need(n_flip, 1, "SRAM bank flip");
    need(n_freq, NF * (NFRAME - 2), "frequency reports");
    need(n_pow, NF * (NFRAME - 2), "power reports");
    done = 1'b1;
  end
endmodule
