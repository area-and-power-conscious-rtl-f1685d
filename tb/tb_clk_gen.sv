// Testbench for clk_gen at full size (38400 chips, 8 samples per chip,
// 307200 CHIPX8 cycles per 10 ms frame). A frame sync pulse comes every
// 307200 cycles. At every time request the next entry of a table of
// (TIMEOFF_SC, LEAD_LAG, recover) is applied and the expected offset is
// computed here: a new TIMEOFF_SC is taken directly, otherwise the old
// offset moves +1 (lag) or -1 (lead); out of range gives TIMEOFF_FAIL and
// TIMEOFF_SC (recover) or the old offset. Checked per frame:
//   - the code-initialisation CHIPX1 is at F_CNT = 307192 + offset (mod
//     307200), with FRAME_EDGE_CODE high in that cycle and the one before;
//   - TIME_REQ comes once per frame, 307200 cycles apart;
//   - CHIPX1 pulses are exactly 8 cycles apart inside a frame, there are
//     38400 chip pulses per frame (including the initialisation one), and
//     the gap before the next initialisation pulse is 8 + offset change;
//   - HOLD occurs, TIMEOFF_FAIL pulses exactly when expected;
//   - dropping FINGER_LOCK gives a one-cycle RESET_SYS and stops CHIPX1.
module tb_clk_gen;
  import rake_pkg::*;
  localparam int FL = 38400 * 8;
  localparam int NSET = 9;
  logic clk = 1'b0, rst_n = 1'b0, sync_10m = 1'b1, start_user = 1'b1, finger_lock = 1'b1;
  logic recover = 1'b0;
  logic [TOFF_W-1:0] sc = '0;
  lead_lag_e ll = LL_NONE;
  logic reset_sys_n, chipx1, fe, scg, time_req, tfail, hold;
  logic [TOFF_W-1:0] f_cnt;
  int checks = 0, failures = 0;

  clk_gen dut (.clk, .rst_n, .sync_10m, .start_user, .finger_lock, .timeoff_fail_recover(recover),
               .timeoff_sc(sc), .lead_lag(ll), .reset_sys_n, .chipx1, .frame_edge_code(fe),
               .start_code_gen(scg), .time_req, .timeoff_fail(tfail), .f_cnt_o(f_cnt), .chipx1_hold_o(hold));

  always #5 clk = ~clk;

  initial begin
    repeat ((NSET + 3) * FL) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  int set_sc  [NSET] = '{2, 2, 2, 2, 1, 1, 1, 1, 1};
  int set_ll  [NSET] = '{0, 2, 1, 2, 2, 1, 1, 1, 0};   // 0 none, 1 lead, 2 lag
  int set_rec [NSET] = '{0, 0, 0, 0, 0, 0, 0, 1, 0};
  int exp_off [NSET];
  bit exp_fail [NSET];

  initial begin
    int prev_off = 0, prev_sc = -1, calc;
    int nreq = 0, ninit = 0, last_req = -1, last_chip = -1, last_init = -1, chips = 0;
    int nfail = 0, nhold = 0, exp_nfail = 0, cyc = 0, fe_prev = 0;
    bit hold_d = 0;
    // expected offsets
    foreach (set_sc[k]) begin
      if (set_sc[k] != prev_sc) calc = set_sc[k];
      else calc = prev_off + (set_ll[k] == 2 ? 1 : set_ll[k] == 1 ? -1 : 0);
      exp_fail[k] = (calc < 0 || calc >= FL);
      if (exp_fail[k]) calc = set_rec[k] ? set_sc[k] : prev_off;
      exp_off[k] = calc;
      exp_nfail += int'(exp_fail[k]);
      prev_off = calc;
      prev_sc = set_sc[k];
    end
    sc = TOFF_W'(set_sc[0]);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (ninit < NSET) begin
      sync_10m = !((cyc % FL) == 50);
      @(posedge clk);
      #1;
      cyc++;
      if (time_req) begin
        check(last_req < 0 || cyc - last_req == FL, $sformatf("time request spacing %0d", cyc - last_req));
        last_req = cyc;
        if (nreq < NSET) begin
          sc      = TOFF_W'(set_sc[nreq]);
          ll      = lead_lag_e'(set_ll[nreq]);
          recover = set_rec[nreq][0];
        end
        nreq++;
      end
      if (tfail) nfail++;
      if (hold && !hold_d) nhold++;
      hold_d = hold;
      if (chipx1) begin
        if (fe) begin
          int want;
          want = (FL - 8 + exp_off[ninit]) % FL;
          check(int'(f_cnt) == want, $sformatf("frame %0d: init CHIPX1 at F_CNT %0d expected %0d",
                                               ninit, f_cnt, want));
          check(fe_prev == 1, "FRAME_EDGE_CODE not high in the cycle before the init CHIPX1");
          check(scg == 1'b1, "START_CODE_GEN not set");
          if (last_init >= 0) begin
            check(chips == 38400, $sformatf("frame %0d: %0d chip pulses, expected 38400", ninit, chips));
            check(cyc - last_chip == 8 + exp_off[ninit] - exp_off[ninit-1],
                  $sformatf("gap before init chip %0d", cyc - last_chip));
          end
          last_init = cyc;
          chips = 1;
          ninit++;
        end else begin
          check(last_chip >= 0 && cyc - last_chip == 8, $sformatf("chip spacing %0d", cyc - last_chip));
          chips++;
        end
        last_chip = cyc;
      end
      fe_prev = int'(fe);
    end
    check(nfail == exp_nfail && exp_nfail == 2, $sformatf("TIMEOFF_FAIL pulses %0d expected %0d", nfail, exp_nfail));
    check(nhold >= NSET - 1, $sformatf("HOLD entered %0d times", nhold));
    // dropping the lock: one-cycle RESET_SYS, no more CHIPX1
    finger_lock = 1'b0;
    begin
      int nlow = 0, nchip = 0;
      for (int k = 0; k < 100; k++) begin
        @(posedge clk);
        #1;
        nlow += int'(!reset_sys_n);
        nchip += int'(chipx1);
      end
      check(nlow == 1 && nchip == 0, $sformatf("after lock loss: reset cycles %0d chips %0d", nlow, nchip));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
