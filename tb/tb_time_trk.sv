// Testbench for time_trk: early and late pilot symbols with a chosen power
// imbalance are fed per pilot symbol; the loop filter (proportional gain
// 2^-2, integrator gain 2^-13) is modelled here in integers, and at each
// time request the LEAD / LAG / NONE decision is compared with the model.
// Early stronger must give LEAD, late stronger LAG, balanced NONE.
module tb_time_trk;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, clk_sym_pl = 1'b0, time_req = 1'b0;
  logic [17:0] th = 18'd40;
  sym_t pe = '0, pl = '0;
  lead_lag_e ll;
  int checks = 0, failures = 0;
  int n_lead = 0, n_lag = 0, n_none = 0;

  time_trk dut (.clk, .rst_n, .start_time_trk(start), .clk_sym_pl, .time_req, .time_trk_th(th),
                .p_early(pe), .p_late(pl), .lead_lag(ll));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int magn(input int a, input int b);
    int x, y;
    x = a < 0 ? -a : a;
    y = b < 0 ? -b : b;
    return (x > y) ? x + y / 2 : y + x / 2;
  endfunction

  initial begin
    longint integ = 0, acc = 0, sc;
    int e, bias;
    lead_lag_e exp_ll;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start = 1'b1;
    for (int frame = 0; frame < 9; frame++) begin
      bias = (frame % 3 == 0) ? 20 : (frame % 3 == 1) ? -20 : 0;
      for (int s = 0; s < 150; s++) begin
        pe.i = SYM_W'(60 + bias + int'($urandom % 5) - 2);
        pe.q = SYM_W'(-30 + int'($urandom % 5) - 2);
        pl.i = SYM_W'(60 - bias + int'($urandom % 5) - 2);
        pl.q = SYM_W'(-30 + int'($urandom % 5) - 2);
        e = magn(pe.i, pe.q) - magn(pl.i, pl.q);
        integ += e;
        acc += (longint'(e) <<< 11) + integ;
        clk_sym_pl = 1'b1;
        @(posedge clk);
        #1 clk_sym_pl = 1'b0;
        repeat (2) @(posedge clk);
        #1;
      end
      sc = acc >>> 13;
      exp_ll = (sc > longint'(th)) ? LL_LEAD : (sc < -longint'(th)) ? LL_LAG : LL_NONE;
      time_req = 1'b1;
      @(posedge clk);
      #1 time_req = 1'b0;
      acc = 0;
      checks++;
      if (ll !== exp_ll) begin
        failures++;
        $display("FAIL frame %0d bias %0d decision %s expected %s (acc %0d)", frame, bias, ll.name(),
                 exp_ll.name(), sc);
      end
      if (bias > 0 && exp_ll != LL_LEAD) begin
        failures++;
        $display("FAIL model: early stronger must lead");
      end
      if (bias < 0 && exp_ll != LL_LAG) begin
        failures++;
        $display("FAIL model: late stronger must lag");
      end
      case (ll)
        LL_LEAD: n_lead++;
        LL_LAG:  n_lag++;
        default: n_none++;
      endcase
    end
    checks++;
    if (n_lead == 0 || n_lag == 0 || n_none == 0) begin
      failures++;
      $display("FAIL not all decisions seen: lead %0d lag %0d none %0d", n_lead, n_lag, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
