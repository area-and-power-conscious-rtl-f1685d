// Testbench for pow_est: random averaged pilot symbols on chipx_pl; mag
// must be max(|I|,|Q|) + min(|I|,|Q|)/2 of the latest symbol, mag_av must
// follow each strobe, and after 150 strobes power must equal the sum of the
// 150 magnitudes with a single power_av pulse.
module tb_pow_est;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chipx_pl = 1'b0;
  sym_t mv = '0;
  logic [MAG_W-1:0] mag;
  logic [POW_W-1:0] power;
  logic mag_av, power_av;
  int checks = 0, failures = 0;

  pow_est dut (.clk, .rst_n, .chipx_pl, .mv_avg(mv), .mag, .mag_av, .power, .power_av);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, m, sum = 0, npow = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3 * 150; n++) begin
      mv.i = SYM_W'($urandom);
      mv.q = SYM_W'($urandom);
      a = int'(mv.i) < 0 ? -int'(mv.i) : int'(mv.i);
      b = int'(mv.q) < 0 ? -int'(mv.q) : int'(mv.q);
      m = (a > b) ? a + b / 2 : b + a / 2;
      sum += m;
      chipx_pl = 1'b1;
      @(posedge clk);
      #1 chipx_pl = 1'b0;
      checks++;
      if (int'(mag) != m || mag_av !== 1'b1) begin
        failures++;
        $display("FAIL n=%0d mag=%0d expected %0d (I=%0d Q=%0d)", n, mag, m, mv.i, mv.q);
      end
      checks++;
      if ((n % 150) == 149) begin
        npow++;
        if (power_av !== 1'b1 || int'(power) != sum) begin
          failures++;
          $display("FAIL power=%0d expected %0d av=%b", power, sum, power_av);
        end
        sum = 0;
      end else if (power_av !== 1'b0) begin
        failures++;
        $display("FAIL power_av at symbol %0d", n);
      end
      repeat (1 + $urandom % 4) @(posedge clk);
      #1;
      checks++;
      if (mag_av !== 1'b0 || power_av !== 1'b0) begin
        failures++;
        $display("FAIL strobe longer than one cycle");
      end
    end
    checks++;
    if (npow != 3) begin
      failures++;
      $display("FAIL expected 3 power values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
