// Testbench for freq_est: a pilot sequence rotating by a fixed phase step is
// fed on chipx_pl strobes; after every SYMS_PER_FRAME symbols freq_est_av
// must pulse once and the outputs must equal the sums of
// I(n)I(n-1)+Q(n)Q(n-1) and Q(n)I(n-1)-I(n)Q(n-1) computed here.
// The frame of 150 pilot symbols (10 ms) is checked in strobe counts.
module tb_freq_est;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chipx_pl = 1'b0;
  sym_t mv = '0;
  logic signed [FREQ_W-1:0] fc, fs;
  logic fav;
  int checks = 0, failures = 0;

  freq_est dut (.clk, .rst_n, .chipx_pl, .mv_avg(mv), .freq_est_cos(fc), .freq_est_sin(fs),
                .freq_est_av(fav));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sc = 0, ss = 0;
    int pi = 0, pq = 0, ci, cq, nav = 0;
    real ph;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3 * 150; n++) begin
      ph   = 0.3 + 0.05 * n;
      ci   = $rtoi(200.0 * $cos(ph)) + int'($urandom % 5) - 2;
      cq   = $rtoi(200.0 * $sin(ph)) + int'($urandom % 5) - 2;
      mv.i = SYM_W'(ci);
      mv.q = SYM_W'(cq);
      sc  += longint'(ci * pi + cq * pq);
      ss  += longint'(cq * pi - ci * pq);
      pi   = ci;
      pq   = cq;
      chipx_pl = 1'b1;
      @(posedge clk);
      #1 chipx_pl = 1'b0;
      if ((n % 150) == 149) begin
        checks++;
        if (fav !== 1'b1 || longint'(fc) != sc || longint'(fs) != ss) begin
          failures++;
          $display("FAIL frame end n=%0d av=%b cos=%0d sin=%0d expected %0d %0d", n, fav, fc, fs, sc, ss);
        end
        if (fs <= 0) begin
          failures++;
          $display("FAIL positive rotation must give a positive sine sum");
        end
        nav++;
        sc = 0;
        ss = 0;
      end else begin
        checks++;
        if (fav !== 1'b0) begin
          failures++;
          $display("FAIL freq_est_av at symbol %0d", n);
        end
      end
      repeat (3) @(posedge clk);
      #1;
    end
    checks++;
    if (nav != 3) begin
      failures++;
      $display("FAIL expected 3 estimates, got %0d", nav);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
