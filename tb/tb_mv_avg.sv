// Testbench for mv_avg: random pilot symbols are presented with clk_sym_pl
// strobes at irregular spacing; after every strobe the output must equal the
// arithmetic-shift average of the last LEN symbols (zeros before the start).
module tb_mv_avg;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start_avg = 1'b0, clk_sym_pl = 1'b0;
  sym_t p_demod = '0, avg;
  int checks = 0, failures = 0;
  sym_t hist [4];

  mv_avg dut (.clk, .rst_n, .start_avg, .clk_sym_pl, .p_demod, .mv_avg_o(avg));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int si, sq;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // strobes before start_avg are ignored
    clk_sym_pl = 1'b1;
    p_demod.i  = 9'sd100;
    p_demod.q  = -9'sd100;
    @(posedge clk);
    #1 clk_sym_pl = 1'b0;
    checks++;
    if (avg !== '0) begin
      failures++;
      $display("FAIL average moved before start_avg");
    end
    start_avg = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      repeat ($urandom % 6) @(posedge clk);
      #1;
      p_demod.i  = SYM_W'($urandom);
      p_demod.q  = SYM_W'($urandom);
      clk_sym_pl = 1'b1;
      @(posedge clk);
      #1 clk_sym_pl = 1'b0;
      hist[3] = hist[2];
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = p_demod;
      si = 0;
      sq = 0;
      for (int k = 0; k < 4; k++) begin
        si += int'(hist[k].i);
        sq += int'(hist[k].q);
      end
      checks++;
      if (int'(avg.i) != (si >>> 2) || int'(avg.q) != (sq >>> 2)) begin
        failures++;
        $display("FAIL n=%0d avg=(%0d,%0d) expected (%0d,%0d)", n, avg.i, avg.q, si >>> 2, sq >>> 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
