// Testbench for cf_est: for random averaged pilot symbols the registered
// estimates must be cos = (I+Q)/2 and sin = (I-Q)/2 (floor division), taken
// only on chipx_pl, and cf_valid must rise with the first estimate.
module tb_cf_est;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chipx_pl = 1'b0;
  sym_t mv = '0;
  logic signed [SYM_W-1:0] c, s;
  logic valid;
  int checks = 0, failures = 0;

  cf_est dut (.clk, .rst_n, .chipx_pl, .mv_avg(mv), .cf_est_cos(c), .cf_est_sin(s), .cf_valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec = 0, es = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    mv.i = 9'sd50;
    mv.q = 9'sd20;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (valid !== 1'b0 || c !== '0 || s !== '0) begin
      failures++;
      $display("FAIL estimate changed without chipx_pl");
    end
    for (int n = 0; n < 1000; n++) begin
      mv.i     = SYM_W'($urandom);
      mv.q     = SYM_W'($urandom);
      chipx_pl = ($urandom % 2) == 1;
      if (chipx_pl) begin
        ec = (int'(mv.i) + int'(mv.q)) >>> 1;
        es = (int'(mv.i) - int'(mv.q)) >>> 1;
      end
      @(posedge clk);
      #1;
      if (n > 0 || chipx_pl) begin
        checks++;
        if (int'(c) != ec || int'(s) != es || (valid !== 1'b1 && ec != 0)) begin
          failures++;
          $display("FAIL n=%0d cos=%0d sin=%0d expected %0d %0d", n, c, s, ec, es);
        end
      end
    end
    checks++;
    if (valid !== 1'b1) begin
      failures++;
      $display("FAIL cf_valid never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
