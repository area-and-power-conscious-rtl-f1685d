// Testbench for comp: random data symbols and channel estimates; on each
// clk_sym (after start_comp) the output must be the complex product
// (DI + jDQ)(cos + j sin) divided by 16 (floor), with data_av one cycle
// after clk_sym. Without a valid estimate the symbol passes unchanged.
module tb_comp;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start_comp = 1'b0, clk_sym = 1'b0, cf_valid = 1'b0;
  sym_t d = '0;
  logic signed [SYM_W-1:0] c = '0, s = '0;
  comp_sym_t o;
  logic av;
  int checks = 0, failures = 0;

  comp dut (.clk, .rst_n, .start_comp, .clk_sym, .demod(d), .cf_est_cos(c), .cf_est_sin(s),
            .cf_valid, .comp_o(o), .data_av(av));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    clk_sym = 1'b1;
    @(posedge clk);
    #1 clk_sym = 1'b0;
    checks++;
    if (av !== 1'b0) begin
      failures++;
      $display("FAIL data_av before start_comp");
    end
    start_comp = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      d.i      = SYM_W'($urandom);
      d.q      = SYM_W'($urandom);
      c        = SYM_W'($urandom);
      s        = SYM_W'($urandom);
      cf_valid = n >= 20;
      clk_sym  = 1'b1;
      if (cf_valid) begin
        ei = (int'(d.i) * int'(c) - int'(d.q) * int'(s)) >>> 4;
        eq = (int'(d.i) * int'(s) + int'(d.q) * int'(c)) >>> 4;
      end else begin
        ei = int'(d.i);
        eq = int'(d.q);
      end
      @(posedge clk);
      #1 clk_sym = 1'b0;
      checks++;
      if (av !== 1'b1 || int'(o.i) != ei || int'(o.q) != eq) begin
        failures++;
        $display("FAIL n=%0d out=(%0d,%0d) expected (%0d,%0d) av=%b", n, o.i, o.q, ei, eq, av);
      end
      repeat (1 + $urandom % 3) @(posedge clk);
      #1;
      checks++;
      if (av !== 1'b0) begin
        failures++;
        $display("FAIL data_av longer than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
