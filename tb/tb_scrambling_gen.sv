// Testbench for scrambling_gen: the x and y m-sequences are generated here
// from their recurrences x(i+18) = x(i+7) + x(i) and
// y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i); the I code is x(i+n) + y(i)
// and the Q code is the same Gold sequence 131072 chips later. Codes n = 0
// and n = 16 are checked over 4000 chips, and a frame restart must
// reload the seed.
module tb_scrambling_gen;
  logic clk = 1'b0, rst_n = 1'b0, chipx1 = 1'b0, fe = 1'b0, start = 1'b0;
  logic [17:0] seed = 18'h1;
  logic s_i, s_q;
  int checks = 0, failures = 0;
  localparam int LEN  = 4000;
  localparam int QOFS = 131072;
  bit xs [QOFS + LEN + 64];
  bit ys [QOFS + LEN + 64];

  scrambling_gen dut (.clk, .rst_n, .chipx1, .frame_edge_code(fe), .start_code_gen(start), .x_seed(seed),
                      .s_i, .s_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe();
    chipx1 = 1'b1;
    @(posedge clk);
    #1 chipx1 = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int codes [2] = '{0, 16};
    for (int i = 0; i < 18; i++) begin
      xs[i] = (i == 0);
      ys[i] = 1'b1;
    end
    for (int i = 0; i + 18 < QOFS + LEN + 64; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      int n;
      n = codes[rep % 2];
      for (int b = 0; b < 18; b++) seed[b] = xs[n + b];
      fe = 1'b1;
      strobe();
      fe = 1'b0;
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (s_i != (xs[i+n] ^ ys[i]) || s_q != (xs[i+n+QOFS] ^ ys[i+QOFS])) begin
          failures++;
          if (failures < 10)
            $display("FAIL code %0d chip %0d I=%b Q=%b expected %b %b", n, i, s_i, s_q,
                     xs[i+n] ^ ys[i], xs[i+n+QOFS] ^ ys[i+QOFS]);
        end
        strobe();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
