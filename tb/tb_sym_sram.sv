// Testbench for sym_sram: random combined symbols are written to random
// addresses of both banks, then every written word is read back (one cycle
// read latency) and compared; writes with WEN high or beyond the bank size
// must not change memory.
module tb_sym_sram;
  import rake_pkg::*;
  localparam int W = 9600;
  logic clk = 1'b0, wr_bank = 1'b0, wr_en_n = 1'b1, rd_bank = 1'b0;
  logic [13:0] wr_addr = '0, rd_addr = '0;
  comb_sym_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  comb_sym_t model [2][W];
  bit written [2][W];

  sym_sram dut (.clk, .wr_bank, .wr_addr, .wr_en_n, .wr_data, .rd_bank, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, a;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < W; j++) written[i][j] = 1'b0;
    @(posedge clk);
    #1;
    for (int n = 0; n < 3000; n++) begin
      b = $urandom % 2;
      a = (n < 20) ? W - 1 - n : $urandom % W;
      wr_bank = b[0];
      wr_addr = 14'(a);
      wr_data = comb_sym_t'($urandom);
      wr_en_n = 1'b0;
      model[b][a] = wr_data;
      written[b][a] = 1'b1;
      @(posedge clk);
      #1;
    end
    // disabled and out-of-range writes
    wr_en_n = 1'b1;
    wr_addr = 14'(W - 1);
    wr_bank = 1'b0;
    wr_data = ~model[0][W-1];
    @(posedge clk);
    #1;
    wr_en_n = 1'b0;
    wr_addr = 14'(W);
    @(posedge clk);
    #1 wr_en_n = 1'b1;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < W; j++)
        if (written[i][j]) begin
          rd_bank = i[0];
          rd_addr = 14'(j);
          @(posedge clk);
          #1;
          checks++;
          if (rd_data !== model[i][j]) begin
            failures++;
            $display("FAIL bank %0d addr %0d read %h expected %h", i, j, rd_data, model[i][j]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
