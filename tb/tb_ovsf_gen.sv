// Testbench for ovsf_gen: codes are compared chip by chip against codes
// built here from the code tree (C, C) / (C, -C), for several spreading
// factors and code numbers, over several code periods and across a frame
// restart.
module tb_ovsf_gen;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chipx1 = 1'b0, fe = 1'b0, start = 1'b0;
  logic [SF_W-1:0] sf = SF_W'(4), k = '0;
  logic c;
  int checks = 0, failures = 0;

  ovsf_gen dut (.clk, .rst_n, .chipx1, .frame_edge_code(fe), .start_code_gen(start), .sf, .code_k(k), .c);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chip j of code C(sf, kk) as +1 / -1, built recursively from the tree
  function automatic int tree(input int sff, input int kk, input int j);
    int parent;
    if (sff == 1) return 1;
    parent = tree(sff / 2, kk / 2, j % (sff / 2));
    if ((kk % 2) == 1 && j >= sff / 2) return -parent;
    return parent;
  endfunction

  task automatic strobe();
    chipx1 = 1'b1;
    @(posedge clk);
    #1 chipx1 = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int sfs [7] = '{4, 4, 16, 64, 256, 256, 512};
    int ks  [7] = '{1, 3, 5, 37, 0, 201, 300};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start = 1'b1;
    foreach (sfs[t]) begin
      sf = SF_W'(sfs[t]);
      k  = SF_W'(ks[t]);
      fe = 1'b1;
      strobe();
      fe = 1'b0;
      sf = SF_W'(4);  // must be ignored until the next frame edge
      k  = '0;
      for (int j = 0; j < 3 * sfs[t] + 5; j++) begin
        checks++;
        if ((c ? -1 : 1) != tree(sfs[t], ks[t], j % sfs[t])) begin
          failures++;
          $display("FAIL C(%0d,%0d) chip %0d = %b", sfs[t], ks[t], j, c);
        end
        strobe();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
