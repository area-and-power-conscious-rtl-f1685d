// Testbench for ctrl_gen: frames of 1024 chips (chip pulse every 8 CHIPX8
// cycles, the frame-edge pulse taking the last chip slot) with DPCH SF 4,
// 16 and 8. CLK_SYM must pulse exactly in the cycle after the chip pulse
// of every chip numbered SF-1 mod SF (the frame-edge chip closing the last
// symbol of a frame, with the old SF), CLK_SYM_PL after every 256th chip,
// CHIPX_PL one cycle after CLK_SYM_PL; SF_FRAME must change at the first
// data chip of a frame; START_DEMOD / START_COMP / START_AVG must rise.
module tb_ctrl_gen;
  import rake_pkg::*;
  localparam int CH = 1024;
  logic clk = 1'b0, rst_n = 1'b0, start_code_gen = 1'b0, fe = 1'b0, chipx1 = 1'b0;
  logic [SF_W-1:0] sf_ref = SF_W'(4), sf_frame;
  logic clk_sym, clk_sym_pl, chipx_pl, start_demod, start_comp, start_avg;
  int checks = 0, failures = 0;

  ctrl_gen dut (.clk, .rst_n, .start_code_gen, .frame_edge_code(fe), .chipx1, .sf_ref,
                .sf_pl_ref(SF_W'(256)), .sf_frame, .clk_sym, .clk_sym_pl, .chipx_pl, .start_demod,
                .start_comp, .start_avg);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sfs [4] = '{4, 16, 8, 4};
  int n_sym = 0, n_pl = 0, n_cpl = 0;
  bit exp_sym = 0, exp_pl = 0, exp_cpl = 0;

  // compare strobes every cycle with the expectation set by the stimulus
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (clk_sym !== exp_sym || clk_sym_pl !== exp_pl || chipx_pl !== exp_cpl) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t clk_sym=%b/%b clk_sym_pl=%b/%b chipx_pl=%b/%b", $time, clk_sym, exp_sym,
                   clk_sym_pl, exp_pl, chipx_pl, exp_cpl);
      end
      n_sym += int'(clk_sym);
      n_pl  += int'(clk_sym_pl);
      n_cpl += int'(chipx_pl);
    end
  end

  task automatic cycle(input bit c, input bit f, input bit s, input bit p);
    chipx1 = c;
    fe     = f;
    @(posedge clk);
    #1;
    exp_cpl = exp_pl;
    exp_sym = s;
    exp_pl  = p;
  endtask

  initial begin
    int cur_sf = 4;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start_code_gen = 1'b1;
    foreach (sfs[fr]) begin
      sf_ref = SF_W'(sfs[fr]);
      cycle(1'b0, 1'b1, 1'b0, 1'b0);
      // frame-edge chip: closes the last symbol of the previous frame
      cycle(1'b1, 1'b1, fr > 0, fr > 0);
      sf_ref = SF_W'(4);   // must not matter after the frame edge
      cycle(1'b0, 1'b1, 1'b0, 1'b0);
      checks++;
      if (start_demod !== 1'b1) begin
        failures++;
        $display("FAIL START_DEMOD not set at frame %0d", fr);
      end
      for (int k = 0; k < CH - 1; k++) begin
        repeat (k == 0 ? 5 : 7) cycle(1'b0, 1'b0, 1'b0, 1'b0);
        cycle(1'b1, 1'b0, (k % sfs[fr]) == sfs[fr] - 1, (k % 256) == 255);
        if (k == 0) begin
          checks++;
          if (int'(sf_frame) != sfs[fr] || start_comp !== 1'b1 || start_avg !== 1'b1) begin
            failures++;
            $display("FAIL frame %0d: SF_FRAME %0d START_COMP %b START_AVG %b", fr, sf_frame, start_comp,
                     start_avg);
          end
        end
      end
      repeat (6) cycle(1'b0, 1'b0, 1'b0, 1'b0);
      checks++;
      if (int'(sf_frame) != sfs[fr]) begin
        failures++;
        $display("FAIL SF_FRAME changed before the next frame's first data chip");
      end
    end
    repeat (3) cycle(1'b0, 1'b0, 1'b0, 1'b0);
    checks++;
    // each frame: CH/SF symbols; the last one of the final frame is not closed
    if (n_sym != CH / 4 + CH / 16 + CH / 8 + CH / 4 - 1 || n_pl != 4 * CH / 256 - 1 || n_cpl != n_pl) begin
      failures++;
      $display("FAIL strobe counts sym %0d pl %0d cpl %0d", n_sym, n_pl, n_cpl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
