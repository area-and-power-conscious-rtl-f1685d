// Testbench for demod: random samples, scrambling and OVSF chips are fed at
// chip strobes; for each spreading factor (4, 16, 256, 512, one per frame)
// every symbol must equal the despread sum shifted right by log2(SF)-2 and
// saturated to 9 bits, and a new symbol must appear exactly every SF chips.
module tb_demod;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start_demod = 1'b0, fe = 1'b0, chipx1 = 1'b0;
  logic [SF_W-1:0] sf_ref = SF_W'(4);
  sample_t r = '0;
  logic s_i = 1'b0, s_q = 1'b0, c = 1'b0;
  sym_t o;
  int checks = 0, failures = 0;

  demod dut (.clk, .rst_n, .start_demod, .frame_edge_code(fe), .chipx1, .sf_ref, .r, .s_i, .s_q,
             .c, .demod_o(o));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    if (v > 255) return 255;
    if (v < -256) return -256;
    return v;
  endfunction

  task automatic chip();
    chipx1 = 1'b1;
    @(posedge clk);
    #1 chipx1 = 1'b0;
    repeat ($urandom % 3) @(posedge clk);
    #1;
  endtask

  initial begin
    int sfs [4] = '{4, 16, 256, 512};
    int ai, aq, ti, tq, si, sq, cc, lg, nsym, gain;
    sym_t prev;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start_demod = 1'b1;
    foreach (sfs[f]) begin
      sf_ref = SF_W'(sfs[f]);
      lg = $clog2(sfs[f]);
      fe = 1'b1;
      chip();                      // frame-edge chip loads SF
      fe = 1'b0;
      nsym = (f < 2) ? 20 : 3;
      // low-amplitude and full-scale frames exercise both rounding and saturation
      gain = (f == 3) ? 31 : 0;
      for (int s = 0; s < nsym; s++) begin
        ai = 0;
        aq = 0;
        for (int k = 0; k < sfs[f]; k++) begin
          if (gain != 0) begin
            r.i = SAMPLE_W'(gain);
            r.q = SAMPLE_W'(-gain);
            s_i = 1'b0;
            s_q = 1'b1;
            c   = 1'b0;
          end else begin
            r.i = SAMPLE_W'($urandom);
            r.q = SAMPLE_W'($urandom);
            s_i = $urandom % 2;
            s_q = $urandom % 2;
            c   = $urandom % 2;
          end
          si = s_i ? -1 : 1;
          sq = s_q ? -1 : 1;
          cc = c ? -1 : 1;
          ti = (int'(r.i) * si + int'(r.q) * sq) * cc;
          tq = (int'(r.q) * si - int'(r.i) * sq) * cc;
          ai += ti;
          aq += tq;
          prev = o;
          chip();
          if (k < sfs[f] - 1) begin
            checks++;
            if (o !== prev) begin
              failures++;
              $display("FAIL SF=%0d output changed inside a symbol at chip %0d", sfs[f], k);
            end
          end
        end
        checks++;
        if (int'(o.i) != sat(ai >>> (lg - 2)) || int'(o.q) != sat(aq >>> (lg - 2))) begin
          failures++;
          $display("FAIL SF=%0d sym=%0d out=(%0d,%0d) expected (%0d,%0d)", sfs[f], s, o.i, o.q,
                   sat(ai >>> (lg - 2)), sat(aq >>> (lg - 2)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
