// End-to-end testbench for rake_receiver at the two ends of the DPCH
// spreading-factor range, 4 and 512, with the receiver at full default size.
// At SF 4 a frame carries 9600 symbols, which fills a whole SRAM bank and
// gives the deskew-combiner one symbol per finger every 32 CHIPX8 cycles;
// at SF 512 a frame carries 75 symbols and the despread sums are 16 bits
// wide before truncation. Two independent receivers run side by side, each
// driven and checked by rake_e2e over the same four-path channel (see
// there for the channel and the list of checks). SF 4 has little
// spreading gain against the interference between the paths (about 4 %
// symbol errors with all four fingers on, twice that in the frame where one
// path has come back but its finger is still off), so its symbol error
// limit is looser (1 in 10) than at SF 512 (1 in 200).
module tb_rake_sf_range;
  localparam int NFRAME = 7;
  localparam int FL     = 38400 * 8;
  logic done4, done512;
  int checks4, failures4, checks512, failures512, wd_fail = 0;

  rake_e2e #(.SF(4), .CODE_K(1), .NFRAME(NFRAME), .SER_DIV(10))
    run_sf4 (.done(done4), .checks(checks4), .failures(failures4));
  rake_e2e #(.SF(512), .CODE_K(300), .NFRAME(NFRAME), .SER_DIV(200))
    run_sf512 (.done(done512), .checks(checks512), .failures(failures512));

  initial begin
    fork
      wait (done4 && done512);
      begin
        #(10 * (NFRAME + 2) * FL);
        $display("FAIL watchdog");
        wd_fail = 1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks512 + wd_fail,
             failures4 + failures512 + wd_fail);
    $finish;
  end
endmodule
