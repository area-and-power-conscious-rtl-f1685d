// End-to-end testbench for rake_receiver at full size: the receiver with
// every parameter at its default (4 fingers, 38400-chip frames, 8 samples
// per chip, 2 x 9600-word symbol SRAM) receives 7 frames of a DPCH at SF 16
// over a four-path channel. The stimulus, the channel model and all checks
// are in rake_e2e (see there); this module adds the watchdog and the result
// line. Symbol error limit 0.5 %.
module tb_rake_receiver;
  localparam int NFRAME = 7;
  localparam int FL     = 38400 * 8;
  logic done;
  int checks, failures, wd_fail = 0;

  rake_e2e #(.SF(16), .CODE_K(5), .NFRAME(NFRAME), .SER_DIV(200)) run (.done, .checks, .failures);

  initial begin
    fork
      wait (done);
      begin
        #(10 * (NFRAME + 2) * FL);
        $display("FAIL watchdog");
        wd_fail = 1;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks + wd_fail, failures + wd_fail);
    $finish;
  end
endmodule
