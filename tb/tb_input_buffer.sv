// Testbench for input_buffer: random samples are pushed every cycle (with
// some idle cycles) and the early / on-time / late outputs are compared with
// the third-, second- and most-recent accepted sample.
module tb_input_buffer;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t in_s = '0;
  eol_t eol;
  int checks = 0, failures = 0;
  sample_t hist [3];

  input_buffer dut (.clk, .rst_n, .in_valid, .in_s, .eol_o(eol));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom % 5) != 0;
      in_s.i   = SAMPLE_W'($urandom);
      in_s.q   = SAMPLE_W'($urandom);
      @(posedge clk);
      if (in_valid) begin
        hist[2] = hist[1];
        hist[1] = hist[0];
        hist[0] = in_s;
      end
      #1;
      checks++;
      if (eol.late !== hist[0] || eol.ontime !== hist[1] || eol.early !== hist[2]) begin
        failures++;
        $display("FAIL n=%0d late=%h ontime=%h early=%h expected %h %h %h", n,
                 eol.late, eol.ontime, eol.early, hist[0], hist[1], hist[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
