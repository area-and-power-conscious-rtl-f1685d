// Testbench for finger_decision: a sequence of magnitude reports checks the
// hysteresis: the finger switches on only at a frame edge after a magnitude
// above ON_TH, switches off at once on a magnitude below OFF_TH, and keeps
// its state for magnitudes between the thresholds.
module tb_finger_decision;
  import rake_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, fe = 1'b0, mag_av = 1'b0;
  logic [MAG_W-1:0] mag = '0, off_th = MAG_W'(20), on_th = MAG_W'(40);
  logic on;
  int checks = 0, failures = 0;

  finger_decision dut (.clk, .rst_n, .frame_edge_code(fe), .mag_av, .mag, .off_th, .on_th, .finger_on(on));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(input int m);
    mag = MAG_W'(m);
    mag_av = 1'b1;
    @(posedge clk);
    #1 mag_av = 1'b0;
    @(posedge clk);
    #1;
  endtask

  task automatic edge_pulse();
    fe = 1'b1;
    @(posedge clk);
    #1 fe = 1'b0;
    @(posedge clk);
    #1;
  endtask

  task automatic expect_on(input logic v, input string what);
    checks++;
    if (on !== v) begin
      failures++;
      $display("FAIL %s: finger_on=%b", what, on);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_on(1'b0, "after reset");
    report(30);
    edge_pulse();
    expect_on(1'b0, "between thresholds from off");
    report(50);
    expect_on(1'b0, "above on threshold before frame edge");
    repeat (20) @(posedge clk);
    #1 expect_on(1'b0, "waits for frame edge");
    edge_pulse();
    expect_on(1'b1, "on at frame edge");
    report(30);
    edge_pulse();
    expect_on(1'b1, "between thresholds keeps on");
    report(10);
    expect_on(1'b0, "off immediately below off threshold");
    edge_pulse();
    expect_on(1'b0, "stays off at frame edge");
    // a strong report followed by a weak one before the edge cancels the switch-on
    report(60);
    report(5);
    edge_pulse();
    expect_on(1'b0, "weak report cancels pending switch-on");
    report(41);
    edge_pulse();
    expect_on(1'b1, "on again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
