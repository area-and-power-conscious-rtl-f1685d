// Testbench for data_load (short frame of 64 chips = 16 symbols at SF 4):
// symbol numbers must run 1..16 and wrap, restart at 1 on an SF change,
// a stored symbol must raise DESK_DATA_AV until COMB_DONE (answered here
// after a random wait), no request may appear while the finger is off or
// after it comes back on before the next symbol 1,
// and FINGER_BLK_FLAG must take MAIN_BLK_FLAG only at symbol 1.
module tb_data_load;
  import rake_pkg::*;
  localparam int CHIPS = 64;
  logic clk = 1'b0, rst_n = 1'b0, data_av = 1'b0, comb_done = 1'b0, finger_on = 1'b1, main = 1'b0;
  logic [SF_W-1:0] sf = SF_W'(4);
  comp_sym_t d = '0, store;
  logic [SYMCNT_W-1:0] cnt;
  logic dav, fbf;
  int checks = 0, failures = 0;

  data_load #(.CHIPS_PER_FRAME(CHIPS)) dut (
    .clk, .rst_n, .data_av, .comb_done, .finger_on, .main_blk_flag(main), .sf_ref(sf), .finger_d(d),
    .store, .symbol_cnt(cnt), .desk_data_av(dav), .finger_blk_flag(fbf));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int exp_cnt = 0, nsym, w;
    logic exp_fbf = 1'b0;
    bit active = 0, take;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 120; n++) begin
      sf        = (n >= 64 && n < 80) ? SF_W'(8) : SF_W'(4);
      nsym      = CHIPS / int'(sf);
      finger_on = !(n >= 40 && n < 45);
      main      = $urandom % 2;
      d         = comp_sym_t'($urandom);
      exp_cnt   = (n == 64 || n == 80 || exp_cnt >= nsym) ? 1 : exp_cnt + 1;
      if (exp_cnt == 1) exp_fbf = main;
      take   = finger_on && (active || exp_cnt == 1);
      active = take;
      data_av = 1'b1;
      @(posedge clk);
      #1 data_av = 1'b0;
      check(int'(cnt) == exp_cnt, $sformatf("symbol %0d numbered %0d expected %0d", n, cnt, exp_cnt));
      check(fbf == exp_fbf, $sformatf("symbol %0d block flag %b expected %b", n, fbf, exp_fbf));
      if (take) begin
        w = 0;
        while (!dav && w < 5) begin
          @(posedge clk);
          #1 w++;
        end
        check(dav && store == d, $sformatf("symbol %0d not offered to the deskewer", n));
        repeat ($urandom % 6) @(posedge clk);
        #1;
        check(dav, "request dropped before COMB_DONE");
        comb_done = 1'b1;
        @(posedge clk);
        #1 comb_done = 1'b0;
        check(!dav, "request held after COMB_DONE");
      end else begin
        repeat (5) @(posedge clk);
        #1 check(!dav, $sformatf("request at symbol %0d (finger off or waiting for symbol 1)", n));
      end
      repeat (3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
