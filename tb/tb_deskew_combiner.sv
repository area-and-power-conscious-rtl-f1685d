// Testbench for deskew_combiner (driven through four data_load blocks, as
// in the receiver). Four fingers deliver the symbols of a short frame
// (256 chips: 64 symbols at SF 4, 32 at SF 8) with path delays of 0 to 3
// symbols. Every SRAM write is checked: bank = frame parity, address =
// symbol number - 1, data = sum of the symbols of all fingers that were on.
// Finger 2 is off during frame 2, frame 3 uses SF 8. The number of writes
// per frame, the NORMAL_FAST and FAST dump modes and the bank flips are
// counted, and the deskewer must answer every symbol before the next one
// (one symbol period is 32 CHIPX8 cycles at SF 4).
module tb_deskew_combiner;
  import rake_pkg::*;
  localparam int NF     = 4;
  localparam int CHIPS  = 256;
  localparam int FCYC   = CHIPS * 8;
  localparam int NFRAME = 6;
  localparam int T0     = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                data_av [NF];
  logic                finger_on [NF];
  logic [SF_W-1:0]     sf [NF];
  comp_sym_t           fd [NF];
  comp_sym_t           store [NF];
  logic [SYMCNT_W-1:0] symbol_cnt [NF];
  logic                desk_av [NF], fbf [NF], comb_done [NF];
  logic                main_blk_flag, sram_en, sram_wen;
  logic [13:0]         sram_addr;
  comb_sym_t           sram_data;
  logic [1:0]          dump_mode;
  int checks = 0, failures = 0;
  int delay [NF] = '{0, 13, 45, 100};

  for (genvar f = 0; f < NF; f++) begin : g_dl
    data_load #(.CHIPS_PER_FRAME(CHIPS)) u_dl (
      .clk, .rst_n, .data_av(data_av[f]), .comb_done(comb_done[f]), .finger_on(finger_on[f]),
      .main_blk_flag, .sf_ref(sf[f]), .finger_d(fd[f]), .store(store[f]), .symbol_cnt(symbol_cnt[f]),
      .desk_data_av(desk_av[f]), .finger_blk_flag(fbf[f]));
  end

  deskew_combiner #(.N_FINGERS(NF)) dut (
    .clk, .rst_n, .desk_data_av(desk_av), .store, .symbol_cnt, .finger_blk_flag(fbf), .comb_done,
    .main_blk_flag, .sram_en, .sram_addr, .sram_wen, .sram_data, .dump_mode_o(dump_mode));

  always #5 clk = ~clk;

  initial begin
    repeat (T0 + (NFRAME + 2) * FCYC) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int frame_sf(input int k);
    return (k == 3) ? 8 : 4;
  endfunction

  function automatic int val(input int f, input int k, input int s, input int q);
    int h;
    h = (f * 7919 + k * 104729 + s * 1299709 + q * 15485863) * 2654435;
    return ((h >>> 8) % 801) - 400;
  endfunction

  function automatic bit is_on(input int f, input int k);
    return !(f == 2 && k == 2);
  endfunction

  // monitor: SRAM writes, dump modes and bank flips
  int wr_frame = -1, wr_bank = -1, nwr = 0, n_nf = 0, n_fast = 0, n_flip = 0;
  int wr_count [NFRAME + 2];
  logic [1:0] dm_d = 2'd0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dump_mode == 2'd1 && dm_d != 2'd1) n_nf++;
      if (dump_mode == 2'd2 && dm_d != 2'd2) n_fast++;
      dm_d <= dump_mode;
      if (!sram_wen) begin
        int ei, eq, s, fsf;
        if (int'(sram_en) != wr_bank) begin
          if (wr_bank >= 0) n_flip++;
          wr_bank = int'(sram_en);
          wr_frame++;
        end
        s   = int'(sram_addr) + 1;
        fsf = frame_sf(wr_frame);
        ei  = 0;
        eq  = 0;
        for (int f = 0; f < NF; f++)
          if (is_on(f, wr_frame)) begin
            ei += val(f, wr_frame, s, 0);
            eq += val(f, wr_frame, s, 1);
          end
        checks++;
        wr_count[wr_frame]++;
        if (int'(sram_en) != (wr_frame % 2) || s > CHIPS / fsf ||
            int'(sram_data.i) != ei || int'(sram_data.q) != eq) begin
          failures++;
          if (failures < 10)
            $display("FAIL write frame %0d bank %0d addr %0d data (%0d,%0d) expected (%0d,%0d)",
                     wr_frame, sram_en, sram_addr, sram_data.i, sram_data.q, ei, eq);
        end
      end
    end
  end

  // every symbol must be taken by the deskewer before the finger's next one
  always @(posedge clk) begin
    for (int f = 0; f < NF; f++)
      if (rst_n && data_av[f] && desk_av[f]) begin
        failures++;
        $display("FAIL finger %0d symbol not taken within one symbol period", f);
      end
  end

  initial begin
    for (int k = 0; k < NFRAME + 2; k++) wr_count[k] = 0;
    for (int f = 0; f < NF; f++) begin
      data_av[f]   = 1'b0;
      finger_on[f] = 1'b1;
      sf[f]        = SF_W'(4);
      fd[f]        = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < T0 + NFRAME * FCYC + 200; t++) begin
      for (int f = 0; f < NF; f++) begin
        int rel, k, p, s;
        data_av[f] = 1'b0;
        rel = t - T0 - delay[f];
        if (rel >= 0 && rel < NFRAME * FCYC) begin
          k = rel / FCYC;
          p = frame_sf(k) * 8;
          sf[f]        = SF_W'(frame_sf(k));
          finger_on[f] = is_on(f, k);
          if ((rel % FCYC) % p == p - 1) begin
            s          = (rel % FCYC) / p + 1;
            data_av[f] = 1'b1;
            fd[f].i    = COMP_W'(val(f, k, s, 0));
            fd[f].q    = COMP_W'(val(f, k, s, 1));
          end
        end
      end
      @(posedge clk);
      #1;
    end
    for (int f = 0; f < NF; f++) data_av[f] = 1'b0;
    repeat (50) @(posedge clk);
    // frames 0 .. NFRAME-2 are complete (the last frame is flushed only when a next one starts)
    for (int k = 0; k < NFRAME - 1; k++) begin
      checks++;
      if (wr_count[k] != CHIPS / frame_sf(k)) begin
        failures++;
        $display("FAIL frame %0d: %0d symbols written, expected %0d", k, wr_count[k], CHIPS / frame_sf(k));
      end
    end
    checks++;
    if (n_nf < NFRAME - 1 || n_fast < NFRAME - 1 || n_flip < NFRAME - 2) begin
      failures++;
      $display("FAIL mechanisms: NORMAL_FAST %0d FAST %0d bank flips %0d", n_nf, n_fast, n_flip);
    end
    $display("writes per frame %0d %0d %0d %0d %0d; NORMAL_FAST %0d FAST %0d flips %0d",
             wr_count[0], wr_count[1], wr_count[2], wr_count[3], wr_count[4], n_nf, n_fast, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
