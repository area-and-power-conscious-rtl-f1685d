// ctrl_gen: per-finger control generator (CTRL_GEN).
//
// Turns the frame-edge and chip-rate enables of the clock generator into
// the symbol strobes and start enables of the finger:
//   - The code-initialisation CHIPX1 (the one that coincides with
//     FRAME_EDGE_CODE) is also the last data chip of the ending frame. On
//     it the DPCH and CPICH spreading factors are loaded and START_DEMOD
//     follows START_CODE_GEN; on the next CHIPX1 (the first data chip of
//     the new frame) the new DPCH spreading factor is passed on as
//     SF_FRAME for the deskew-combiner, after the ending frame's last
//     symbol has been handed over, and START_COMP / START_AVG are raised.
//   - Data chips are counted from 0 at the start of the frame. CLK_SYM
//     (CLK_SYM_PL) pulses for one CHIPX8 cycle right after the CHIPX1 of
//     the last chip of every DPCH (CPICH) symbol: the cycle in which the
//     despreader output holds the new symbol.
//   - CHIPX_PL pulses one CHIPX8 cycle after CLK_SYM_PL, when the moving
//     average holds its new value, to load the CPICH estimators.
// Spreading factors are powers of two (4..512 for DPCH, 256 for CPICH) and
// are carried as plain binary numbers. The sequence of enables follows the
// receiver's control generator; the exact cycle of each strobe relative to
// CHIPX1 is this design's choice for a single-clock implementation.
module ctrl_gen
  import rake_pkg::*;
(
  input  logic            clk,              // CHIPX8
  input  logic            rst_n,            // RESET_SYS, active low
  input  logic            start_code_gen,
  input  logic            frame_edge_code,
  input  logic            chipx1,           // chip-rate enable
  input  logic [SF_W-1:0] sf_ref,           // DPCH spreading factor
  input  logic [SF_W-1:0] sf_pl_ref,        // CPICH spreading factor
  output logic [SF_W-1:0] sf_frame,
  output logic            clk_sym,
  output logic            clk_sym_pl,
  output logic            chipx_pl,
  output logic            start_demod,
  output logic            start_comp,
  output logic            start_avg
);
  logic [SF_W-1:0] sf_pl_r, sf_pl_n, sf_next;
  logic [15:0]     chip_cnt;
  logic            data_chip, new_frame;

  // the frame-edge chip closes the ending frame, so it counts as a data chip
  assign data_chip = chipx1 && start_demod;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sf_frame    <= SF_W'(4);
      sf_pl_r     <= SF_W'(256);
      sf_pl_n     <= SF_W'(256);
      sf_next     <= SF_W'(4);
      new_frame   <= 1'b0;
      chip_cnt    <= '0;
      clk_sym     <= 1'b0;
      clk_sym_pl  <= 1'b0;
      chipx_pl    <= 1'b0;
      start_demod <= 1'b0;
      start_comp  <= 1'b0;
      start_avg   <= 1'b0;
    end else begin
      clk_sym    <= 1'b0;
      clk_sym_pl <= 1'b0;
      chipx_pl   <= clk_sym_pl;
      if (data_chip) begin
        chip_cnt   <= chip_cnt + 1'b1;
        clk_sym    <= ((chip_cnt[SF_W-1:0] & (sf_frame - 1'b1)) == (sf_frame - 1'b1));
        clk_sym_pl <= ((chip_cnt[SF_W-1:0] & (sf_pl_r  - 1'b1)) == (sf_pl_r  - 1'b1));
      end
      if (chipx1 && frame_edge_code) begin
        start_demod <= start_code_gen;
        sf_next     <= sf_ref;
        sf_pl_n     <= sf_pl_ref;
        new_frame   <= 1'b1;
        chip_cnt    <= '0;
      end else if (chipx1 && new_frame) begin
        sf_frame   <= sf_next;
        sf_pl_r    <= sf_pl_n;
        new_frame  <= 1'b0;
        start_comp <= 1'b1;
        start_avg  <= 1'b1;
        chip_cnt   <= 16'd1;
        clk_sym    <= ((sf_next  - 1'b1) == '0);
        clk_sym_pl <= ((sf_pl_n  - 1'b1) == '0);
      end
    end
  end
endmodule
