// ovsf_gen: OVSF channelisation code generator, code C(SF,k).
//
// The OVSF tree doubles a code C into (C,C) and (C,-C) at each level, so
// chip j of C(SF,k) with SF = 2^L is the parity of k[m] & j[L-1-m] over
// m = 0..L-1 (0 = +1, 1 = -1). A chip counter restarts on the
// code-initialisation chip of every frame (FRAME_EDGE_CODE with CHIPX1),
// where SF and k are also latched, and advances on every CHIPX1 while
// START_CODE_GEN is high. SF must be a power of two, 4..512. The tree is
// the standard one the receiver uses; the counter-and-parity realisation
// is this design's. Output is valid in the cycle of each data-chip enable.
module ovsf_gen
  import rake_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            chipx1,
  input  logic            frame_edge_code,
  input  logic            start_code_gen,
  input  logic [SF_W-1:0] sf,
  input  logic [SF_W-1:0] code_k,
  output logic            c
);
  logic [SF_W-1:0] j, sf_r, k_r;
  logic [3:0]      lg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j    <= '0;
      sf_r <= SF_W'(4);
      k_r  <= '0;
    end else if (chipx1) begin
      if (frame_edge_code) begin
        j    <= '0;
        sf_r <= sf;
        k_r  <= code_k;
      end else if (start_code_gen) begin
        j <= (j + 1'b1) & (sf_r - 1'b1);
      end
    end
  end

  always_comb begin
    lg = '0;
    for (int b = 0; b < int'(SF_W); b++)
      if (sf_r[b]) lg = 4'(b);
    c = 1'b0;
    for (int m = 0; m < int'(SF_W); m++)
      if (m < int'(lg)) c = c ^ (k_r[m] & j[int'(lg) - 1 - m]);
  end
endmodule
