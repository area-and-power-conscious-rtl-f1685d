// comp: channel / frequency-offset compensator (COMP).
//
// Multiplies each despread DPCH symbol D = DI + jDQ by the estimate
// E = cf_est_cos + j*cf_est_sin (cf_est_sin already carries -sin), which
// removes the channel phase and the frequency offset together and leaves
// the symbol weighted by the path amplitude squared (the maximal ratio
// combining weight):
//   comp_I = DI*cos - DQ*sin,   comp_Q = DI*sin + DQ*cos
// Four 9x9 multipliers give 18-bit products, the 19-bit sums are truncated
// to 15 bits by dropping 4 LSBs (lint reports those LSBs of the sums as
// unused: the truncation is intended). The result is registered on CLK_SYM while
// START_COMP is high and DATA_AV pulses for one cycle with it.
// Until the first CPICH estimate exists (CF_VALID low) a symbol is passed
// on uncompensated, sign-extended to 15 bits; it still raises DATA_AV so
// that symbol numbering in the deskew-combiner stays intact. That handling
// is this design's reading of "not compensated".
module comp
  import rake_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start_comp,
  input  logic                    clk_sym,
  input  sym_t                    demod,
  input  logic signed [SYM_W-1:0] cf_est_cos,
  input  logic signed [SYM_W-1:0] cf_est_sin,
  input  logic                    cf_valid,
  output comp_sym_t               comp_o,
  output logic                    data_av
);
  logic signed [2*SYM_W-1:0] p_ic, p_qs, p_is, p_qc;
  logic signed [2*SYM_W:0]   s_i, s_q;

  assign p_ic = demod.i * cf_est_cos;
  assign p_qs = demod.q * cf_est_sin;
  assign p_is = demod.i * cf_est_sin;
  assign p_qc = demod.q * cf_est_cos;
  assign s_i  = (2*SYM_W+1)'(p_ic) - (2*SYM_W+1)'(p_qs);
  assign s_q  = (2*SYM_W+1)'(p_is) + (2*SYM_W+1)'(p_qc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      comp_o  <= '0;
      data_av <= 1'b0;
    end else begin
      data_av <= clk_sym && start_comp;
      if (clk_sym && start_comp) begin
        if (cf_valid) begin
          comp_o.i <= s_i[2*SYM_W:4];
          comp_o.q <= s_q[2*SYM_W:4];
        end else begin
          comp_o.i <= COMP_W'(demod.i);
          comp_o.q <= COMP_W'(demod.q);
        end
      end
    end
  end
endmodule
