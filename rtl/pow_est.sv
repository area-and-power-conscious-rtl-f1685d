// pow_est: power estimator (POW_EST).
//
// Estimates the magnitude of each averaged pilot symbol without
// multipliers or square root: MAG = max(|I|,|Q|) + min(|I|,|Q|)/2 (9-bit
// absolute values, 10-bit result, about 6 % average error against the true
// magnitude). MAG is registered on CHIPX_PL and MAG_AV pulses in the next
// cycle for the finger on/off decision. MAG is also summed over one frame
// of SYMS_PER_FRAME pilot symbols into the 18-bit POWER for the DSP, with a
// one-cycle POWER_AV pulse. Structure and widths follow the receiver's
// power estimator; MAG_AV is this design's.
module pow_est
  import rake_pkg::*;
#(
  parameter int unsigned SYMS_PER_FRAME = 150
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chipx_pl,
  input  sym_t             mv_avg,
  output logic [MAG_W-1:0] mag,
  output logic             mag_av,
  output logic [POW_W-1:0] power,
  output logic             power_av
);
  logic [MAG_W-1:0] m;
  logic [POW_W-1:0] acc, nacc;
  logic [15:0]      nsym;

  assign m    = mag_approx(mv_avg.i, mv_avg.q);
  assign nacc = acc + POW_W'(m);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mag      <= '0;
      mag_av   <= 1'b0;
      power    <= '0;
      power_av <= 1'b0;
      acc      <= '0;
      nsym     <= '0;
    end else begin
      mag_av   <= chipx_pl;
      power_av <= 1'b0;
      if (chipx_pl) begin
        mag <= m;
        if (nsym == 16'(SYMS_PER_FRAME - 1)) begin
          power    <= nacc;
          power_av <= 1'b1;
          acc      <= '0;
          nsym     <= '0;
        end else begin
          acc  <= nacc;
          nsym <= nsym + 1'b1;
        end
      end
    end
  end
endmodule
