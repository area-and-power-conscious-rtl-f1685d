// demod: despreader for one channel of one finger (DEMOD).
//
// For every data chip the received sample R = Ri + jRq is multiplied by
// the conjugate scrambling code (Si - jSq) and by the OVSF code C, all
// codes being +-1:
//   re = (Ri*Si + Rq*Sq) * C,   im = (Rq*Si - Ri*Sq) * C   (7 bits each)
// and the products are summed over SF chips. The full sum has 7 + log2(SF)
// bits (9 for SF 4, 15 for the CPICH SF 256, 16 for SF 512); it is
// truncated to its 9 most significant bits by an arithmetic right shift of
// log2(SF) - 2, saturating in the one corner (all samples -32) that would
// not fit. The symbol register is loaded with the last chip of every
// symbol and holds it until the next symbol, i.e. it is new in the cycle of
// CLK_SYM / CLK_SYM_PL from the control generator.
// A finger uses four of these: DPCH on-time and CPICH early, on-time and
// late. Data chips are the CHIPX1 enables while START_DEMOD is high. The
// code-initialisation chip (FRAME_EDGE_CODE with CHIPX1) is the last data
// chip of the ending frame: it is despread with the old codes and closes
// the frame's last symbol, then the chip counter restarts and the new
// spreading factor is latched.
// Despreading and the 9-bit truncation follow the receiver's demodulator;
// the internal chip counter is this design's.
module demod
  import rake_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_demod,
  input  logic            frame_edge_code,
  input  logic            chipx1,
  input  logic [SF_W-1:0] sf_ref,
  input  sample_t         r,
  input  logic            s_i,     // scrambling code, 0 = +1
  input  logic            s_q,
  input  logic            c,       // OVSF code, 0 = +1
  output sym_t            demod_o
);
  localparam int ACC_W = 18;

  logic [SF_W-1:0]         cnt, sf_r;
  logic signed [ACC_W-1:0] acc_i, acc_q, sum_i, sum_q;
  logic signed [7:0]       ti, tq;     // 7-bit products held in 8 bits
  logic [3:0]              lg;
  logic                    data_chip, last;

  // saturate a shifted sum to the 9-bit output range
  function automatic logic signed [SYM_W-1:0] sat9(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(255))        return SYM_W'(255);
    else if (v < -ACC_W'(256))  return SYM_W'(-256);
    else                        return SYM_W'(v);
  endfunction

  function automatic logic signed [7:0] pm(input logic signed [5:0] v, input logic neg);
    return neg ? -8'(v) : 8'(v);
  endfunction

  always_comb begin
    ti = pm(r.i, s_i) + pm(r.q, s_q);
    tq = pm(r.q, s_i) - pm(r.i, s_q);
    if (c) begin
      ti = -ti;
      tq = -tq;
    end
    sum_i = acc_i + ACC_W'(ti);
    sum_q = acc_q + ACC_W'(tq);
    lg = '0;
    for (int b = 0; b < int'(SF_W); b++)
      if (sf_r[b]) lg = 4'(b);
  end

  assign data_chip = chipx1 && start_demod;
  assign last      = (cnt == sf_r - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      sf_r    <= SF_W'(4);
      acc_i   <= '0;
      acc_q   <= '0;
      demod_o <= '0;
    end else begin
      if (data_chip) begin
        if (last) begin
          cnt       <= '0;
          acc_i     <= '0;
          acc_q     <= '0;
          demod_o.i <= sat9(sum_i >>> (lg - 4'd2));
          demod_o.q <= sat9(sum_q >>> (lg - 4'd2));
        end else begin
          cnt   <= cnt + 1'b1;
          acc_i <= sum_i;
          acc_q <= sum_q;
        end
      end
      // a new frame starts after this chip: partial symbols are dropped
      if (chipx1 && frame_edge_code) begin
        cnt   <= '0;
        sf_r  <= sf_ref;
        acc_i <= '0;
        acc_q <= '0;
      end
    end
  end
endmodule
