// scrambling_gen: WCDMA downlink complex scrambling code generator.
//
// Two 18-stage LFSRs produce the m-sequences x (1 + X^7 + X^18) and y
// (1 + X^5 + X^7 + X^10 + X^18). The real part of the code is x(0) xor
// y(0); the imaginary part is the same Gold sequence shifted by 131072
// chips, obtained from the taps x(4,6,15) and y(5,6,8..15). Register bit k
// holds x(i+k), so bit 0 is the current chip.
// The x register is loaded with X_SEED on the code-initialisation chip of
// every frame (FRAME_EDGE_CODE together with CHIPX1) and y with all ones;
// both then advance on every CHIPX1 while START_CODE_GEN is high, so the
// code restarts every 38400-chip frame. X_SEED = 1 gives code number 0;
// code number n needs the x state advanced by n steps, which the upper
// layer supplies. Polynomials, taps and initial states follow the
// standard generator the receiver uses; the seed input is this design's.
// Outputs are single bits, 0 for +1 and 1 for -1, valid in the cycle of
// each data-chip enable.
module scrambling_gen
  import rake_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipx1,
  input  logic        frame_edge_code,
  input  logic        start_code_gen,
  input  logic [17:0] x_seed,
  output logic        s_i,
  output logic        s_q
);
  logic [17:0] x, y;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= 18'h1;
      y <= '1;
    end else if (chipx1) begin
      if (frame_edge_code) begin
        x <= x_seed;
        y <= '1;
      end else if (start_code_gen) begin
        x <= {x[7] ^ x[0], x[17:1]};
        y <= {y[10] ^ y[7] ^ y[5] ^ y[0], y[17:1]};
      end
    end
  end

  assign s_i = x[0] ^ y[0];
  assign s_q = (x[4] ^ x[6] ^ x[15]) ^
               (y[5] ^ y[6] ^ y[8] ^ y[9] ^ y[10] ^ y[11] ^ y[12] ^ y[13] ^ y[14] ^ y[15]);
endmodule
