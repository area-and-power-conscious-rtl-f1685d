// finger_decision: finger on/off decision with hysteresis (FINGER_DECISION).
//
// Compares every new magnitude estimate (MAG_AV) with two thresholds from
// the upper layer. Above ON_TH the finger is wanted on; below OFF_TH it is
// turned off at once. Between the thresholds the previous decision stands,
// so a magnitude hovering near one threshold cannot toggle the finger.
// A finger that is off is switched on only at a frame edge
// (FRAME_EDGE_CODE), so that its symbols always start with the first
// symbol of a frame. Thresholds and hysteresis follow the receiver's
// decision block; the frame-edge gating applies the receiver's rule that a
// finger turned off mid-frame stays off until a new frame begins.
module finger_decision
  import rake_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_edge_code,
  input  logic             mag_av,
  input  logic [MAG_W-1:0] mag,
  input  logic [MAG_W-1:0] off_th,
  input  logic [MAG_W-1:0] on_th,
  output logic             finger_on
);
  logic want_on;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      want_on   <= 1'b0;
      finger_on <= 1'b0;
    end else begin
      if (mag_av && mag > on_th) want_on <= 1'b1;
      if (mag_av && mag < off_th) begin
        want_on   <= 1'b0;
        finger_on <= 1'b0;
      end else if (frame_edge_code && want_on) begin
        finger_on <= 1'b1;
      end
    end
  end
endmodule
