// rake_pkg: constants and types shared by the WCDMA downlink rake receiver.
//
// Whole design runs from one clock, CHIPX8 (30.72 MHz, eight samples per
// chip). The chip-rate clock CHIPX1 is represented as a one-cycle enable
// pulse on that clock rather than as a second clock. Spreading codes are
// carried as single bits with 0 meaning +1 and 1 meaning -1. Compiled on
// its own the package uses none of its constants, so lint lists them as
// unused; the modules that import it use all of them.
package rake_pkg;

  // Frame timing: 38400 chips per 10 ms frame, eight samples per chip.
  localparam int unsigned FRAME_CHIPS     = 38400;
  localparam int unsigned CHIP_OSR        = 8;
  localparam int unsigned CPICH_SF        = 256;

  // Data widths along the finger.
  localparam int unsigned SAMPLE_W = 6;   // ADC sample
  localparam int unsigned SYM_W    = 9;   // despread / averaged / CF estimate
  localparam int unsigned COMP_W   = 15;  // compensated DPCH symbol
  localparam int unsigned MAG_W    = 10;  // magnitude estimate
  localparam int unsigned POW_W    = 18;  // per-frame power sum
  localparam int unsigned FREQ_W   = 27;  // per-frame frequency-offset sums
  localparam int unsigned SF_W     = 10;  // spreading factor 4..512
  localparam int unsigned SYMCNT_W = 14;  // symbol index within a frame
  localparam int unsigned COMB_W   = 17;  // combined symbol (sum of 4 fingers)
  localparam int unsigned TOFF_W   = 19;  // time offset in 1/8 chip, < 307200

  // Time tracking result sent to the clock generator.
  typedef enum logic [1:0] {
    LL_NONE = 2'b00,   // keep timing
    LL_LEAD = 2'b01,   // advance sampling by 1/8 chip
    LL_LAG  = 2'b10    // delay sampling by 1/8 chip
  } lead_lag_e;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } sample_t;

  typedef struct packed {
    logic signed [SYM_W-1:0] i;
    logic signed [SYM_W-1:0] q;
  } sym_t;

  typedef struct packed {
    logic signed [COMP_W-1:0] i;
    logic signed [COMP_W-1:0] q;
  } comp_sym_t;

  typedef struct packed {
    logic signed [COMB_W-1:0] i;
    logic signed [COMB_W-1:0] q;
  } comb_sym_t;

  // Early, on-time and late samples of one channel pair.
  typedef struct packed {
    sample_t early;
    sample_t ontime;
    sample_t late;
  } eol_t;

  // Magnitude approximation max(|a|,|b|) + min(|a|,|b|)/2 (no multiplier).
  function automatic logic [MAG_W-1:0] mag_approx(input logic signed [SYM_W-1:0] a,
                                                  input logic signed [SYM_W-1:0] b);
    logic [SYM_W-1:0] aa, bb, mx, mn;
    aa = a[SYM_W-1] ? SYM_W'(-a) : SYM_W'(a);
    bb = b[SYM_W-1] ? SYM_W'(-b) : SYM_W'(b);
    mx = (aa > bb) ? aa : bb;
    mn = (aa > bb) ? bb : aa;
    return MAG_W'(mx) + MAG_W'(mn >> 1);
  endfunction

endpackage
