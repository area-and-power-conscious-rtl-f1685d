// input_buffer: three-stage sample delay line for the I and Q channels.
//
// Every CHIPX8 cycle a new 6-bit ADC sample pair enters the LATE register
// and the older samples move on to ON-TIME and then EARLY, so the three
// outputs are three consecutive 1/8-chip samples: EARLY is the oldest, LATE
// the newest. All fingers read these registers; each finger samples them on
// its own chip-rate enable, which is how a finger selects its path delay.
// Structure and widths follow the input buffer of the receiver; the
// synchronous active-low clear is this design's choice.
//
// Timing: a sample presented with in_valid=1 at a rising edge appears on
// late_o after that edge, on ontime_o one valid sample later, on early_o two.
module input_buffer
  import rake_pkg::*;
(
  input  logic    clk,       // CHIPX8
  input  logic    rst_n,
  input  logic    in_valid,  // ADC sample strobe (every CHIPX8 cycle in normal use)
  input  sample_t in_s,      // I and Q ADC samples
  output eol_t    eol_o      // early / on-time / late samples
);
  sample_t late_r, ontime_r, early_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      late_r   <= '0;
      ontime_r <= '0;
      early_r  <= '0;
    end else if (in_valid) begin
      late_r   <= in_s;
      ontime_r <= late_r;
      early_r  <= ontime_r;
    end
  end

  assign eol_o.late   = late_r;
  assign eol_o.ontime = ontime_r;
  assign eol_o.early  = early_r;
endmodule
