// data_load: per-finger symbol holding stage of the deskew-combiner.
//
// Every compensated DPCH symbol of its finger (DATA_AV) is numbered: the
// symbol counter runs 1 .. CHIPS_PER_FRAME/SF and wraps to 1 at the first
// symbol of the next frame; it also restarts at 1 when the spreading factor
// changes, which happens only at a frame edge. While the finger is on (FINGER_ON) the symbol
// is stored with its number and DESK_DATA_AV is raised until the
// deskew-combiner answers COMB_DONE. On the first symbol of a frame, or
// when the spreading factor changes, the target register block
// FINGER_BLK_FLAG takes the value of MAIN_BLK_FLAG, so that symbols of
// different frames never meet in one register block. Symbols are counted
// even while the finger is off, so that numbering stays aligned with the
// frame. A finger that has been switched on starts handing over symbols
// at the next symbol 1, so the deskew-combiner only ever sees whole frames
// (the finger switches on at a frame edge, just before the last symbol of
// the ending frame is delivered).
// State machine INITIAL -> NOTICE_DESKEWER -> WAIT_DONE -> DONE -> INITIAL
// as in the receiver's data load block; DONE waits for DATA_AV to drop so a
// long DATA_AV cannot load a symbol twice. Counting symbols of a finger
// that is off is this design's choice.
module data_load
  import rake_pkg::*;
#(
  parameter int unsigned CHIPS_PER_FRAME = rake_pkg::FRAME_CHIPS
) (
  input  logic                clk,
  input  logic                rst_n,           // RESET_SYS of the finger
  input  logic                data_av,
  input  logic                comb_done,
  input  logic                finger_on,
  input  logic                main_blk_flag,
  input  logic [SF_W-1:0]     sf_ref,
  input  comp_sym_t           finger_d,
  output comp_sym_t           store,
  output logic [SYMCNT_W-1:0] symbol_cnt,
  output logic                desk_data_av,
  output logic                finger_blk_flag
);
  typedef enum logic [1:0] {DL_INITIAL, DL_NOTICE_DESKEWER, DL_WAIT_DONE, DL_DONE} dl_st_e;
  dl_st_e st;

  logic [SF_W-1:0]     sf_prev;
  logic [SYMCNT_W-1:0] nsyms, next_cnt;
  logic [3:0]          lg;
  logic                active, take;

  always_comb begin
    lg = '0;
    for (int b = 0; b < int'(SF_W); b++)
      if (sf_ref[b]) lg = 4'(b);
    nsyms    = SYMCNT_W'(CHIPS_PER_FRAME >> lg);
    next_cnt = (symbol_cnt >= nsyms || sf_ref != sf_prev) ? SYMCNT_W'(1) : symbol_cnt + 1'b1;
    take     = finger_on && (active || next_cnt == SYMCNT_W'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st              <= DL_INITIAL;
      store           <= '0;
      symbol_cnt      <= '0;
      desk_data_av    <= 1'b0;
      finger_blk_flag <= 1'b0;
      sf_prev         <= '0;
      active          <= 1'b0;
    end else begin
      if (!finger_on) active <= 1'b0;
      unique case (st)
        DL_INITIAL:
          if (data_av) begin
            symbol_cnt <= next_cnt;
            sf_prev    <= sf_ref;
            if (next_cnt == SYMCNT_W'(1))
              finger_blk_flag <= main_blk_flag;
            active <= take;
            if (take) begin
              store <= finger_d;
              st    <= DL_NOTICE_DESKEWER;
            end else begin
              st <= DL_DONE;
            end
          end
        DL_NOTICE_DESKEWER: begin
          desk_data_av <= 1'b1;
          st           <= DL_WAIT_DONE;
        end
        DL_WAIT_DONE:
          if (comb_done) begin
            desk_data_av <= 1'b0;
            st           <= DL_DONE;
          end
        DL_DONE:
          if (!data_av) st <= DL_INITIAL;
        default: st <= DL_INITIAL;
      endcase
    end
  end
endmodule
