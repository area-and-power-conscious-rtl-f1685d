// deskew_combiner: deskewer, maximal-ratio combiner and SRAM controller.
//
// Fingers deliver their compensated DPCH symbols at different times (their
// paths have different delays). Each symbol carries its number within the
// frame and the index of its target register block (from data_load).
//
// Selection: a priority encoder picks the lowest-numbered finger with
// DESK_DATA_AV, answers it with COMB_DONE and latches its symbol, number
// and block flag, in every cycle in which some finger is waiting (the
// deskew state machine's INITIAL / START_COMB loop). A finger
// already answered in the previous cycle is masked out.
//
// Register blocks: two blocks (EVEN = 0, ODD = 1), each REG_LEN = 8
// entries of I/Q sums with an address tag ADDR_CNT (3 LSBs of the symbol
// number held in that entry), the expected next symbol number REG_SYM_CNT
// (starts at 1) and REG_CNT (newest symbol number, saturating at 7). A
// symbol whose number equals REG_SYM_CNT is new: the block shifts right by
// one and the symbol enters entry 0 with its tag. Any other symbol is
// added to the entry whose tag matches its 3 LSBs. So deskewing and
// combining happen in the same step and the block needs only as many
// entries as the largest path-delay spread in symbols (8 = 32 chips at
// SF 4). When a block's REG_CNT reaches 7, MAIN_BLK_FLAG is pointed at the
// other block, so the next frame's symbols go there.
//
// Dump modes (DUMP_BLK is the block being written to SRAM):
//   NORMAL      entry 7 of DUMP_BLK is written once its tag equals the
//               expected dump number REG_DUMP_CNT (the symbol has had
//               7 newer symbols after it, so all fingers have added to it).
//   NORMAL_FAST entered when the first symbol of a new frame reaches the
//               other block; both blocks are then in use.
//   FAST        entered when the other block holds 6 symbols of the new
//               frame; DUMP_BLK is closed for input and its remaining
//               entries are written one per access, from the last not yet
//               written down to entry 0. Afterwards the block is cleared,
//               DUMP_BLK flips, the SRAM bank flips and the mode returns
//               to NORMAL.
// SRAM access state machine: INITIAL -> SEND_DATA (SRAM_WEN low) ->
// WRITE_DONE -> WRITE_COMPLETE (address + 1) or CHANGE_SRAM_ADDR (bank
// flip, address 0) -> INITIAL: four CHIPX8 cycles per access. The SRAM
// address is 15 bits: the MSB selects one of two banks (one per frame),
// the 14 LSBs address up to 9600 symbols.
// The structure, the register-block rules, the three dump modes and the
// access sequence follow the receiver's deskew-combiner. This design's
// own choices: 17-bit sums, the tag search picks the lowest matching
// entry, symbols arriving for a closed block are dropped, only the
// flushing block is ever closed, and the FAST flush ends after entry 0.
module deskew_combiner
  import rake_pkg::*;
#(
  parameter int unsigned N_FINGERS = 4,
  parameter int unsigned REG_LEN   = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                desk_data_av    [N_FINGERS],
  input  comp_sym_t           store           [N_FINGERS],
  input  logic [SYMCNT_W-1:0] symbol_cnt      [N_FINGERS],
  input  logic                finger_blk_flag [N_FINGERS],
  output logic                comb_done       [N_FINGERS],
  output logic                main_blk_flag,
  // symbol SRAM write port
  output logic                sram_en,         // bank select (address MSB)
  output logic [13:0]         sram_addr,
  output logic                sram_wen,        // write enable, active low
  output comb_sym_t           sram_data,
  // observation
  output logic [1:0]          dump_mode_o      // 0 NORMAL, 1 NORMAL_FAST, 2 FAST
);
  localparam int unsigned PW = $clog2(REG_LEN);
  localparam int unsigned FW = (N_FINGERS > 1) ? $clog2(N_FINGERS) : 1;

  typedef enum logic [1:0] {DM_NORMAL, DM_NORMAL_FAST, DM_FAST} dm_e;
  typedef enum logic [2:0] {SA_INITIAL, SA_SEND_DATA, SA_WRITE_DONE, SA_CHANGE_SRAM_ADDR,
                            SA_WRITE_COMPLETE} sa_st_e;

  dm_e    dump_mode;
  sa_st_e sa_st;

  // deskew selection
  logic [N_FINGERS-1:0] avail;
  logic                 data_av_flag;
  logic [FW-1:0]        pe;
  logic                 op_valid;
  logic [SYMCNT_W-1:0]  symbol_cnt_reg;
  comp_sym_t            store_reg;
  logic                 fbf_reg;

  // register blocks
  comb_sym_t           blk      [2][REG_LEN];
  logic [PW-1:0]       addr_cnt [2][REG_LEN];
  logic [SYMCNT_W-1:0] reg_sym_cnt [2];
  logic [PW-1:0]       reg_cnt [2];

  // dump / SRAM
  logic                dump_blk;
  logic [PW-1:0]       dump_pos;
  logic [PW-1:0]       reg_dump_cnt;
  logic [14:0]         sram_addr_reg;
  logic                frame_done;     // WRITE_DONE after the last FAST write

  // ---------------- priority encoder ----------------
  always_comb begin
    for (int f = 0; f < int'(N_FINGERS); f++) avail[f] = desk_data_av[f] && !comb_done[f];
    data_av_flag = |avail;
    pe = '0;
    for (int f = int'(N_FINGERS) - 1; f >= 0; f--)
      if (avail[f]) pe = FW'(f);
  end

  // ---------------- deskew state machine ----------------
  // INITIAL/START_COMB reduce to: in every cycle with an available finger,
  // select it (NUM_AV_FINGER = pe), answer COMB_DONE and latch its data.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_valid       <= 1'b0;
      symbol_cnt_reg <= '0;
      store_reg      <= '0;
      fbf_reg        <= 1'b0;
      for (int f = 0; f < int'(N_FINGERS); f++) comb_done[f] <= 1'b0;
    end else begin
      op_valid <= data_av_flag;
      for (int f = 0; f < int'(N_FINGERS); f++)
        comb_done[f] <= data_av_flag && (FW'(f) == pe);
      if (data_av_flag) begin
        symbol_cnt_reg <= symbol_cnt[pe];
        store_reg      <= store[pe];
        fbf_reg        <= finger_blk_flag[pe];
      end
    end
  end

  // ---------------- register blocks ----------------
  logic          is_new, blocked;
  logic [PW-1:0] hit_pos;
  logic          hit;

  assign is_new  = (symbol_cnt_reg >= reg_sym_cnt[fbf_reg]);
  assign blocked = (dump_mode == DM_FAST) && (fbf_reg == dump_blk);

  always_comb begin
    hit     = 1'b0;
    hit_pos = '0;
    for (int p = int'(REG_LEN) - 1; p >= 0; p--)
      if (addr_cnt[fbf_reg][p] == symbol_cnt_reg[PW-1:0]) begin
        hit     = 1'b1;
        hit_pos = PW'(p);
      end
  end

  function automatic comb_sym_t add_sym(input comb_sym_t a, input comp_sym_t b);
    comb_sym_t r;
    r.i = a.i + COMB_W'(b.i);
    r.q = a.q + COMB_W'(b.q);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        for (int p = 0; p < int'(REG_LEN); p++) begin
          blk[b][p]      <= '0;
          addr_cnt[b][p] <= '0;
        end
        reg_sym_cnt[b] <= SYMCNT_W'(1);
        reg_cnt[b]     <= '0;
      end
      main_blk_flag <= 1'b0;
    end else begin
      if (op_valid && !blocked) begin
        if (is_new) begin
          for (int p = int'(REG_LEN) - 1; p > 0; p--) begin
            blk[fbf_reg][p]      <= blk[fbf_reg][p-1];
            addr_cnt[fbf_reg][p] <= addr_cnt[fbf_reg][p-1];
          end
          blk[fbf_reg][0]      <= add_sym('0, store_reg);
          addr_cnt[fbf_reg][0] <= symbol_cnt_reg[PW-1:0];
          reg_sym_cnt[fbf_reg] <= symbol_cnt_reg + 1'b1;
          if (reg_cnt[fbf_reg] != PW'(REG_LEN - 1)) begin
            reg_cnt[fbf_reg] <= reg_cnt[fbf_reg] + 1'b1;
            if (reg_cnt[fbf_reg] == PW'(REG_LEN - 2)) main_blk_flag <= ~fbf_reg;
          end
        end else if (hit) begin
          blk[fbf_reg][hit_pos] <= add_sym(blk[fbf_reg][hit_pos], store_reg);
        end
      end
      // a block that has been written out completely is cleared
      if (frame_done) begin
        for (int p = 0; p < int'(REG_LEN); p++) begin
          blk[dump_blk][p]      <= '0;
          addr_cnt[dump_blk][p] <= '0;
        end
        reg_sym_cnt[dump_blk] <= SYMCNT_W'(1);
        reg_cnt[dump_blk]     <= '0;
      end
    end
  end

  // ---------------- dump mode and SRAM access state machines ----------------
  logic normal_ready, enter_fast;
  assign normal_ready = (reg_dump_cnt == addr_cnt[dump_blk][REG_LEN-1]);
  assign enter_fast   = (dump_mode == DM_NORMAL_FAST) && (sa_st == SA_INITIAL) &&
                        (reg_cnt[~dump_blk] >= PW'(REG_LEN - 2));
  assign frame_done   = (sa_st == SA_WRITE_DONE) && (dump_mode == DM_FAST) && (dump_pos == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dump_mode     <= DM_NORMAL;
      sa_st         <= SA_INITIAL;
      dump_blk      <= 1'b0;
      dump_pos      <= PW'(REG_LEN - 1);
      reg_dump_cnt  <= PW'(1);
      sram_addr_reg <= '0;
      sram_wen      <= 1'b1;
      sram_data     <= '0;
    end else begin
      // dump mode transitions
      unique case (dump_mode)
        DM_NORMAL:
          if (op_valid && fbf_reg != dump_blk && symbol_cnt_reg == SYMCNT_W'(1))
            dump_mode <= DM_NORMAL_FAST;
        DM_NORMAL_FAST:
          if (enter_fast) begin
            dump_mode <= DM_FAST;
            // entry 7 may already have been written in NORMAL mode
            dump_pos  <= normal_ready ? PW'(REG_LEN - 1) : PW'(REG_LEN - 2);
          end
        DM_FAST: ;
        default: dump_mode <= DM_NORMAL;
      endcase

      unique case (sa_st)
        SA_INITIAL:
          if (dump_mode == DM_FAST) begin
            sram_data <= blk[dump_blk][dump_pos];
            sram_wen  <= 1'b0;
            sa_st     <= SA_SEND_DATA;
          end else if (normal_ready && !enter_fast) begin
            sram_data <= blk[dump_blk][REG_LEN-1];
            sram_wen  <= 1'b0;
            sa_st     <= SA_SEND_DATA;
          end
        SA_SEND_DATA: begin
          sram_wen <= 1'b1;
          sa_st    <= SA_WRITE_DONE;
        end
        SA_WRITE_DONE: begin
          reg_dump_cnt <= reg_dump_cnt + 1'b1;
          if (frame_done) begin
            dump_blk     <= ~dump_blk;
            dump_pos     <= PW'(REG_LEN - 1);
            reg_dump_cnt <= PW'(1);
            dump_mode    <= DM_NORMAL;
            sa_st        <= SA_CHANGE_SRAM_ADDR;
          end else begin
            if (dump_mode == DM_FAST) dump_pos <= dump_pos - 1'b1;
            sa_st <= SA_WRITE_COMPLETE;
          end
        end
        SA_CHANGE_SRAM_ADDR: begin
          sram_addr_reg <= {~sram_addr_reg[14], 14'd0};
          sa_st         <= SA_INITIAL;
        end
        SA_WRITE_COMPLETE: begin
          sram_addr_reg <= sram_addr_reg + 1'b1;
          sa_st         <= SA_INITIAL;
        end
        default: sa_st <= SA_INITIAL;
      endcase
    end
  end

  assign sram_en     = sram_addr_reg[14];
  assign sram_addr   = sram_addr_reg[13:0];
  assign dump_mode_o = dump_mode;
endmodule
