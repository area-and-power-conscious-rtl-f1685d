// sym_sram: two-bank symbol memory between the receiver and the upper layer.
//
// Bank 0 and bank 1 each hold BANK_WORDS combined symbols (9600, the most
// symbols a frame can carry, at SF 4); the deskew-combiner fills one bank
// per frame and flips banks at frame end, so the upper layer can read the
// previous frame from the other bank. Write port: bank select, 14-bit
// address and an active-low write enable, sampled at the clock edge;
// writes beyond BANK_WORDS are ignored. Read port: registered, one cycle
// latency. The two-bank organisation and address split follow the
// receiver's SRAM controller; the memory itself lies outside the receiver
// there and is written here as a plain array.
module sym_sram
  import rake_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 9600
) (
  input  logic        clk,
  input  logic        wr_bank,
  input  logic [13:0] wr_addr,
  input  logic        wr_en_n,
  input  comb_sym_t   wr_data,
  input  logic        rd_bank,
  input  logic [13:0] rd_addr,
  output comb_sym_t   rd_data
);
  localparam int unsigned AW = $clog2(2 * BANK_WORDS);

  comb_sym_t mem [2 * BANK_WORDS];

  logic [AW-1:0] wi, ri;
  assign wi = wr_bank ? AW'(BANK_WORDS) + AW'(wr_addr) : AW'(wr_addr);
  assign ri = rd_bank ? AW'(BANK_WORDS) + AW'(rd_addr) : AW'(rd_addr);

  always_ff @(posedge clk) begin
    if (!wr_en_n && wr_addr < 14'(BANK_WORDS)) mem[wi] <= wr_data;
    if (rd_addr < 14'(BANK_WORDS)) rd_data <= mem[ri];
    else                           rd_data <= '0;
  end
endmodule
