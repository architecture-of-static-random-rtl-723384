// rsram_array: 16-word x 8-bit static RAM made of reversible cells.
//
// Organisation
//   * row_decoder turns addr into 16 one-hot word lines, enabled while a
//     read or a write is requested.
//   * each row is BITS rsram_cell instances; only the first cell is driven
//     by the decoder, each following cell takes the word line passed on by
//     its left neighbour (wl_out -> wl_in).
//   * write circuit: during a write it puts din on the column write lines
//     (bit_in of every cell in that column); the addressed row stores it.
//   * each column's read lines are ORed over the rows (only the addressed
//     row drives them) and resolved by a sense_amp.
//
// Interface and timing (one port, synchronous):
//   * write: we=1 with addr/din on a rising edge; the word is stored at that
//     edge.
//   * read:  re=1 with addr on a rising edge; dout holds the word after that
//     edge and dout_valid pulses high for that cycle.  dout holds its value
//     until the next read.
//   * we and re must not both be high (asserted).  A read of a word sees the
//     value written on an earlier edge.
// The stored words are not reset; dout and dout_valid are (asynchronous,
// active low).
//
// The 16 x 8 size, the decoder built from enabled 2-to-4 decoders, the word
// line chained from cell to cell, the write circuit and the sense amplifier
// on each column follow the design.  The single-port synchronous protocol and
// the valid flag are this implementation's choices.
module rsram_array
  import rlogic_pkg::*;
#(
  parameter int unsigned WORDS = SRAM_WORDS,
  parameter int unsigned BITS  = SRAM_BITS,
  localparam int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [BITS-1:0]   din,
  output logic [BITS-1:0]   dout,
  output logic              dout_valid
);

  // The row decoder is built for 16 rows.
  if (WORDS != 16) begin : g_bad_size
    $error("rsram_array: WORDS must be 16 (row_decoder is 4-to-16)");
  end

  logic [WORDS-1:0] wl;
  logic [BITS-1:0]  wr_bit;
  logic [BITS:0]    wl_chain [WORDS];
  logic [BITS-1:0]  cell_bl  [WORDS];
  logic [BITS-1:0]  cell_blb [WORDS];
  logic [BITS-1:0]  col_bl, col_blb;

  row_decoder u_dec (.en(we | re), .addr(addr), .wl(wl));

  // write circuit
  always_comb wr_bit = we ? din : '0;

  for (genvar r = 0; r < WORDS; r++) begin : g_row
    assign wl_chain[r][0] = wl[r];
    for (genvar b = 0; b < BITS; b++) begin : g_col
      rsram_cell u_cell (
        .clk   (clk),
        .wl_in (wl_chain[r][b]),
        .we    (we),
        .re    (re),
        .bit_in(wr_bit[b]),
        .wl_out(wl_chain[r][b+1]),
        .bl    (cell_bl[r][b]),
        .blb   (cell_blb[r][b])
      );
    end
  end

  // column read lines: wired OR over the rows
  always_comb begin
    col_bl  = '0;
    col_blb = '0;
    for (int r = 0; r < WORDS; r++) begin
      col_bl  |= cell_bl[r];
      col_blb |= cell_blb[r];
    end
  end

  for (genvar b = 0; b < BITS; b++) begin : g_sa
    sense_amp u_sa (
      .clk(clk), .rst_n(rst_n), .sae(re), .bl(col_bl[b]), .blb(col_blb[b]), .dout(dout[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= re;
  end

  a_one_op : assert property (@(posedge clk) disable iff (!rst_n) !(we && re))
    else $error("rsram_array: read and write requested together");

endmodule
