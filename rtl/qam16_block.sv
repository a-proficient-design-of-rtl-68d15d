// 16-QAM scheme block (s = 2).
//
// The second interleaver permutation swaps the two bits of each pair of columns on
// every odd row. Reading the block row by row, an even row steps +d through the
// columns (0, 1, 2, 3, ...), an odd row visits columns 1, 0, 3, 2, ... so its
// addresses alternate -d and +3d and the row starts one column in (offset d).
// Example for N_cbps = 96: row 1 reads 17, 1, 49, 33, 81, 65.
//
// The block holds a four-way code-rate mux giving the column limit (N_cbps/d)-1 and
// picks the increment from the column phase t = i mod 2 and row phase rho = j mod 2.
// row_off is d * rho_next, the column offset of the first address of the next row.
// The increments -d and +3d are those of the algorithm; the mux contents (depths 192,
// 288, 384, 576) are this design's choice. Purely combinational. Each limit must make
// N_cbps/d even, which is checked at elaboration.
module qam16_block
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D            = 16,
  parameter int unsigned LAST_COL [4] = '{11, 17, 23, 35}
) (
  input  logic [1:0] cr,
  input  logic [1:0] t,
  input  logic [1:0] rho,
  input  logic [1:0] rho_next,
  output col_t       last_col,
  output step_t      step,
  output addr_t      row_off
);

  for (genvar k = 0; k < 4; k++) begin : g_chk
    if ((LAST_COL[k] + 1) % 2 != 0) begin : g_bad
      $error("qam16_block: LAST_COL[%0d]+1 must be a multiple of 2", k);
    end
  end

  assign last_col = col_t'(LAST_COL[cr]);

  always_comb begin
    if (rho == 2'd0)    step = step_t'(D);       // plain row
    else if (t == 2'd0) step = -step_t'(D);      // column 1 -> 0 of a pair
    else                step = step_t'(3 * D);   // column 0 -> 3 (next pair)
  end

  assign row_off = addr_t'((rho_next == 2'd1) ? D : 0);

endmodule
