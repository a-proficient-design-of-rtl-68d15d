// QPSK scheme block (s = 1).
//
// For QPSK the second interleaver permutation is the identity, so the deinterleaver
// simply reads the d x (N_cbps/d) block by rows: addresses j, j+d, j+2d, ... .
// The block holds the eight-way code-rate mux of the QPSK hardware model, whose
// printed inputs (8, 16, 24, 17, 32, 26, 40, 48) are taken as the column limit
// (N_cbps/d)-1 like the 64-QAM mux values, and gives the master-mode increment +d.
// Six of those values, 8..48, also equal N_cbps/12 for QPSK blocks of 96..576 bits;
// the array is a parameter so either set of block sizes can be selected. The next
// row always starts in column 0, so its row offset is 0.
//
// Purely combinational. t, rho and rho_next are inputs only so that the three scheme
// blocks share one interface; QPSK does not depend on them, so its increment and
// row offset are constants and only the code-rate mux is logic.
module qpsk_block
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D            = 16,
  parameter int unsigned LAST_COL [8] = '{8, 16, 24, 17, 32, 26, 40, 48}
) (
  input  logic [2:0] cr,
  input  logic [1:0] t,
  input  logic [1:0] rho,
  input  logic [1:0] rho_next,
  output col_t       last_col,
  output step_t      step,
  output addr_t      row_off
);

  logic unused;
  assign unused = ^{t, rho, rho_next};

  assign last_col = col_t'(LAST_COL[cr]);
  assign step     = step_t'(D);
  assign row_off  = '0;

endmodule
