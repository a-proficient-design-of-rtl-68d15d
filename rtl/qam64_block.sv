// 64-QAM scheme block (s = 3).
//
// The second interleaver permutation rotates each group of three columns by the
// row phase rho = j mod 3. Reading row by row, row phase 0 visits columns
// 0,1,2,3,..., phase 1 visits 1,2,0,4,5,3,... and phase 2 visits 2,0,1,5,3,4,...
// Every step is one of +d, -2d (inside a group of three) or +4d (into the next group
// on a rotated row), the increments of the 64-QAM hardware model. Example for
// N_cbps = 96, row 1: 17, 33, 1, 65, 81, 49.
//
// The four-way code-rate mux holds the printed column limits 11, 17, 26, 35, i.e.
// (N_cbps/d)-1 for N_cbps = 192, 288, 432, 576 at d = 16. The increment is chosen
// from t = i mod 3 and rho; which increment applies at which phase is derived from
// the standard's permutation. row_off = d * rho_next. Purely combinational. Each
// limit must make N_cbps/d a multiple of 3, which is checked at elaboration.
module qam64_block
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D            = 16,
  parameter int unsigned LAST_COL [4] = '{11, 17, 26, 35}
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
    if ((LAST_COL[k] + 1) % 3 != 0) begin : g_bad
      $error("qam64_block: LAST_COL[%0d]+1 must be a multiple of 3", k);
    end
  end

  localparam step_t P1 = step_t'(D);
  localparam step_t M2 = -step_t'(2 * D);
  localparam step_t P4 = step_t'(4 * D);

  assign last_col = col_t'(LAST_COL[cr]);

  always_comb begin
    unique case ({rho, t})
      {2'd1, 2'd0}: step = P1;  // column 1 -> 2
      {2'd1, 2'd1}: step = M2;  // column 2 -> 0
      {2'd1, 2'd2}: step = P4;  // column 0 -> 4 (next group)
      {2'd2, 2'd0}: step = M2;  // column 2 -> 0
      {2'd2, 2'd1}: step = P1;  // column 0 -> 1
      {2'd2, 2'd2}: step = P4;  // column 1 -> 5 (next group)
      default:      step = P1;  // row phase 0: plain row
    endcase
  end

  always_comb begin
    unique case (rho_next)
      2'd1:    row_off = addr_t'(D);
      2'd2:    row_off = addr_t'(2 * D);
      default: row_off = '0;
    endcase
  end

endmodule
