// Row counter (j) with its comparator.
//
// Counts the row index j of the deinterleaver block from 0 to d-1; it advances once
// per completed row and the comparator (j == d-1) flags the last row of a block.
// It also keeps rho = j mod s, the row phase: rows whose phase is not zero start some
// columns to the right and use the larger increments. rho_next is the phase of the
// row that follows (0 after the last row). The counter/comparator pair follows the
// hardware models; the phase counter is this design's way of avoiding a modulo.
//
// Interface: load (new block) clears j and rho; adv steps one row; load wins.
// Outputs are taken from registers, wrap and rho_next are combinational.
module row_counter
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D   = 16,
  localparam int unsigned J_W = $clog2(D)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           adv,
  input  logic [1:0]     s,
  output logic [J_W-1:0] j,
  output logic [1:0]     rho,
  output logic [1:0]     rho_next,
  output logic           wrap
);

  assign wrap     = (j == J_W'(D - 1));
  assign rho_next = (wrap || rho == s - 2'd1) ? 2'd0 : rho + 2'd1;

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      j   <= '0;
      rho <= '0;
    end else if (adv) begin
      j   <= wrap ? '0 : j + 1'b1;
      rho <= rho_next;
    end
  end

endmodule
