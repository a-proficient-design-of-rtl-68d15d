// Column counter (i) with its comparator.
//
// Counts the column index i of the deinterleaver block from 0 up to last_col, the
// value (N_cbps/d)-1 chosen by the code-rate mux of the active scheme, and wraps back
// to 0 when the comparator sees i == last_col (that is the end of a row). Beside i it
// keeps t = i mod s in a small counter that restarts with every row; the scheme blocks
// use t to pick the next address increment, so no divider is needed. The counter,
// comparator and reset-on-match follow the hardware models; the mod-s phase counter
// is this design's way of steering the increments.
//
// Interface: load (new block) clears i and t; adv steps one column. load wins over
// adv. wrap is combinational from the registered count. Synchronous active-low reset.
module column_counter
  import wimax_deint_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       adv,
  input  col_t       last_col,
  input  logic [1:0] s,
  output col_t       i,
  output logic [1:0] t,
  output logic       wrap
);

  assign wrap = (i == last_col);

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      i <= '0;
      t <= '0;
    end else if (adv) begin
      if (wrap) begin
        i <= '0;
        t <= '0;
      end else begin
        i <= i + 1'b1;
        t <= (t == s - 2'd1) ? 2'd0 : t + 2'd1;
      end
    end
  end

endmodule
