// Master-mode selection and address adder: produces the deinterleaver address kn.
//
// The master mode picks which scheme block (QPSK, 16-QAM, 64-QAM) steers the
// address. Inside a row the next address is the present one plus that block's
// signed increment (a multiple of d), so the whole sequence is built from additions
// and subtractions, with no floor function and no address table. At the end of a row
// the address is loaded with the next row number plus the scheme's row offset
// (d times the next row phase), which is where the next row begins.
//
// Interface: load (new block) sets kn to 0, the first address of every block; adv
// with row_wrap low adds the increment, adv with row_wrap high starts the next row.
// kn is a register; one address per clock while adv is held. Synchronous
// active-low reset. The mux-then-adder structure follows the top-level model; the
// row-start load is this design's choice.
module kn_update
  import wimax_deint_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  adv,
  input  logic  row_wrap,
  input  mode_e mode,
  input  step_t step_q,
  input  step_t step_16,
  input  step_t step_64,
  input  addr_t off_q,
  input  addr_t off_16,
  input  addr_t off_64,
  input  addr_t j_next,
  output addr_t kn
);

  step_t step_sel;
  addr_t off_sel;

  always_comb begin
    unique case (mode)
      MODE_QAM16: begin step_sel = step_16; off_sel = off_16; end
      MODE_QAM64: begin step_sel = step_64; off_sel = off_64; end
      default:    begin step_sel = step_q;  off_sel = off_q;  end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || load)
      kn <= '0;
    else if (adv)
      kn <= row_wrap ? j_next + off_sel : kn + addr_t'(step_sel);
  end

endmodule
