// Adaptive WiMAX (IEEE 802.16e) deinterleaver address generator, top level.
//
// The receiver writes a block of N_cbps coded bits into a buffer and reads it back in
// the order given by the deinterleaver permutation. With d = 16 rows and
// C = N_cbps/d columns, the address read at position (row j, column i) is
//   kn = j + d * col(i, j),  col = s*floor(i/s) + ((i mod s) + (j mod s)) mod s,
// with s = 1, 2, 3 for QPSK, 16-QAM, 64-QAM. This block produces that sequence with
// no floor function and no table: a column counter and a row counter (each with a
// comparator) track i and j and their phases mod s, the three scheme blocks turn the
// phases into an increment of +d, -d, +3d, -2d or +4d, and the master mode selects
// which one the address adder applies to the present address.
//
// Interface: mastermode (0 QPSK, 1 16-QAM, 2 64-QAM, 3 treated as QPSK) and cr (code
// rate, selects the column limit of the scheme's mux; 16-QAM and 64-QAM use cr[1:0])
// are sampled when a block starts and held to its end, so every block is a complete
// permutation and a modulation switch takes effect at the next block. This sampling
// rule is this design's choice. Each cycle with en high produces the next address,
// which appears on kn one clock later with kn_valid high; blocks follow each other
// with no gap. kn_first / kn_last mark the first and last address of a block;
// blk_mode and blk_last_col report the mode and column limit in use. Synchronous
// active-low reset; the first en after reset starts a block at address 0.
module wimax_deint_addr_gen
  import wimax_deint_pkg::*;
#(
  parameter int unsigned D              = 16,
  parameter int unsigned QPSK_LAST  [8] = '{8, 16, 24, 17, 32, 26, 40, 48},
  parameter int unsigned QAM16_LAST [4] = '{11, 17, 23, 35},
  parameter int unsigned QAM64_LAST [4] = '{11, 17, 26, 35}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] mastermode,
  input  logic [2:0] cr,
  output addr_t      kn,
  output logic       kn_valid,
  output logic       kn_first,
  output logic       kn_last,
  output mode_e      blk_mode,
  output col_t       blk_last_col
);

  localparam int unsigned J_W = $clog2(D);

  // Block-level control: mode and code rate of the running block.
  logic       started;
  logic [2:0] cr_q;
  logic [1:0] s;

  logic           col_wrap, row_wrap, blk_done, start_blk, step_adv;
  col_t           i;
  logic [1:0]     t, rho, rho_next;
  logic [J_W-1:0] j;

  col_t  lc_q, lc_16, lc_64;
  step_t st_q, st_16, st_64;
  addr_t of_q, of_16, of_64;

  assign s         = mode_s(blk_mode);
  assign blk_done  = col_wrap && row_wrap;
  assign start_blk = en && (!started || blk_done);
  assign step_adv  = en && !start_blk;
  assign kn_last   = started && blk_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started  <= 1'b0;
      blk_mode <= MODE_QPSK;
      cr_q     <= '0;
      kn_valid <= 1'b0;
      kn_first <= 1'b0;
    end else begin
      kn_valid <= en;
      kn_first <= start_blk;
      if (start_blk) begin
        started  <= 1'b1;
        blk_mode <= decode_mode(mastermode);
        cr_q     <= cr;
      end
    end
  end

  always_comb begin
    unique case (blk_mode)
      MODE_QAM16: blk_last_col = lc_16;
      MODE_QAM64: blk_last_col = lc_64;
      default:    blk_last_col = lc_q;
    endcase
  end

  column_counter u_col (
    .clk, .rst_n,
    .load     (start_blk),
    .adv      (step_adv),
    .last_col (blk_last_col),
    .s,
    .i,
    .t,
    .wrap     (col_wrap)
  );

  row_counter #(.D(D)) u_row (
    .clk, .rst_n,
    .load     (start_blk),
    .adv      (step_adv && col_wrap),
    .s,
    .j,
    .rho,
    .rho_next,
    .wrap     (row_wrap)
  );

  qpsk_block #(.D(D), .LAST_COL(QPSK_LAST)) u_qpsk (
    .cr (cr_q), .t, .rho, .rho_next,
    .last_col (lc_q), .step (st_q), .row_off (of_q)
  );

  qam16_block #(.D(D), .LAST_COL(QAM16_LAST)) u_qam16 (
    .cr (cr_q[1:0]), .t, .rho, .rho_next,
    .last_col (lc_16), .step (st_16), .row_off (of_16)
  );

  qam64_block #(.D(D), .LAST_COL(QAM64_LAST)) u_qam64 (
    .cr (cr_q[1:0]), .t, .rho, .rho_next,
    .last_col (lc_64), .step (st_64), .row_off (of_64)
  );

  kn_update u_kn (
    .clk, .rst_n,
    .load     (start_blk),
    .adv      (step_adv),
    .row_wrap (col_wrap),
    .mode     (blk_mode),
    .step_q   (st_q),
    .step_16  (st_16),
    .step_64  (st_64),
    .off_q    (of_q),
    .off_16   (of_16),
    .off_64   (of_64),
    .j_next   (addr_t'(j) + 1'b1),
    .kn
  );

  // Every address of a running block lies inside that block.
  a_kn_in_block: assert property (@(posedge clk) disable iff (!rst_n)
    started |-> (int'(kn) < int'(D) * (int'(blk_last_col) + 1)))
    else $error("address %0d outside the block", kn);

  // The loop variable i is only observed through the comparator.
  logic unused;
  assign unused = ^i;

endmodule
