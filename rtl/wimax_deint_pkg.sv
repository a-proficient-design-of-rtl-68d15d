// Shared types and widths of the adaptive WiMAX deinterleaver address generator.
//
// The generator produces the receive-side (deinterleaver) address sequence of the
// IEEE 802.16e two-step bit interleaver for QPSK, 16-QAM and 64-QAM without any
// floor or division operation: each address is the previous one plus a small
// increment (a multiple of the row count d), chosen from the column phase and the
// row phase. This package holds the master-mode encoding and the widths that the
// counters, the three scheme blocks and the address adder share.
//
// Master mode encoding (0 QPSK, 1 16-QAM, 2 64-QAM) follows the order in which the
// modes are described for the switching example; code 3 is unused and is treated as
// QPSK. The widths are this design's choice: COL_W holds the largest column limit
// (48), ADDR_W the largest address (16*49-1 = 783), STEP_W the signed increments
// (as wide as an address, since they are added modulo 2**ADDR_W).
package wimax_deint_pkg;

  typedef enum logic [1:0] {
    MODE_QPSK  = 2'd0,
    MODE_QAM16 = 2'd1,
    MODE_QAM64 = 2'd2
  } mode_e;

  localparam int unsigned COL_W  = 6;
  localparam int unsigned ADDR_W = 10;
  localparam int unsigned STEP_W = ADDR_W;  // added modulo 2**ADDR_W

  typedef logic [COL_W-1:0]         col_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [STEP_W-1:0] step_t;

  // Mode code as received on the master-mode input; the unused code maps to QPSK.
  function automatic mode_e decode_mode(logic [1:0] code);
    unique case (code)
      2'd1:    return MODE_QAM16;
      2'd2:    return MODE_QAM64;
      default: return MODE_QPSK;
    endcase
  endfunction

  // s = N_cpc / 2: the group size of the second interleaver permutation.
  function automatic logic [1:0] mode_s(mode_e m);
    unique case (m)
      MODE_QAM16: return 2'd2;
      MODE_QAM64: return 2'd3;
      default:    return 2'd1;
    endcase
  endfunction

endpackage
