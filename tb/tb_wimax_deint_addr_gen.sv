// End-to-end testbench of the deinterleaver address generator at its default size.
//
// A reference model in this file computes every expected address directly from the
// 802.16e deinterleaver equations, using integer division for the floor functions:
//   m = s*floor(p/s) + (p + floor(d*p/N)) mod s
//   k = d*m - (N-1)*floor(d*m/N)
// and tracks, independently of the design, which mode and code rate each block was
// started with. The stimulus runs every code rate of every mode with en held high
// (checking one address per clock), blocks with random en stalls, mode and code-rate
// changes in the middle of a block (which must only act at the next block), the
// unused mode code 3, and back-to-back blocks. Each block is also checked to be a
// permutation of 0..N-1, and each kind of increment (+d, -d, +3d, -2d, +4d) and each
// mechanism is counted; one that never happens counts as a failure.
module tb_wimax_deint_addr_gen;
  import wimax_deint_pkg::*;

  localparam int D = 16;
  // Block sizes N_cbps implied by the column limits of each scheme's code-rate mux.
  localparam int NQ  [8] = '{144, 272, 400, 288, 528, 432, 656, 784};
  localparam int N16 [4] = '{192, 288, 384, 576};
  localparam int N64 [4] = '{192, 288, 432, 576};

  logic       clk = 0;
  logic       rst_n = 0;
  logic       en = 0;
  logic [1:0] mastermode = 0;
  logic [2:0] cr = 0;
  addr_t      kn;
  logic       kn_valid, kn_first, kn_last;
  mode_e      blk_mode;
  col_t       blk_last_col;

  int checks = 0, failures = 0;

  wimax_deint_addr_gen dut (.*);

  always #5 clk = ~clk;

  function automatic int s_of(int mode);
    return (mode == 1) ? 2 : (mode == 2) ? 3 : 1;
  endfunction

  function automatic int n_of(int mode, int crv);
    if (mode == 1) return N16[crv % 4];
    if (mode == 2) return N64[crv % 4];
    return NQ[crv];
  endfunction

  function automatic int ref_k(int s, int n, int p);
    int m;
    m = s * (p / s) + ((p + (D * p) / n) % s);
    return D * m - (n - 1) * ((D * m) / n);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- independent model of block sequencing ----------------
  bit  m_started = 0;
  int  m_mode = 0, m_cr = 0, m_p = 0, m_n = 1;
  int  exp_k;
  bit  exp_first, exp_last, exp_valid = 0;
  bit  seen [1024];
  int  seen_cnt;
  int  blk_cycles, blk_stalls;

  // mechanism counters
  int blocks_mode [3];
  int blocks_total = 0, back_to_back = 0, mode_switches = 0, stalls = 0;
  int midblock_changes = 0, mode3_blocks = 0, stall_blocks = 0, full_rate_blocks = 0;
  int inc_p1 = 0, inc_m1 = 0, inc_p3 = 0, inc_m2 = 0, inc_p4 = 0;
  int prev_k, prev_p;
  int fig6_hits = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      exp_valid <= 0;
    end else begin
      exp_valid <= en;
      if (en) begin
        if (!m_started || m_p == m_n - 1) begin
          if (m_started) back_to_back++;
          if (m_started && ((mastermode == 2'd3 ? 0 : int'(mastermode)) != m_mode)) mode_switches++;
          m_started = 1;
          m_mode = (mastermode == 2'd3) ? 0 : int'(mastermode);
          if (mastermode == 2'd3) mode3_blocks++;
          m_cr = int'(cr);
          m_n = n_of(m_mode, m_cr);
          m_p = 0;
        end else begin
          m_p++;
        end
        exp_k     = ref_k(s_of(m_mode), m_n, m_p);
        exp_first = (m_p == 0);
        exp_last  = (m_p == m_n - 1);
      end
    end
  end

  // Output checks, a moment after each clock edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      check(kn_valid == exp_valid, "kn_valid");
      if (kn_valid) begin
        check(kn == addr_t'(exp_k), $sformatf("kn=%0d exp=%0d mode=%0d cr=%0d p=%0d", kn, exp_k, m_mode, m_cr, m_p));
        check(kn_first == exp_first, "kn_first");
        check(kn_last == exp_last, "kn_last");
        check(int'(blk_mode) == m_mode, "blk_mode");
        check(int'(blk_last_col) == m_n / D - 1, "blk_last_col");
        if (m_p == 0) begin
          foreach (seen[a]) seen[a] = 0;
          seen_cnt = 0;
          blk_cycles = 0;
          blk_stalls = 0;
        end else begin
          // classify the increment inside a row
          if (m_p % (m_n / D) != 0) begin
            case (int'(kn) - prev_k)
              D:      inc_p1++;
              -D:     inc_m1++;
              3 * D:  inc_p3++;
              -2 * D: inc_m2++;
              4 * D:  inc_p4++;
              default: check(0, "unexpected increment");
            endcase
          end
        end
        if (m_mode == 0 && m_n == 144 && m_p >= 9 && m_p <= 13 && int'(kn) == 1 + D * (m_p - 9))
          fig6_hits++;
        if (int'(kn) < 1024 && !seen[kn]) begin seen[kn] = 1; seen_cnt++; end
        prev_k = int'(kn);
        if (kn_last) begin
          int in_range;
          in_range = 1;
          for (int a = m_n; a < 1024; a++) if (seen[a]) in_range = 0;
          check(seen_cnt == m_n && in_range == 1, $sformatf("block mode %0d cr %0d is not a permutation", m_mode, m_cr));
          if (blk_stalls == 0) begin
            check(blk_cycles + 1 == m_n, "one address per clock");
            full_rate_blocks++;
          end else begin
            stall_blocks++;
          end
          blocks_mode[m_mode]++;
          blocks_total++;
        end
      end
      blk_cycles++;
      if (!kn_valid && m_started) begin blk_stalls++; stalls++; end
    end
  end

  // ---------------- stimulus ----------------
  task automatic run_block(int mode, int crv, int stall_pct, bit change_mid);
    int n;
    n = n_of(mode == 3 ? 0 : mode, crv);
    @(negedge clk);
    mastermode = 2'(mode);
    cr = 3'(crv);
    en = 1;
    for (int p = 0; p < n; ) begin
      @(negedge clk);
      if (change_mid && p == n / 2) begin
        mastermode = 2'($urandom_range(0, 2));
        cr = 3'($urandom_range(0, 3));
        midblock_changes++;
      end
      if (stall_pct > 0 && $urandom_range(0, 99) < stall_pct) en = 0;
      else begin
        en = 1;
        p++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // every code rate of every mode at full rate, blocks back to back
    for (int c = 0; c < 8; c++) run_block(0, c, 0, 0);
    for (int c = 0; c < 4; c++) run_block(1, c, 0, 0);
    for (int c = 0; c < 4; c++) run_block(2, c, 0, 0);
    // adaptive order: QPSK -> 16-QAM -> 64-QAM and back, with stalls and mid-block changes
    run_block(0, 1, 20, 1);
    run_block(1, 2, 20, 1);
    run_block(2, 3, 30, 1);
    run_block(1, 1, 10, 0);
    run_block(0, 4, 10, 1);
    run_block(3, 0, 0, 0);
    for (int r = 0; r < 6; r++) run_block(int'($urandom_range(0, 2)), int'($urandom_range(0, 3)), 15, 1);
    @(negedge clk) en = 0;
    repeat (5) @(posedge clk);

    check(blocks_mode[0] > 0, "no QPSK block");
    check(blocks_mode[1] > 0, "no 16-QAM block");
    check(blocks_mode[2] > 0, "no 64-QAM block");
    check(mode_switches > 0, "no mode switch");
    check(back_to_back > 0, "no back-to-back block");
    check(stalls > 0 && stall_blocks > 0, "no stall");
    check(midblock_changes > 0, "no mid-block input change");
    check(mode3_blocks > 0, "no block with mode code 3");
    check(full_rate_blocks >= 16, "full-rate blocks missing");
    check(inc_p1 > 0 && inc_m1 > 0 && inc_p3 > 0 && inc_m2 > 0 && inc_p4 > 0, "an increment kind never used");
    check(fig6_hits >= 5, "QPSK row 1 did not read 1,17,33,49,65");
    $display("blocks=%0d (QPSK %0d, 16-QAM %0d, 64-QAM %0d) switches=%0d back_to_back=%0d stalls=%0d mid_changes=%0d mode3=%0d",
             blocks_total, blocks_mode[0], blocks_mode[1], blocks_mode[2], mode_switches, back_to_back,
             stalls, midblock_changes, mode3_blocks);
    $display("increments: +d %0d, -d %0d, +3d %0d, -2d %0d, +4d %0d", inc_p1, inc_m1, inc_p3, inc_m2, inc_p4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
