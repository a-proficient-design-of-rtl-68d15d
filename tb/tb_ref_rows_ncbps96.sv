// Reference-table testbench: the generator set to a 96-bit block (d = 16, six columns).
//
// The code-rate muxes of all three schemes are set to the column limit 5, i.e.
// N_cbps = 96. The first four rows read out for QPSK, 16-QAM and 64-QAM must match the
// published reference table of deinterleaver addresses for this block size (listed
// below), and every whole block must equal the addresses computed here from the
// standard's deinterleaver equations and be a permutation of 0..95. The modes are run
// in the adaptive order QPSK, 16-QAM, 64-QAM, 16-QAM, QPSK.
module tb_ref_rows_ncbps96;
  import wimax_deint_pkg::*;

  localparam int D = 16;
  localparam int N = 96;

  // Rows 0-3 of the reference table, per mode.
  localparam int TAB [3][24] = '{
    '{ 0, 16, 32, 48, 64, 80,   1, 17, 33, 49, 65, 81,   2, 18, 34, 50, 66, 82,   3, 19, 35, 51, 67, 83},
    '{ 0, 16, 32, 48, 64, 80,  17,  1, 49, 33, 81, 65,   2, 18, 34, 50, 66, 82,  19,  3, 51, 35, 83, 67},
    '{ 0, 16, 32, 48, 64, 80,  17, 33,  1, 65, 81, 49,  34,  2, 18, 82, 50, 66,   3, 19, 35, 51, 67, 83}
  };

  logic       clk = 0, rst_n = 0, en = 0;
  logic [1:0] mastermode = 0;
  logic [2:0] cr = 0;
  addr_t      kn;
  logic       kn_valid, kn_first, kn_last;
  mode_e      blk_mode;
  col_t       blk_last_col;
  int checks = 0, failures = 0;

  wimax_deint_addr_gen #(
    .D          (D),
    .QPSK_LAST  ('{5, 5, 5, 5, 5, 5, 5, 5}),
    .QAM16_LAST ('{5, 5, 5, 5}),
    .QAM64_LAST ('{5, 5, 5, 5})
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_k(int s, int p);
    int m;
    m = s * (p / s) + ((p + (D * p) / N) % s);
    return D * m - (N - 1) * ((D * m) / N);
  endfunction

  task automatic run_mode(int mode);
    bit seen [N];
    int cnt;
    cnt = 0;
    foreach (seen[a]) seen[a] = 0;
    @(negedge clk);
    mastermode = 2'(mode);
    cr = 3'($urandom_range(0, 7));
    en = 1;
    for (int p = 0; p < N; p++) begin
      @(posedge clk);
      #1;
      check(kn_valid && (kn_first == (p == 0)) && (kn_last == (p == N - 1)), "flags");
      if (p < 24) check(int'(kn) == TAB[mode][p], $sformatf("mode %0d p %0d: %0d, table %0d", mode, p, kn, TAB[mode][p]));
      check(int'(kn) == ref_k(mode + 1, p), $sformatf("mode %0d p %0d: %0d vs equation", mode, p, kn));
      if (int'(kn) < N && !seen[kn]) begin seen[kn] = 1; cnt++; end
    end
    check(cnt == N, "block is not a permutation");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_mode(0);
    run_mode(1);
    run_mode(2);
    run_mode(1);
    run_mode(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
