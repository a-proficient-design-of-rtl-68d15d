// Testbench of the generator configured for d = 12 rows.
//
// The permutation is defined for d = 12 as well as for the 802.16e value d = 16; the
// generator only needs D and the column limits changed. Here the limits are
// (N_cbps/12)-1 for standard block sizes: QPSK 96, 192, 288, 384, 480, 576, 144, 432;
// 16-QAM 192, 288, 384, 576; 64-QAM 288, 432, 576, 288. Every code rate of every mode
// is run back to back at one address per clock and each address is compared with the
// floor-function equations evaluated here; each block must be a permutation.
module tb_rows12;
  import wimax_deint_pkg::*;

  localparam int D = 12;
  localparam int NQ  [8] = '{96, 192, 288, 384, 480, 576, 144, 432};
  localparam int N16 [4] = '{192, 288, 384, 576};
  localparam int N64 [4] = '{288, 432, 576, 288};

  logic       clk = 0, rst_n = 0, en = 0;
  logic [1:0] mastermode = 0;
  logic [2:0] cr = 0;
  addr_t      kn;
  logic       kn_valid, kn_first, kn_last;
  mode_e      blk_mode;
  col_t       blk_last_col;
  int checks = 0, failures = 0, blocks = 0;

  wimax_deint_addr_gen #(
    .D          (D),
    .QPSK_LAST  ('{7, 15, 23, 31, 39, 47, 11, 35}),
    .QAM16_LAST ('{15, 23, 31, 47}),
    .QAM64_LAST ('{23, 35, 47, 23})
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_k(int s, int n, int p);
    int m;
    m = s * (p / s) + ((p + (D * p) / n) % s);
    return D * m - (n - 1) * ((D * m) / n);
  endfunction

  task automatic run_block(int mode, int crv);
    bit seen [1024];
    int cnt, n;
    n = (mode == 1) ? N16[crv] : (mode == 2) ? N64[crv] : NQ[crv];
    cnt = 0;
    foreach (seen[a]) seen[a] = 0;
    @(negedge clk);
    mastermode = 2'(mode);
    cr = 3'(crv);
    en = 1;
    for (int p = 0; p < n; p++) begin
      @(posedge clk);
      #1;
      check(kn_valid && (kn_first == (p == 0)) && (kn_last == (p == n - 1)), "flags");
      check(int'(kn) == ref_k(mode + 1, n, p), $sformatf("mode %0d N %0d p %0d: %0d vs %0d", mode, n, p, kn, ref_k(mode + 1, n, p)));
      if (!seen[kn]) begin seen[kn] = 1; cnt++; end
    end
    check(cnt == n, "block is not a permutation");
    blocks++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 8; c++) run_block(0, c);
    for (int c = 0; c < 4; c++) run_block(1, c);
    for (int c = 0; c < 4; c++) run_block(2, c);
    check(blocks == 16, "blocks missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
