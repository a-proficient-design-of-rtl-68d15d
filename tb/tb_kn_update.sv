// Self-checking testbench of kn_update.
//
// Feeds random increments and row offsets for the three scheme inputs, random master
// modes (including the unused code 3) and random load / adv / row_wrap, and checks kn
// against a model: load gives 0, adv adds the selected increment modulo 2**ADDR_W,
// adv at a row end loads j_next plus the selected row offset.
module tb_kn_update;
  import wimax_deint_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0, adv = 0, row_wrap = 0;
  mode_e mode = MODE_QPSK;
  step_t step_q = 0, step_16 = 0, step_64 = 0;
  addr_t off_q = 0, off_16 = 0, off_64 = 0, j_next = 0;
  addr_t kn;
  int checks = 0, failures = 0;
  int mk = 0;
  int sel_cnt [3];

  kn_update dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int st, of, m;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(int'(kn) == mk, $sformatf("kn=%0d exp %0d", kn, mk));
      m = $urandom_range(0, 3);
      mode = mode_e'(m);
      step_q  = step_t'($urandom_range(0, 127)) - step_t'(64);
      step_16 = step_t'($urandom_range(0, 127)) - step_t'(64);
      step_64 = step_t'($urandom_range(0, 127)) - step_t'(64);
      off_q   = addr_t'($urandom_range(0, 32));
      off_16  = addr_t'($urandom_range(0, 32));
      off_64  = addr_t'($urandom_range(0, 32));
      j_next  = addr_t'($urandom_range(0, 15));
      load = ($urandom_range(0, 99) < 3);
      adv = 1'($urandom_range(0, 3) != 0);
      row_wrap = ($urandom_range(0, 99) < 15);
      st = (m == 1) ? int'(step_16) : (m == 2) ? int'(step_64) : int'(step_q);
      of = (m == 1) ? int'(off_16) : (m == 2) ? int'(off_64) : int'(off_q);
      if (adv && !load) sel_cnt[(m == 3) ? 0 : m]++;
      @(posedge clk);
      if (load) mk = 0;
      else if (adv) mk = row_wrap ? (int'(j_next) + of) % 1024 : (mk + st + 1024) % 1024;
    end
    check(sel_cnt[0] > 0 && sel_cnt[1] > 0 && sel_cnt[2] > 0, "a mode input never selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
