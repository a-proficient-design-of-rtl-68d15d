// Self-checking testbench of column_counter.
//
// Drives random load / adv pulses, column limits up to 48 and group sizes s = 1..3,
// and compares i, t = i mod s and wrap each cycle with a model kept in this file.
// Runs whole rows at full rate to check that the count wraps after last_col+1 clocks.
module tb_column_counter;
  import wimax_deint_pkg::*;

  logic       clk = 0, rst_n = 0, load = 0, adv = 0;
  col_t       last_col = 0;
  logic [1:0] s = 1;
  col_t       i;
  logic [1:0] t;
  logic       wrap;
  int checks = 0, failures = 0;
  int mi = 0, wraps = 0;

  column_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(int'(i) == mi, $sformatf("i=%0d exp %0d", i, mi));
      check(int'(t) == mi % int'(s), "t");
      check(wrap == (mi == int'(last_col)), "wrap");
      if (n % 500 == 0) begin
        last_col = col_t'($urandom_range(0, 48));
        s = 2'($urandom_range(1, 3));
        load = 1;
        adv = 0;
      end else begin
        load = ($urandom_range(0, 99) < 2);
        adv = (n % 500 < 250) ? 1'b1 : 1'($urandom_range(0, 1));
      end
      @(posedge clk);
      if (load) mi = 0;
      else if (adv) begin
        if (mi == int'(last_col)) begin mi = 0; wraps++; end
        else mi++;
      end
    end
    check(wraps > 10, "counter never wrapped");
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
