// Self-checking testbench of row_counter at d = 16.
//
// Drives random load / adv pulses and group sizes s = 1..3, and compares j, the row
// phase rho = j mod s, rho_next and wrap each cycle with a model kept in this file.
module tb_row_counter;
  import wimax_deint_pkg::*;

  localparam int D = 16;

  logic       clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [1:0] s = 1;
  logic [3:0] j;
  logic [1:0] rho, rho_next;
  logic       wrap;
  int checks = 0, failures = 0;
  int mj = 0, wraps = 0;

  row_counter #(.D(D)) dut (.*);

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
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(int'(j) == mj, $sformatf("j=%0d exp %0d", j, mj));
      check(int'(rho) == mj % int'(s), "rho");
      check(int'(rho_next) == ((mj == D - 1) ? 0 : (mj + 1) % int'(s)), "rho_next");
      check(wrap == (mj == D - 1), "wrap");
      if (n % 300 == 0) begin
        s = 2'($urandom_range(1, 3));
        load = 1;
        adv = 0;
      end else begin
        load = ($urandom_range(0, 99) < 1);
        adv = 1'($urandom_range(0, 3) != 0);
      end
      @(posedge clk);
      if (load) mj = 0;
      else if (adv) begin
        if (mj == D - 1) begin mj = 0; wraps++; end
        else mj++;
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
