// Self-checking testbench of qam64_block (s = 3).
//
// Applies every code rate and every column phase t, row phase rho and next-row phase
// below s, and compares the outputs with values worked out here from the column
// order of the standard's permutation, col(i, j) = s*floor(i/s) + ((i mod s) +
// (j mod s)) mod s: the increment is d*(col(t+1, rho) - col(t, rho)), the next-row
// offset is d*col(0, rho_next), and the column limit is the printed mux value.
module tb_qam64_block;
  import wimax_deint_pkg::*;

  localparam int D = 16;
  localparam int S = 3;
  localparam int LAST [4] = '{11, 17, 26, 35};

  logic [1:0] cr;
  logic [1:0] t, rho, rho_next;
  col_t  last_col;
  step_t step;
  addr_t row_off;
  int checks = 0, failures = 0;

  qam64_block dut (.*);

  function automatic int col(int i, int r);
    return S * (i / S) + ((i % S) + (r % S)) % S;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++)
      for (int ti = 0; ti < S; ti++)
        for (int r = 0; r < S; r++)
          for (int rn = 0; rn < S; rn++) begin
            cr = 2'(c);
            t = 2'(ti);
            rho = 2'(r);
            rho_next = 2'(rn);
            #1;
            check(int'(last_col) == LAST[c], $sformatf("last_col cr=%0d", c));
            check(int'(step) == D * (col(ti + 1, r) - col(ti, r)),
                  $sformatf("step t=%0d rho=%0d got %0d", ti, r, int'(step)));
            check(int'(row_off) == D * col(0, rn), $sformatf("row_off rho_next=%0d", rn));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
