// tb_ga_select: self-checking test of the selection sorter.
// Applies error vectors (sorted, reversed, all equal, many ties, random) and
// compares the four selected indices and the best error with a stable
// insertion sort done in the testbench.
module tb_ga_select;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  logic [7:0] err [NPOP];
  idx_t sel [NPAR];
  logic [7:0] best_err;
  int checks = 0, failures = 0;

  ga_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int e [6]);
    int rs [4];
    for (int k = 0; k < 6; k++) err[k] = 8'(e[k]);
    #1;
    ref_select(e, rs);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (int'(sel[r]) != rs[r]) begin
        failures++;
        $display("FAIL rank %0d: got %0d expected %0d (err %p)", r, sel[r], rs[r], e);
      end
    end
    checks++;
    if (int'(best_err) != e[rs[0]]) begin
      failures++;
      $display("FAIL best_err %0d", best_err);
    end
  endtask

  initial begin
    int e [6];
    e = '{0, 1, 2, 3, 4, 5};       apply(e);
    e = '{5, 4, 3, 2, 1, 0};       apply(e);
    e = '{7, 7, 7, 7, 7, 7};       apply(e);
    e = '{3, 1, 3, 1, 0, 100};     apply(e);
    e = '{27, 8, 17, 23, 4, 12};   apply(e);
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 6; k++) e[k] = (t % 2) ? $urandom_range(4) : $urandom_range(100);
      apply(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
