// tb_ga_chrs_to_w: self-checking test of the chromosome-to-weight register.
// Loads random populations, selects every chromosome in turn and checks that
// the weights appear one cycle after load, keep their value without load,
// and read each 8-bit gene as a signed number.
module tb_ga_chrs_to_w;
  import ga_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  idx_t idx;
  chrom_t [NPOP-1:0] pop;
  chrom_t w;
  logic valid;
  int checks = 0, failures = 0;

  ga_chrs_to_w dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    chrom_t held;
    pop = '0; idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("valid low after reset", int'(valid), 0);
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < NPOP; k++) pop[k] = chrom_t'({$urandom, $urandom});
      idx  = idx_t'(t % NPOP);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check("valid", int'(valid), 1);
      for (int j = 0; j < NW; j++)
        check($sformatf("weight %0d", j), int'(w[j]), int'($signed(pop[t % NPOP][j])));
      held = w;
      pop  = ~pop;
      idx  = idx_t'((t + 1) % NPOP);
      @(negedge clk);
      check("held without load", int'(w == held), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
