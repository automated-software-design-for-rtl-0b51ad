// tb_ga_genetic: self-checking test of the population store and breeding
// engine. From the initial population it runs generation steps with random
// error vectors and compares, after every done, the parents and the whole new
// population with the reference algorithm. It also checks the step length
// (done 116 cycles after go is taken), the number of crossover (36) and
// mutation (72) bit operations per step, and that init restores the initial
// population.
module tb_ga_genetic;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, go = 1'b0;
  logic [7:0] err [NPOP];
  chrom_t [NPOP-1:0] pop;
  chrom_t [NPAR-1:0] par;
  logic busy, done, xover_ev, mut_ev;
  int checks = 0, failures = 0;
  int nx, nm;

  ga_genetic dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (xover_ev) nx++;
    if (mut_ev) nm++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic compare_pop(rchrom_t m [6], string when);
    for (int k = 0; k < 6; k++) check($sformatf("%s chromosome %0d", when, k), pop[k], m[k]);
  endtask

  initial begin
    rchrom_t mpop [6], mpar [4];
    int e [6], sel [4];
    int num5, cycles;
    nx = 0; nm = 0;
    for (int k = 0; k < NPOP; k++) err[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_init(mpop);
    num5 = 1;
    compare_pop(mpop, "reset");
    for (int g = 0; g < 60; g++) begin
      for (int k = 0; k < 6; k++) begin
        e[k] = (g % 3 == 0) ? $urandom_range(3) : $urandom_range(100);
        err[k] = 8'(e[k]);
      end
      ref_select(e, sel);
      for (int r = 0; r < 4; r++) mpar[r] = mpop[sel[r]];
      ref_breed(mpop, e, num5);
      nx = 0; nm = 0;
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      check("busy", busy, 1);
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      check("step length", cycles, 116);
      check("crossover operations", nx, 36);
      check("mutation operations", nm, 72);
      for (int r = 0; r < 4; r++) check($sformatf("parent %0d", r), par[r], mpar[r]);
      compare_pop(mpop, "generation");
      @(negedge clk);
      check("idle after done", busy, 0);
      check("done is a pulse", done, 0);
    end
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    ref_init(mpop);
    compare_pop(mpop, "init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
