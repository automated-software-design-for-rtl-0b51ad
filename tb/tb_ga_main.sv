// tb_ga_main: self-checking test of the sequencer.
// The neuron and the genetic engine are replaced by small testbench models:
// the neuron answers every start one cycle later with an output taken from a
// script of three generations (outputs shaped like a typical training run
// towards zout = 77, near misses of 76 and 78 in generation 2 that must not
// stop training, the match in generation 3 at chromosome 4), and the
// genetic engine answers gen_go with gen_done five cycles later. The test
// checks the stored outputs and errors, the chromosome order, the phase
// signals, the number of generation steps, the choice of the winning
// chromosome, the trained phase (neuron fired every cycle, scores frozen) and
// a restart by train.
module tb_ga_main;
  import ga_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, train = 1'b0;
  nout_t zout;
  logic wload, start, ndone, pop_init, gen_go, gen_done;
  idx_t widx, i, best_idx;
  nout_t nout;
  logic [7:0] err [NPOP];
  nout_t lout [NPOP];
  logic nouts_forming, analysis, finish_teaching;
  logic [15:0] generation;
  int checks = 0, failures = 0;

  localparam int SCRIPT [3][6] = '{'{49, 69, 98, 60, 50, 94},
                                   '{18, 84, 95, 78, 76, 40},
                                   '{0, 47, 85, 77, 99, 33}};

  ga_main dut (.*);

  always #5 clk = ~clk;

  // neuron model
  int gsel, fired, loads, gos, analyses, inits;
  idx_t last_load;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ndone <= 1'b0;
      nout  <= '0;
    end else begin
      ndone <= start;
      if (start) nout <= nout_t'(SCRIPT[gsel][i]);
      if (wload) last_load <= widx;
    end
  end
  // genetic engine model
  int gcount;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_done <= 1'b0;
      gcount   <= 0;
    end else begin
      gen_done <= 1'b0;
      if (gen_go) gcount <= 5;
      else if (gcount > 0) begin
        gcount <= gcount - 1;
        if (gcount == 1) gen_done <= 1'b1;
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (start && !finish_teaching) fired++;
    if (gen_go) gos++;
    if (analysis) analyses++;
    if (pop_init) inits++;
  end
  assign gsel = (int'(generation) > 2) ? 2 : int'(generation);

  initial begin
    repeat (5000) @(posedge clk);
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

  int order_ok;
  initial begin
    zout = 8'd77;
    fired = 0; gos = 0; analyses = 0; inits = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle until train", int'(nouts_forming), 0);
    train = 1'b1;
    @(negedge clk);
    train = 1'b0;
    // during forming the chromosome index only counts up by one
    order_ok = 1;
    while (!finish_teaching) begin
      idx_t prev;
      prev = i;
      @(negedge clk);
      if (nouts_forming && i != prev && int'(i) != int'(prev) + 1 && i != 0) order_ok = 0;
    end
    check("chromosome order", order_ok, 1);
    check("pop_init pulses", inits, 1);
    check("neuron evaluations", fired, 18);
    check("analysis cycles", analyses, 3);
    check("generation steps", gos, 2);
    check("generation counter", int'(generation), 2);
    check("winner", int'(best_idx), 3);
    for (int k = 0; k < 6; k++) begin
      check($sformatf("lout %0d", k), int'(lout[k]), SCRIPT[2][k]);
      check($sformatf("err %0d", k), int'(err[k]),
            (SCRIPT[2][k] > 77) ? SCRIPT[2][k] - 77 : 77 - SCRIPT[2][k]);
    end
    @(negedge clk);
    check("winner loaded", int'(last_load), 3);
    for (int t = 0; t < 10; t++) begin
      check("neuron fired every cycle when trained", int'(start), 1);
      check("still trained", int'(finish_teaching), 1);
      @(negedge clk);
    end
    check("scores frozen", int'(lout[0]), SCRIPT[2][0]);
    // restart
    train = 1'b1;
    @(negedge clk);
    train = 1'b0;
    check("restart forms outputs", int'(nouts_forming), 1);
    check("restart leaves trained phase", int'(finish_teaching), 0);
    check("restart reloads population", int'(pop_init), 1);
    check("restart clears generation", int'(generation), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
