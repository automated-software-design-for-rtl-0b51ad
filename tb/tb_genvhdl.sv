// tb_genvhdl: end-to-end test of the trainer at its default parameters.
// Trains the neuron for the inputs 63, -82, 70 and the wanted output 77,
// the training case of the reference design. A behavioural model of the whole
// algorithm (ga_ref_pkg) predicts every neuron output of every generation,
// the generation in which training ends and the winning chromosome; the test
// compares each evaluation, the generation count, the length of a
// generation, the trained output, and then changes the inputs to see the
// trained neuron follow them. Finally a second train pulse must repeat the
// same run. Every mechanism (scoring, selection and breeding, crossover,
// mutation, the stop on a match, the trained phase, restart) is counted and
// a mechanism that never happened counts as a failure.
module tb_genvhdl;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  localparam int MAXG = 4000;

  logic clk = 1'b0, rst_n = 1'b0, train = 1'b0;
  in_t in1, in2, in3;
  nout_t zout;
  logic signed [NOUTW-1:0] nout;
  logic start, nouts_forming, analysis, finish_teaching;
  idx_t i;
  logic [15:0] generation;
  chrom_t weights;
  int checks = 0, failures = 0;

  genvhdl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference trajectory
  byte unsigned exp_out [MAXG][6];
  int ref_gens, ref_win;
  rchrom_t ref_best;

  task automatic build_reference(int a1, int a2, int a3, int z);
    rchrom_t pop [6];
    int e [6];
    int num5;
    ref_init(pop);
    num5 = 1;
    ref_gens = -1;
    for (int g = 0; g < MAXG && ref_gens < 0; g++) begin
      for (int k = 0; k < 6; k++) begin
        int o;
        o = ref_neuron(a1, a2, a3, gene(pop[k], 0), gene(pop[k], 1), gene(pop[k], 2));
        exp_out[g][k] = byte'(o);
        e[k] = (o > z) ? o - z : z - o;
      end
      for (int k = 5; k >= 0; k--) if (e[k] == 0) begin ref_win = k; ref_gens = g; end
      if (ref_gens < 0) ref_breed(pop, e, num5);
      else ref_best = pop[ref_win];
    end
  endtask

  // mechanism counters
  int n_eval, n_eval_bad, n_xover, n_mut, n_breed, n_analysis, n_track;
  int gen_len, last_rise, cyc;
  logic prev_forming;
  logic pend;
  int pend_g, pend_i;

  always @(posedge clk) begin
    cyc++;
    if (dut.u_genetic.xover_ev) n_xover++;
    if (dut.u_genetic.mut_ev) n_mut++;
    if (dut.u_genetic.done) n_breed++;
    if (analysis) n_analysis++;
    if (nouts_forming && !prev_forming) begin
      if (last_rise > 0 && gen_len == 0) gen_len = cyc - last_rise;
      last_rise = cyc;
    end
    prev_forming <= nouts_forming;
  end

  // compare every evaluation of the forming phase one cycle after start
  always @(posedge clk) begin
    if (pend) begin
      n_eval++;
      if (int'(nout) != int'(exp_out[pend_g][pend_i])) n_eval_bad++;
    end
    pend <= start && !finish_teaching;
    pend_g <= int'(generation);
    pend_i <= int'(i);
  end

  task automatic run_training(string tag);
    int t0;
    n_eval = 0; n_eval_bad = 0; n_xover = 0; n_mut = 0; n_breed = 0; n_analysis = 0;
    gen_len = 0; last_rise = 0;
    train = 1'b1;
    @(negedge clk);
    train = 1'b0;
    t0 = cyc;
    while (!finish_teaching) @(negedge clk);
    $display("%s: trained after %0d generation steps, %0d cycles", tag, generation, cyc - t0);
    check({tag, " generation steps"}, int'(generation), ref_gens);
    check({tag, " evaluations"}, n_eval, 6 * (ref_gens + 1));
    check({tag, " evaluations matching model"}, n_eval_bad, 0);
    check({tag, " breeding steps"}, n_breed, ref_gens);
    check({tag, " analysis phases"}, n_analysis, ref_gens + 1);
    check({tag, " crossover bits"}, n_xover, 36 * ref_gens);
    check({tag, " mutation bits"}, n_mut, 72 * ref_gens);
    if (ref_gens > 1) check({tag, " cycles per generation"}, gen_len, 136);
    repeat (3) @(negedge clk);
    check({tag, " winner weights"}, int'(weights), int'(ref_best));
    check({tag, " trained output"}, int'(nout), int'(zout));
  endtask

  initial begin
    n_track = 0; cyc = 0; pend = 1'b0; prev_forming = 1'b0;
    in1 = 8'sd63; in2 = -8'sd82; in3 = 8'sd70; zout = 8'd77;
    build_reference(63, -82, 70, 77);
    $display("model: match in generation %0d, chromosome %0d", ref_gens, ref_win);
    check("model converges", int'(ref_gens >= 0), 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_training("first run");
    // trained phase: the neuron follows new inputs with the winning weights
    for (int t = 0; t < 50; t++) begin
      int a1, a2, a3;
      a1 = $urandom_range(200) - 100; a2 = $urandom_range(200) - 100; a3 = $urandom_range(200) - 100;
      in1 = in_t'(a1); in2 = in_t'(a2); in3 = in_t'(a3);
      repeat (2) @(negedge clk);
      check("trained neuron follows inputs", int'(nout),
            ref_neuron(a1, a2, a3, gene(ref_best, 0), gene(ref_best, 1), gene(ref_best, 2)));
      check("stays trained", int'(finish_teaching), 1);
      n_track++;
    end
    in1 = 8'sd63; in2 = -8'sd82; in3 = 8'sd70;
    run_training("restart");
    check("mechanism: selection and breeding", int'(ref_gens > 0), 1);
    check("mechanism: trained phase", int'(n_track > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
