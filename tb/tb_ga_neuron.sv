// tb_ga_neuron: self-checking test of the neuron.
// Drives weights and inputs (the reference inputs 63/-82/70, values placed
// right at the activation thresholds, saturation on both sides, and random
// vectors), pulses start and checks nout, lin, the one-cycle latency of done
// and the toggle of nfinish against the behavioural reference.
module tb_ga_neuron;
  import ga_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  in_t in1, in2, in3;
  chrom_t w;
  nout_t nout;
  logic signed [19:0] lin;
  logic done, nfinish;
  int checks = 0, failures = 0;

  ga_neuron dut (.*);

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

  task automatic run(int a1, int a2, int a3, int w1, int w2, int w3);
    logic nf;
    in1 = in_t'(a1); in2 = in_t'(a2); in3 = in_t'(a3);
    w[0] = gene_t'(w1); w[1] = gene_t'(w2); w[2] = gene_t'(w3);
    nf = nfinish;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check("done after one cycle", int'(done), 1);
    check("nfinish toggles", int'(nfinish), int'(!nf));
    check("lin", int'(lin), ref_lin(a1, a2, a3, w1, w2, w3));
    check("nout", int'(nout), ref_neuron(a1, a2, a3, w1, w2, w3));
    @(negedge clk);
    check("done is a pulse", int'(done), 0);
  endtask

  initial begin
    in1 = '0; in2 = '0; in3 = '0; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reference inputs with the example weight rows
    run(63, -82, 70, -16, -16, -16);
    run(63, -82, 70, 16, 16, 16);
    run(63, -82, 70, 8, 8, 8);
    run(63, -82, 70, 0, 0, 0);
    // lin exactly on and just under thresholds (in1 = 16 -> lin = w1)
    for (int a = 0; a <= 7; a++) begin
      run(16, 0, 0, ref_thr(a), 0, 0);
      run(16, 0, 0, ref_thr(a) - 1, 0, 0);
      run(-16, 0, 0, ref_thr(a), 0, 0);
    end
    // larger magnitudes through the scaled range
    for (int t = 0; t < 400; t++) begin
      run(100, 100, 100, t % 128, (t * 7) % 128, 0);
    end
    // saturation both ways
    run(100, 100, 100, 127, 127, 127);
    run(-100, -100, -100, 127, 127, 127);
    run(-100, -100, -100, -128, -128, -128);
    // random vectors
    for (int t = 0; t < 500; t++) begin
      run($urandom_range(200) - 100, $urandom_range(200) - 100, $urandom_range(200) - 100,
          $urandom_range(255) - 128, $urandom_range(255) - 128, $urandom_range(255) - 128);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
