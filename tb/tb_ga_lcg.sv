// tb_ga_lcg: self-checking test of the bit-position generator.
// Steps the generator from reset with gaps between steps and compares the
// state, the offered next value and the drawn bit position with the
// recurrence num5 := num5*29/8 mod 2^20 computed in the testbench.
module tb_ga_lcg;
  import ga_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0, reseed = 1'b0;
  logic [19:0] state, nxt;
  logic [2:0] pos;
  int checks = 0, failures = 0;
  int model;
  int seen [8];

  ga_lcg #(.SEED(20'd12345)) dut (.*);

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
    model = 12345;
    foreach (seen[k]) seen[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("seed after reset", int'(state), model);
    for (int t = 0; t < 3000; t++) begin
      check("next value", int'(nxt), ref_lcg(model));
      check("position", int'(pos), ref_lcg(model) % 8);
      step = (t % 3) != 2;
      @(negedge clk);
      if (step) begin
        model = ref_lcg(model);
        seen[model % 8]++;
      end
      check("state", int'(state), model);
    end
    // reseed returns to the seed, also when a step is requested
    reseed = 1'b1;
    step   = 1'b1;
    @(negedge clk);
    reseed = 1'b0;
    step   = 1'b0;
    check("reseed", int'(state), 12345);
    // every bit position must be drawn
    foreach (seen[k]) check($sformatf("position %0d drawn", k), int'(seen[k] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
