// ga_neuron: one artificial neuron with three synapses and a sigmoid-like
// activation scaled to the range 0..100.
//
// On a start pulse the neuron forms
//     lin = (in1*W1 + in2*W2 + in3*W3) / 16        (division truncates toward 0)
// and maps |lin| through the threshold table X(0..50) of ga_pkg: the output is
// 50 + a for X(a) <= |lin| < X(a+1), and 100 once |lin| >= X(50). For negative
// lin the output is mirrored to 100 minus that value, so lin = 0 gives 50.
// The table search is done with 50 parallel comparators: because the table is
// increasing, the number of thresholds X(1..50) that |lin| reaches is exactly
// the a of the interval, and the output is 50 plus that count.
//
// Interface: start is a one-cycle pulse; weights and inputs must be stable
// in that cycle. One cycle later nout holds the result, done pulses for one
// cycle and nfinish toggles (the toggle mirrors the reference design's
// NFinish signal). nout keeps its value until the next start.
//
// The arithmetic, the /16 scale and the table follow the reference design;
// the one-cycle registered timing and the parallel comparator search are
// this design's choices.
module ga_neuron
  import ga_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  in_t    in1,
  input  in_t    in2,
  input  in_t    in3,
  input  chrom_t w,
  output nout_t  nout,
  output logic signed [19:0] lin,
  output logic   done,
  output logic   nfinish
);

  localparam int unsigned SUMW = 2 * INW + 2;

  logic signed [SUMW-1:0] acc;
  logic signed [19:0]     lin_c;
  logic        [19:0]     mag;
  logic        [6:0]      level;
  nout_t                  act;

  always_comb begin
    acc = SUMW'(in1 * w[0]) + SUMW'(in2 * w[1]) + SUMW'(in3 * w[2]);
    lin_c = 20'(acc) / 20'(signed'(WSHIFT_DIV));
    mag   = lin_c[19] ? 20'(-lin_c) : 20'(lin_c);
    level = '0;
    for (int unsigned a = 1; a < NTHR; a++) begin
      if (mag >= 20'(act_threshold(a))) level = level + 7'd1;
    end
    act = OUTW'(7'd50 + level);
    if (lin_c < 0) act = OUTW'(8'd100 - act);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nout    <= '0;
      lin     <= '0;
      done    <= 1'b0;
      nfinish <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        nout    <= act;
        lin     <= lin_c;
        nfinish <= ~nfinish;
      end
    end
  end

endmodule
