// genvhdl: hardware trainer that tunes the three weights of one neuron with a
// genetic algorithm, then runs the neuron with the weights it found.
//
// Structure:
//   ga_main       sequencer (forming -> analysis -> generation step, or trained)
//   ga_genetic    population store, selection, crossover and mutation
//   ga_chrs_to_w  weight register loaded from the chosen chromosome
//   ga_neuron     3-input neuron with the table-based sigmoid, output 0..100
// Each generation the 6 chromosomes are scored by how far the neuron output,
// for the fixed inputs in1..in3, is from the wanted output zout. When one
// matches, training stops (finish_teaching) and nout from then on follows
// the inputs with the winning weights. Otherwise the best 4 chromosomes breed
// 6 new ones and the next generation is scored.
//
// Interface: clk, active-low asynchronous rst_n, and a train pulse that
// starts training from the initial population. in1..in3 are signed integers
// in -100..100, zout is 0..100. nout is the neuron output after every
// evaluation, widened to the 21-bit signed range of the reference design's
// Nout port; its value stays in 0..100, so bits 20..8 are always zero.
// start, i, nouts_forming, analysis and finish_teaching show the
// sequencing; generation counts completed generation steps and weights shows
// the weight register.
//
// Timing: a generation takes 3 cycles per chromosome to score (18) and
// 118 cycles of analysis, selection and breeding, 136 cycles in all; the
// neuron output of chromosome i appears on nout one cycle after its start.
// For the reference case (63, -82, 70 -> 77) training ends after 3
// generation steps, 425 cycles after train.
// The port set follows the reference design's genVHDL block; the clock,
// reset and train inputs replace its simulation-only step signal and are this
// design's choice.
module genvhdl
  import ga_pkg::*;
#(
  parameter logic [19:0] SEED  = 20'd1,
  parameter int unsigned TOL   = 0,
  parameter int unsigned XBITS = 2,
  parameter int unsigned MBITS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    train,
  input  in_t                     in1,
  input  in_t                     in2,
  input  in_t                     in3,
  input  nout_t                   zout,
  output logic signed [NOUTW-1:0] nout,
  output logic                    start,
  output idx_t                    i,
  output logic                    nouts_forming,
  output logic                    analysis,
  output logic                    finish_teaching,
  output logic [15:0]             generation,
  output chrom_t                  weights
);

  localparam int unsigned EW = 8;

  logic              wload, ndone, nfinish, pop_init, gen_go, gen_done;
  logic              gen_busy, xover_ev, mut_ev, wvalid;
  idx_t              widx, best_idx;
  nout_t             nout_n;
  logic signed [19:0] lin;
  logic [EW-1:0]     err [NPOP];
  nout_t             lout [NPOP];
  chrom_t [NPOP-1:0] pop;
  chrom_t [NPAR-1:0] par;

  ga_main #(.EW(EW), .TOL(TOL), .GW(16)) u_main (
    .clk             (clk),
    .rst_n           (rst_n),
    .train           (train),
    .zout            (zout),
    .wload           (wload),
    .widx            (widx),
    .start           (start),
    .ndone           (ndone),
    .nout            (nout_n),
    .pop_init        (pop_init),
    .gen_go          (gen_go),
    .gen_done        (gen_done),
    .err             (err),
    .lout            (lout),
    .i               (i),
    .nouts_forming   (nouts_forming),
    .analysis        (analysis),
    .finish_teaching (finish_teaching),
    .best_idx        (best_idx),
    .generation      (generation)
  );

  ga_genetic #(.XBITS(XBITS), .MBITS(MBITS), .EW(EW), .SEED(SEED)) u_genetic (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (pop_init),
    .go       (gen_go),
    .err      (err),
    .pop      (pop),
    .par      (par),
    .busy     (gen_busy),
    .done     (gen_done),
    .xover_ev (xover_ev),
    .mut_ev   (mut_ev)
  );

  ga_chrs_to_w u_c2w (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (wload),
    .idx   (widx),
    .pop   (pop),
    .w     (weights),
    .valid (wvalid)
  );

  ga_neuron u_neuron (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .in1     (in1),
    .in2     (in2),
    .in3     (in3),
    .w       (weights),
    .nout    (nout_n),
    .lin     (lin),
    .done    (ndone),
    .nfinish (nfinish)
  );

  assign nout = NOUTW'(signed'({1'b0, nout_n}));

endmodule
