// ga_genetic: the population store and the breeding engine of the genetic
// algorithm (selection, crossover and mutation).
//
// The population pop holds NPOP = 6 chromosomes of NW = 3 eight-bit genes.
// A go pulse, given the fitness error of every chromosome, starts one
// generation step:
//   SELECT  the ga_select sorter names the NPAR = 4 best chromosomes; they are
//           copied to the parent store par (par[0] the best).
//   COPY    for every parent pair (k, i), k < i, in the order
//           (0,1) (0,2) (0,3) (1,2) (1,3) (2,3), child num3 = 0..5 starts as a
//           copy of parent k;
//   XOVER   then, for every gene j, XBITS = 2 times a bit position b is drawn
//           from the generator and bit b of the child's gene j is taken from
//           parent i (every other bit stays from parent k);
//   MUTATE  and MBITS = 4 times a position is drawn and that bit of the
//           child's gene j is inverted.
// Each draw advances the generator ga_lcg by one step, and the generator
// keeps its state from generation to generation. done pulses for one cycle
// when the last child is complete.
//
// Timing: one cycle for SELECT, then per child one COPY cycle and
// NW*(XBITS+MBITS) = 18 bit cycles: done is high 116 clock edges after the
// edge that takes go (1 + 1 + 6*19). busy is high in between.
// xover_ev and mut_ev pulse on every crossover and mutation bit operation.
//
// Reset, or an init pulse, loads the initial population INIT_POP and
// reseeds the generator, so a restarted training repeats the same run. Its rows
// follow the example population of the reference design in units of 1/16
// (-1 -> -16, 0.5 -> 8, 1 -> 16); the fourth row, which the example does not
// show, is this design's choice. The pair order, the 2 crossover bits and
// 4 mutated bits per gene and the generator recurrence follow the reference
// design; the one-bit-per-cycle schedule is this design's choice.
module ga_genetic
  import ga_pkg::*;
#(
  parameter int unsigned XBITS = 2,
  parameter int unsigned MBITS = 4,
  parameter int unsigned EW    = 8,
  parameter logic [19:0] SEED  = 20'd1,
  parameter chrom_t [NPOP-1:0] INIT_POP = {
    {3{8'sd8}},      // chromosome 6
    {3{8'sd0}},      // chromosome 5
    {3{-8'sd8}},     // chromosome 4
    {3{8'sd16}},     // chromosome 3
    {3{-8'sd16}},    // chromosome 2
    {3{-8'sd16}}     // chromosome 1
  }
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              go,
  input  logic [EW-1:0]     err [NPOP],
  output chrom_t [NPOP-1:0] pop,
  output chrom_t [NPAR-1:0] par,
  output logic              busy,
  output logic              done,
  output logic              xover_ev,
  output logic              mut_ev
);

  typedef enum logic [2:0] {S_IDLE, S_SELECT, S_COPY, S_XOVER, S_MUTATE} state_t;

  localparam int unsigned PW = $clog2(NPAR);
  localparam int unsigned JW = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned MW = $clog2(((XBITS > MBITS) ? XBITS : MBITS) + 1);

  state_t          state;
  logic [PW-1:0]   pk, pi;       // parent pair
  idx_t            num3;         // child being formed
  logic [JW-1:0]   j;            // gene
  logic [MW-1:0]   m;            // bit draw within the gene

  idx_t            sel [NPAR];
  logic [EW-1:0]   best_err;
  logic [19:0]     rnd_state, rnd_nxt;
  logic [2:0]      pos;
  logic            step;

  ga_select #(.EW(EW)) u_select (
    .err      (err),
    .sel      (sel),
    .best_err (best_err)
  );

  ga_lcg #(.SEED(SEED)) u_rnd (
    .clk    (clk),
    .rst_n  (rst_n),
    .reseed (init && state == S_IDLE),
    .step   (step),
    .state  (rnd_state),
    .nxt    (rnd_nxt),
    .pos    (pos)
  );

  assign step     = (state == S_XOVER) || (state == S_MUTATE);
  assign xover_ev = (state == S_XOVER);
  assign mut_ev   = (state == S_MUTATE);
  assign busy     = (state != S_IDLE);

  // True for the last gene of a chromosome.
  function automatic logic last_gene(logic [JW-1:0] jj);
    return int'(jj) == NW - 1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pop   <= INIT_POP;
      par   <= '0;
      pk    <= '0;
      pi    <= '0;
      num3  <= '0;
      j     <= '0;
      m     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (init) begin
            pop <= INIT_POP;
          end else if (go) begin
            state <= S_SELECT;
          end
        end
        S_SELECT: begin
          for (int unsigned r = 0; r < NPAR; r++) par[r] <= pop[sel[r]];
          pk    <= '0;
          pi    <= PW'(1);
          num3  <= '0;
          state <= S_COPY;
        end
        S_COPY: begin
          pop[num3] <= par[pk];
          j     <= '0;
          m     <= '0;
          state <= S_XOVER;
        end
        S_XOVER: begin
          pop[num3][j][pos] <= par[pi][j][pos];
          if (int'(m) == XBITS - 1) begin
            m     <= '0;
            state <= S_MUTATE;
          end else begin
            m <= m + MW'(1);
          end
        end
        S_MUTATE: begin
          pop[num3][j][pos] <= ~pop[num3][j][pos];
          if (int'(m) == MBITS - 1) begin
            m <= '0;
            if (!last_gene(j)) begin
              j     <= j + JW'(1);
              state <= S_XOVER;
            end else if (int'(num3) == NPOP - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              num3  <= num3 + idx_t'(1);
              state <= S_COPY;
              if (int'(pi) == NPAR - 1) begin
                pk <= pk + PW'(1);
                pi <= pk + PW'(2);
              end else begin
                pi <= pi + PW'(1);
              end
            end
          end else begin
            m <= m + MW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new generation step is only requested while the engine is idle.
  assert property (@(posedge clk) disable iff (!rst_n) go |-> state == S_IDLE);

endmodule
