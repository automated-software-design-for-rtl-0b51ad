// ga_main: the sequencer of the trainer. It runs every chromosome of the
// current generation through the neuron, scores it, decides whether training
// is over, and otherwise hands the scores to the genetic engine.
//
// Phases (reported on the status outputs):
//   forming   (nouts_forming = 1) for i = 0..NPOP-1: load chromosome i into
//             the weight register (wload), fire the neuron (start), and when
//             the neuron reports done store its output as lout[i] and the
//             fitness error err[i] = |lout[i] - zout|. 3 cycles per chromosome.
//   analysis  (analysis = 1) one cycle: if some err[i] <= TOL training is
//             finished with the first such chromosome as the result;
//             otherwise a generation step is started on the genetic engine
//             (gen_go) and the sequencer waits for gen_done, counts the
//             generation and returns to forming.
//   trained   (finish_teaching = 1) the winning chromosome is loaded once and
//             the neuron is fired every cycle, so its output follows the
//             inputs with the trained weights; scores are no longer stored.
// A train pulse starts (or restarts) training: the genetic engine is told to
// reload its initial population (pop_init) and forming begins with i = 0.
// A train pulse that arrives while a generation step runs is ignored.
//
// Following the reference design, a result is accepted when the neuron output
// equals zout (TOL = 0) and the score only measures the output error. The
// train pulse, the phase timing and the first-match rule are this design's
// choices.
module ga_main
  import ga_pkg::*;
#(
  parameter int unsigned EW  = 8,
  parameter int unsigned TOL = 0,
  parameter int unsigned GW  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          train,
  input  nout_t         zout,
  // weight register (ga_chrs_to_w)
  output logic          wload,
  output idx_t          widx,
  // neuron
  output logic          start,
  input  logic          ndone,
  input  nout_t         nout,
  // genetic engine
  output logic          pop_init,
  output logic          gen_go,
  input  logic          gen_done,
  output logic [EW-1:0] err [NPOP],
  // status
  output nout_t         lout [NPOP],
  output idx_t          i,
  output logic          nouts_forming,
  output logic          analysis,
  output logic          finish_teaching,
  output idx_t          best_idx,
  output logic [GW-1:0] generation
);

  typedef enum logic [2:0] {
    M_IDLE, M_LOAD, M_FIRE, M_WAIT, M_ANALYSE, M_BREED, M_FINAL, M_RUN
  } mstate_t;

  mstate_t state;
  logic    hit;
  idx_t    hit_idx;

  // First chromosome whose error is within tolerance.
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int k = NPOP - 1; k >= 0; k--) begin
      if (err[k] <= EW'(TOL)) begin
        hit     = 1'b1;
        hit_idx = idx_t'(k);
      end
    end
  end

  assign nouts_forming   = (state == M_LOAD) || (state == M_FIRE) || (state == M_WAIT);
  assign analysis        = (state == M_ANALYSE);
  assign finish_teaching = (state == M_FINAL) || (state == M_RUN);
  assign wload           = (state == M_LOAD) || (state == M_FINAL);
  assign widx            = (state == M_FINAL) ? best_idx : i;
  assign start           = (state == M_FIRE) || (state == M_RUN);
  assign gen_go          = (state == M_ANALYSE) && !hit && !train;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      i          <= '0;
      best_idx   <= '0;
      generation <= '0;
      pop_init   <= 1'b0;
      for (int k = 0; k < NPOP; k++) begin
        err[k]  <= '1;
        lout[k] <= '0;
      end
    end else begin
      pop_init <= 1'b0;
      if (train && state != M_BREED) begin
        // Restart; a train pulse during a generation step is ignored.
        state      <= M_LOAD;
        i          <= '0;
        generation <= '0;
        pop_init   <= 1'b1;
      end else begin
        unique case (state)
          M_IDLE:  ;
          M_LOAD:  if (!pop_init) state <= M_FIRE;
          M_FIRE:  state <= M_WAIT;
          M_WAIT: begin
            if (ndone) begin
              lout[i] <= nout;
              err[i]  <= (nout >= zout) ? EW'(nout - zout) : EW'(zout - nout);
              if (int'(i) == NPOP - 1) begin
                state <= M_ANALYSE;
              end else begin
                i     <= i + idx_t'(1);
                state <= M_LOAD;
              end
            end
          end
          M_ANALYSE: begin
            if (hit) begin
              best_idx <= hit_idx;
              state    <= M_FINAL;
            end else begin
              state <= M_BREED;
            end
          end
          M_BREED: begin
            if (gen_done) begin
              generation <= generation + GW'(1);
              i          <= '0;
              state      <= M_LOAD;
            end
          end
          M_FINAL: state <= M_RUN;
          M_RUN:   ;
          default: state <= M_IDLE;
        endcase
      end
    end
  end

  // The neuron answers every start of the forming phase in the next cycle.
  assert property (@(posedge clk) disable iff (!rst_n) (state == M_FIRE) |=> ndone);

endmodule
