// ga_select: selection step of the genetic algorithm. Sorts the chromosomes
// of one generation by their fitness error and names the best NPAR of them.
//
// Each chromosome k gets a rank: the number of chromosomes whose error is
// smaller, or equal with a lower index (so ties keep population order and
// every rank is unique). The chromosome of rank r is reported in sel[r]; only
// ranks 0..NPAR-1 are needed, sel[0] being the best. The circuit is purely
// combinational: NPOP*(NPOP-1) comparators and a one-hot pick per rank.
//
// The reference design selects by sorting on the fitness value; the rank
// sort, the smaller-is-better error and the tie rule are this design's
// choices.
module ga_select
  import ga_pkg::*;
#(
  parameter int unsigned EW = 8        // width of a fitness error
) (
  input  logic [EW-1:0] err [NPOP],
  output idx_t          sel [NPAR],
  output logic [EW-1:0] best_err
);

  idx_t rank [NPOP];

  always_comb begin
    for (int unsigned k = 0; k < NPOP; k++) begin
      rank[k] = '0;
      for (int unsigned m = 0; m < NPOP; m++) begin
        if (m != k && (err[m] < err[k] || (err[m] == err[k] && m < k)))
          rank[k] = rank[k] + idx_t'(1);
      end
    end
    for (int unsigned r = 0; r < NPAR; r++) begin
      sel[r] = '0;
      for (int unsigned k = 0; k < NPOP; k++) begin
        if (rank[k] == idx_t'(r)) sel[r] = idx_t'(k);
      end
    end
    best_err = err[sel[0]];
  end

endmodule
