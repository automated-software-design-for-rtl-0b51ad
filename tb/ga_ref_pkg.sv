// ga_ref_pkg: behavioural reference of the genetic-algorithm neuron trainer,
// used by the testbenches to work out expected values independently of the
// RTL.
//
// It models the algorithm with plain integers: the neuron searches the
// threshold table interval by interval (thresholds 0..26 are the published
// values, the rest come from floor(98.31*ln((50+a)/(50-a))) evaluated in
// real arithmetic), the generator is num5 := num5*29/8 mod 2^20, selection
// is a stable insertion sort on the error, and breeding walks the parent
// pairs with 2 crossover and 4 mutation draws per gene.
package ga_ref_pkg;

  localparam int PUBLISHED [27] = '{0, 3, 7, 11, 15, 19, 23, 27, 31, 35, 39, 43, 47,
                                    52, 56, 60, 65, 69, 74, 78, 83, 88, 92, 97, 103,
                                    108, 113};

  function automatic int ref_thr(int a);
    if (a < 27) return PUBLISHED[a];
    if (a >= 50) return int'($floor(98.31 * $ln(99.5 / 0.5)));
    return int'($floor(98.31 * $ln(real'(50 + a) / real'(50 - a))));
  endfunction

  function automatic int ref_lin(int in1, int in2, int in3, int w1, int w2, int w3);
    return (in1 * w1 + in2 * w2 + in3 * w3) / 16;
  endfunction

  function automatic int ref_neuron(int in1, int in2, int in3, int w1, int w2, int w3);
    int lin, mag, out;
    lin = ref_lin(in1, in2, in3, w1, w2, w3);
    mag = (lin < 0) ? -lin : lin;
    out = 100;
    for (int a = 0; a <= 49; a++) begin
      if (mag >= ref_thr(a) && mag < ref_thr(a + 1)) begin
        out = 50 + a;
        break;
      end
    end
    if (lin < 0) out = 100 - out;
    return out;
  endfunction

  function automatic int ref_lcg(int s);
    return int'((longint'(s) * 29 / 8) % 1048576);
  endfunction

  // Chromosomes as 3 genes of 8 bits, gene j in bits [8j+7:8j].
  typedef bit [23:0] rchrom_t;

  function automatic int gene(rchrom_t c, int j);
    return int'(signed'(c[8*j +: 8]));
  endfunction

  // Stable sort of the indices 0..5 by error; returns the best four.
  function automatic void ref_select(input int err [6], output int sel [4]);
    int order [6];
    for (int k = 0; k < 6; k++) order[k] = k;
    for (int k = 1; k < 6; k++) begin
      int v, p;
      v = order[k];
      p = k - 1;
      while (p >= 0 && err[order[p]] > err[v]) begin
        order[p + 1] = order[p];
        p--;
      end
      order[p + 1] = v;
    end
    for (int r = 0; r < 4; r++) sel[r] = order[r];
  endfunction

  // One generation step: selection, crossover and mutation.
  function automatic void ref_breed(inout rchrom_t pop [6], input int err [6],
                                    inout int num5);
    rchrom_t par [4];
    int sel [4];
    int num3, b;
    ref_select(err, sel);
    for (int r = 0; r < 4; r++) par[r] = pop[sel[r]];
    num3 = 0;
    for (int k = 0; k < 3; k++) begin
      for (int i = k + 1; i < 4; i++) begin
        pop[num3] = par[k];
        for (int j = 0; j < 3; j++) begin
          for (int m = 0; m < 2; m++) begin
            num5 = ref_lcg(num5);
            b = num5 % 8;
            pop[num3][8*j + b] = par[i][8*j + b];
          end
          for (int m = 0; m < 4; m++) begin
            num5 = ref_lcg(num5);
            b = num5 % 8;
            pop[num3][8*j + b] = ~pop[num3][8*j + b];
          end
        end
        num3++;
      end
    end
  endfunction

  function automatic rchrom_t mk(int w1, int w2, int w3);
    rchrom_t c;
    c[7:0]   = 8'(w1);
    c[15:8]  = 8'(w2);
    c[23:16] = 8'(w3);
    return c;
  endfunction

  // Initial population of the trainer (weights in units of 1/16).
  function automatic void ref_init(output rchrom_t pop [6]);
    pop[0] = mk(-16, -16, -16);
    pop[1] = mk(-16, -16, -16);
    pop[2] = mk(16, 16, 16);
    pop[3] = mk(-8, -8, -8);
    pop[4] = mk(0, 0, 0);
    pop[5] = mk(8, 8, 8);
  endfunction

endpackage
