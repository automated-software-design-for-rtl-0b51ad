// ga_pkg: sizes, types and the activation threshold table shared by the
// genetic-algorithm neuron trainer.
//
// A chromosome holds the weights of one neuron with NW = 3 inputs; every
// weight is a WBITS = 8 bit two's-complement gene, so a chromosome is 24 bits.
// The trainer keeps NPAR = 4 parents and breeds NPOP = NPAR*(NPAR-1)/2 = 6
// children per generation, one for every pair of parents.
//
// The activation is a sigmoid scaled to 0..100. It is realised with a table of
// 51 thresholds X(0..50) on |lin|: the output is 50+a when
// X(a) <= |lin| < X(a+1), and 100 beyond X(50); negative lin mirrors it to
// 100 minus that value. X(0..26) are the published table values; X(27..49)
// continue them with X(a) = floor(98.31 * ln((50+a)/(50-a))), the curve the
// published values follow, and X(50) = floor(98.31 * ln(99.5/0.5)) closes the
// last interval. The table, the sizes and the /16 weight scale follow the
// reference design; the closing value X(50) is this design's choice.
package ga_pkg;

  localparam int unsigned NW    = 3;               // neuron inputs / weights
  localparam int unsigned WBITS = 8;               // bits per weight gene
  localparam int unsigned NPAR  = 4;               // parents kept by selection
  localparam int unsigned NPOP  = NPAR * (NPAR - 1) / 2;  // chromosomes per generation
  localparam int unsigned IDXW  = $clog2(NPOP);    // chromosome index width
  localparam int unsigned INW   = 8;               // input signal width (-100..100)
  localparam int unsigned OUTW  = 8;               // neuron output width (0..100)
  localparam int unsigned NOUTW = 21;              // Nout port width (-1048575..1048576)
  localparam int unsigned WSHIFT_DIV = 16;         // lin = sum(in*W) / 16
  localparam int unsigned NTHR  = 51;              // thresholds X(0..50)
  localparam int unsigned THRW  = 10;              // threshold width

  typedef logic signed [WBITS-1:0] gene_t;
  typedef gene_t [NW-1:0]          chrom_t;
  typedef logic signed [INW-1:0]   in_t;
  typedef logic [OUTW-1:0]         nout_t;
  typedef logic [IDXW-1:0]         idx_t;

  typedef logic [THRW-1:0] thr_t;
  typedef thr_t [NTHR-1:0] thr_table_t;

  // Threshold X(a) of the activation, for a = 0..50.
  function automatic thr_t act_threshold(int unsigned a);
    case (a)
      0:  return 10'd0;    1:  return 10'd3;    2:  return 10'd7;
      3:  return 10'd11;   4:  return 10'd15;   5:  return 10'd19;
      6:  return 10'd23;   7:  return 10'd27;   8:  return 10'd31;
      9:  return 10'd35;   10: return 10'd39;   11: return 10'd43;
      12: return 10'd47;   13: return 10'd52;   14: return 10'd56;
      15: return 10'd60;   16: return 10'd65;   17: return 10'd69;
      18: return 10'd74;   19: return 10'd78;   20: return 10'd83;
      21: return 10'd88;   22: return 10'd92;   23: return 10'd97;
      24: return 10'd103;  25: return 10'd108;  26: return 10'd113;
      27: return 10'd118;  28: return 10'd124;  29: return 10'd130;
      30: return 10'd136;  31: return 10'd142;  32: return 10'd149;
      33: return 10'd155;  34: return 10'd163;  35: return 10'd170;
      36: return 10'd178;  37: return 10'd186;  38: return 10'd195;
      39: return 10'd205;  40: return 10'd216;  41: return 10'd227;
      42: return 10'd240;  43: return 10'd254;  44: return 10'd270;
      45: return 10'd289;  46: return 10'd312;  47: return 10'd341;
      48: return 10'd382;  49: return 10'd451;  default: return 10'd520;
    endcase
  endfunction

endpackage
