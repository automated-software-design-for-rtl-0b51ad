// ga_lcg: pseudo-random generator that picks the bit positions used by
// crossover and mutation.
//
// The state num5 follows the recurrence of the reference design,
//     num5 := (num5 * MUL / DIV) rem 2^MOD_BITS      (MUL = 29, DIV = 8, 2^20)
// and each draw returns pos = new num5 rem 2^POS_BITS, a bit index inside an
// 8-bit gene. The next value and its position are offered combinationally on
// nxt / pos; a step pulse commits nxt to the state in the same clock edge, so
// a consumer uses pos in the cycle it raises step. Reset, or a reseed pulse,
// loads SEED.
//
// The recurrence follows the reference design. The seed value is not
// published; SEED = 1 is this design's choice (any non-zero seed works, zero
// would lock the generator at zero, as the recurrence itself would).
module ga_lcg #(
  parameter int unsigned MOD_BITS = 20,
  parameter int unsigned MUL      = 29,
  parameter int unsigned DIV      = 8,
  parameter int unsigned POS_BITS = 3,
  parameter logic [MOD_BITS-1:0] SEED = MOD_BITS'(1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                reseed,
  input  logic                step,
  output logic [MOD_BITS-1:0] state,
  output logic [MOD_BITS-1:0] nxt,
  output logic [POS_BITS-1:0] pos
);

  localparam int unsigned PW = MOD_BITS + $clog2(MUL + 1);

  logic [PW-1:0] prod;

  always_comb begin
    prod = PW'(state) * PW'(MUL);
    nxt  = MOD_BITS'(prod / PW'(DIV));
    pos  = nxt[POS_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= SEED;
    else if (reseed) state <= SEED;
    else if (step)   state <= nxt;
  end

endmodule
