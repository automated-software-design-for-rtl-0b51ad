// ga_chrs_to_w: turns one chromosome of the population into the synapse
// weights of the neuron.
//
// The population is a two-dimensional bit array: one row per chromosome, each
// row the NW weight genes of the neuron. On a load pulse the row selected by
// idx is decoded gene by gene into signed weights (a gene is read as an 8-bit
// two's-complement number in units of 1/16, which the neuron's /16 applies)
// and held in the weight register until the next load. valid rises with the
// first load and stays high.
//
// Timing: weights appear one cycle after load. The reference design names
// this step and its purpose only; the registered multiplexer and the
// two's-complement reading of the genes are this design's choices.
module ga_chrs_to_w
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  idx_t               idx,
  input  chrom_t [NPOP-1:0]  pop,
  output chrom_t             w,
  output logic               valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w     <= '0;
      valid <= 1'b0;
    end else if (load) begin
      for (int unsigned j = 0; j < NW; j++) w[j] <= gene_t'(pop[idx][j]);
      valid <= 1'b1;
    end
  end

  // idx must address an existing chromosome when a load is requested.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> (int'(idx) < NPOP));

endmodule
