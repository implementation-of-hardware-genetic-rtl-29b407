// xover_cell: uniform crossover of two parent words.
//
// For every bit position i, when rand[i] is 1 the two parents swap that bit
// (o1 takes i2's bit and o2 takes i1's), otherwise each child keeps its own
// parent's bit. The children are registered: they appear on the clock edge
// after the inputs, with ce as clock enable and clr as asynchronous clear.
// With W = 16 this is the document's parallel 16-bit cell; with W = GENE_W
// it is the gene-serial cell of the crossover module, which takes one gene
// of each parent per clock and so handles chromosomes of any length. The
// per-bit swap rule follows the document; the registered outputs follow its
// clocked listing.
module xover_cell #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         ce,
  input  logic [W-1:0] i1,
  input  logic [W-1:0] i2,
  input  logic [W-1:0] rand_i,
  output logic [W-1:0] o1,
  output logic [W-1:0] o2
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      o1 <= '0;
      o2 <= '0;
    end else if (ce) begin
      o1 <= (i1 & ~rand_i) | (i2 & rand_i);
      o2 <= (i2 & ~rand_i) | (i1 & rand_i);
    end
  end
endmodule
