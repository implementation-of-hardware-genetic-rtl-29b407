// xover_module: gene-serial uniform crossover for a whole population.
//
// NPAIR crossover cells, each taking two parent gene streams (parents 2p and
// 2p+1) and producing two child streams, one GW-bit gene per clock. An
// eight-site cellular-automaton generator supplies the swap mask; it steps
// once per gene (whenever ce is high), so every gene of a chromosome gets a
// fresh mask, and all cells see the same mask, as in the document's
// schematic of one generator feeding two cells.
//
// Timing: children appear one clock after the parents (registered cells);
// the mask used for a gene is the generator state in the clock that gene is
// presented. load writes seed into the generator; clr clears everything
// asynchronously. Pairing parents 2p/2p+1 and the eight-site rule vector
// (8'hAB, maximal length 255) are this design's choices.
module xover_module
  import ga_pkg::*;
#(
  parameter int unsigned NPAIR = POP / 2,
  parameter int unsigned GW    = GENE_W
) (
  input  logic                       clk,
  input  logic                       clr,
  input  logic                       ce,
  input  logic                       load,
  input  logic [GW-1:0]              seed,
  input  logic [2*NPAIR-1:0][GW-1:0] par,
  output logic [2*NPAIR-1:0][GW-1:0] child,
  output logic [GW-1:0]              mask
);
  logic [GW-1:0] rng_d;

  ca_rng #(.N(GW), .RULE150(GW'(RULE150_8))) u_ring8 (
    .clk  (clk),
    .clr  (clr),
    .ce   (ce),
    .load (load),
    .seed (seed),
    .a    (1'b0),
    .z    (1'b1),
    .q    (mask),
    .d    (rng_d)
  );

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    xover_cell #(.W(GW)) u_cell (
      .clk    (clk),
      .clr    (clr),
      .ce     (ce),
      .i1     (par[2*p]),
      .i2     (par[2*p+1]),
      .rand_i (mask),
      .o1     (child[2*p]),
      .o2     (child[2*p+1])
    );
  end

  logic unused_d;
  assign unused_d = ^rng_d;
endmodule
