// mut_module: mutation of a gene stream.
//
// A 16-site cellular-automaton generator and one mutation cell per gene bit.
// Every cell compares the same random number with the mutation probability
// pmut, so each incoming gene is either passed unchanged or inverted as a
// whole, with probability pmut / 2^16; lt shows every cell's comparator
// output. The generator steps once per gene (whenever ce is high).
//
// Timing: the mutated gene mg appears one clock after gene; the random number
// used is the generator state q in the clock the gene is presented, and d is
// the state it moves to next. load writes seed into the generator; clr clears
// all registers asynchronously. The generator, comparator cells and the
// shared random number follow the document's schematic and simulation; the
// seed load is this design's addition.
module mut_module
  import ga_pkg::*;
#(
  parameter int unsigned GW = GENE_W,
  parameter int unsigned RW = RNG_W
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          ce,
  input  logic          load,
  input  logic [RW-1:0] seed,
  input  logic          a,
  input  logic          z,
  input  logic [RW-1:0] pmut,
  input  logic [GW-1:0] gene,
  output logic [GW-1:0] lt,
  output logic [GW-1:0] mg,
  output logic [RW-1:0] q,
  output logic [RW-1:0] d
);
  ca_rng #(.N(RW), .RULE150(RW'(RULE150_16))) u_ring16 (
    .clk  (clk),
    .clr  (clr),
    .ce   (ce),
    .load (load),
    .seed (seed),
    .a    (a),
    .z    (z),
    .q    (q),
    .d    (d)
  );

  for (genvar b = 0; b < GW; b++) begin : g_bit
    mut_cell #(.W(1), .RW(RW)) u_cell (
      .clk  (clk),
      .clr  (clr),
      .ce   (ce),
      .rnd  (q),
      .pmut (pmut),
      .gene (gene[b]),
      .lt   (lt[b]),
      .mg   (mg[b])
    );
  end
endmodule
