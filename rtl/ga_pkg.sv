// ga_pkg: sizes shared by the blocks of the hardware genetic engine.
//
// A chromosome is a string of GENES genes of GENE_W bits each, streamed one
// gene per clock, together with a FIT_W-bit fitness value that stays constant
// for the whole chromosome. The population held by the engine is POP
// chromosomes, which is also the size of the square selection array.
// The gene count (6), gene width (8 bits), fitness/ball width (16 bits) and
// the 4x4 array follow the document; RNG_W is the 16-site random number
// generator. The rule vectors say which CA sites use rule 150 (bit set) and
// which use rule 90 (bit clear); they were recovered from the published
// output sequences (16 sites) and chosen for maximal length (8 sites).
package ga_pkg;
  localparam int unsigned GENE_W = 8;
  localparam int unsigned GENES  = 6;
  localparam int unsigned FIT_W  = 16;
  localparam int unsigned POP    = 4;
  localparam int unsigned RNG_W  = 16;

  localparam logic [15:0] RULE150_16 = 16'hAAAB;
  localparam logic [7:0]  RULE150_8  = 8'hAB;
endpackage
