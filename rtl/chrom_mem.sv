// chrom_mem: one chromosome memory block.
//
// Holds one chromosome of DEPTH genes of GW bits plus its FW-bit fitness
// value. A single wrapping counter is the pointer for both writing and
// reading: each write (wr_en) stores wr_gene at the pointer and advances it,
// each read (rd_en) copies the gene at the pointer to rd_gene and advances
// it, so a chromosome goes in and comes out as a gene stream in order and
// the pointer is back at gene 0 after DEPTH accesses. The fitness is written
// with every write beat (the source holds it for the whole chromosome) and is
// always visible on rd_fit.
//
// Timing: rd_gene is registered, valid the clock after rd_en; writes take
// effect on the clock edge. clr clears the pointer and the output register
// asynchronously (the gene array itself is not cleared). Writing and
// reading in the same clock is not supported (write wins). Four such blocks
// make the engine's memory, as in the document; one chromosome per block and
// the shared read/write pointer follow the document's description, the rest
// is this design's choice.
module chrom_mem
  import ga_pkg::*;
#(
  parameter int unsigned DEPTH = GENES,
  parameter int unsigned GW    = GENE_W,
  parameter int unsigned FW    = FIT_W
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          wr_en,
  input  logic [GW-1:0] wr_gene,
  input  logic [FW-1:0] wr_fit,
  input  logic          rd_en,
  output logic [GW-1:0] rd_gene,
  output logic [FW-1:0] rd_fit
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [GW-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;
  logic [AW-1:0] ptr_next;

  assign ptr_next = (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;

  always_ff @(posedge clk) begin
    if (wr_en) mem[ptr] <= wr_gene;
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      ptr     <= '0;
      rd_gene <= '0;
      rd_fit  <= '0;
    end else if (wr_en) begin
      ptr    <= ptr_next;
      rd_fit <= wr_fit;
    end else if (rd_en) begin
      ptr     <= ptr_next;
      rd_gene <= mem[ptr];
    end
  end
endmodule
