// ga_engine: hardware genetic operators for a fixed-size population.
//
// The engine takes a population of POP chromosomes (GENES genes of GENE_W
// bits, each with a FIT_W-bit fitness computed outside), and returns POP
// offspring chromosomes produced by roulette-wheel selection, uniform
// crossover and mutation. Fitness evaluation and the generation of the first
// population are problem specific and stay outside: they write the
// population in through pop_* and read the offspring back from out_*, and
// the two together close the generation loop.
//
// Inside: four chromosome memory blocks; the controller; four 16-site CA
// generators (one per selection column) whose numbers, scaled by the
// population's fitness sum, are the balls of the POP x POP systolic
// selection array; a crossover module (8-site generator, two gene-serial
// crossover cells pairing selected chromosomes 0/1 and 2/3); and one mutation
// module (16-site generator and GENE_W mutation cells) per offspring stream.
//
// Interface and timing: after reset the generators load their seeds
// (parameter SEED, a different offset per instance). With pop_ready high, the
// source sends POP*GENES beats (pop_valid, pop_gene, pop_fit), chromosome 0
// gene 0 first, holding pop_fit over the genes of a chromosome. The engine
// then runs for 2*POP+1+GENES clocks; the offspring come out gene-serial on
// out_gene[0..POP-1] while out_valid is high (GENES clocks, out_first marks
// gene 0), and done pulses with the last gene. sel_found[j] tells whether
// selection column j found a winner. pmut is the mutation probability as a
// 16-bit fraction of one. The operators, their cells, the generators, the
// four memory blocks and the controller are the document's; the port-level
// protocol, the seeds and the pairing are this design's choices.
module ga_engine
  import ga_pkg::*;
#(
  parameter logic [RNG_W-1:0] SEED = 16'h0001
) (
  input  logic                        clk,
  input  logic                        clr,
  input  logic                        pop_valid,
  input  logic [GENE_W-1:0]           pop_gene,
  input  logic [FIT_W-1:0]            pop_fit,
  output logic                        pop_ready,
  input  logic [RNG_W-1:0]            pmut,
  output logic                        out_valid,
  output logic                        out_first,
  output logic [POP-1:0][GENE_W-1:0]  out_gene,
  output logic [POP-1:0]              sel_found,
  output logic                        busy,
  output logic                        done
);
  // Seed of generator instance i: spread over the state space.
  function automatic logic [RNG_W-1:0] seed_of(input int unsigned i);
    return SEED + RNG_W'(i * 16'h3C5B);
  endfunction

  logic [POP-1:0]             wr_en, rd_en;
  logic [FIT_W-1:0]           fit_sum;
  logic                       seed_load, sel_step, xo_ce, mut_ce;
  logic [POP-1:0][GENE_W-1:0] row_gene;
  logic [POP-1:0][FIT_W-1:0]  row_fit;
  logic [POP-1:0][RNG_W-1:0]  sel_rnd;
  logic [POP-1:0][GENE_W-1:0] sel_gene;
  logic [POP-1:0][GENE_W-1:0] child;
  logic [GENE_W-1:0]          xo_mask;

  ga_control u_control (
    .clk       (clk),
    .clr       (clr),
    .pop_valid (pop_valid),
    .pop_fit   (pop_fit),
    .pop_ready (pop_ready),
    .wr_en     (wr_en),
    .rd_en     (rd_en),
    .fit_sum   (fit_sum),
    .seed_load (seed_load),
    .sel_step  (sel_step),
    .xo_ce     (xo_ce),
    .mut_ce    (mut_ce),
    .out_valid (out_valid),
    .out_first (out_first),
    .busy      (busy),
    .done      (done)
  );

  for (genvar k = 0; k < POP; k++) begin : g_mem
    chrom_mem u_mem (
      .clk     (clk),
      .clr     (clr),
      .wr_en   (wr_en[k]),
      .wr_gene (pop_gene),
      .wr_fit  (pop_fit),
      .rd_en   (rd_en[k]),
      .rd_gene (row_gene[k]),
      .rd_fit  (row_fit[k])
    );
  end

  for (genvar j = 0; j < POP; j++) begin : g_ran
    logic [RNG_W-1:0] d_unused;
    ca_rng #(.N(RNG_W), .RULE150(RULE150_16)) u_ran (
      .clk  (clk),
      .clr  (clr),
      .ce   (sel_step),
      .load (seed_load),
      .seed (seed_of(j)),
      .a    (1'b0),
      .z    (1'b1),
      .q    (sel_rnd[j]),
      .d    (d_unused)
    );
  end

  sel_array u_sel (
    .clk     (clk),
    .clr     (clr),
    .ce      (1'b1),
    .ga_in   (row_gene),
    .fit_in  (row_fit),
    .rnd     (sel_rnd),
    .fit_sum (fit_sum),
    .sg_out  (sel_gene),
    .sel_out (sel_found)
  );

  xover_module u_xover (
    .clk   (clk),
    .clr   (clr),
    .ce    (xo_ce),
    .load  (seed_load),
    .seed  (seed_of(POP)[GENE_W-1:0]),
    .par   (sel_gene),
    .child (child),
    .mask  (xo_mask)
  );

  for (genvar m = 0; m < POP; m++) begin : g_mut
    logic [GENE_W-1:0] lt_unused;
    logic [RNG_W-1:0]  q_unused, d_unused;
    mut_module u_mut (
      .clk  (clk),
      .clr  (clr),
      .ce   (mut_ce),
      .load (seed_load),
      .seed (seed_of(POP + 1 + m)),
      .a    (1'b0),
      .z    (1'b1),
      .pmut (pmut),
      .gene (child[m]),
      .lt   (lt_unused),
      .mg   (out_gene[m]),
      .q    (q_unused),
      .d    (d_unused)
    );
  end

  logic unused_mask;
  assign unused_mask = ^xo_mask;
endmodule
