// tb_ga_engine: end-to-end test of the genetic engine at its default size.
//
// The testbench plays the part of the problem-specific side: it generates a
// random first population, evaluates fitness (the number of one bits in
// the 48-bit chromosome, "one-max", plus one) and writes the population in;
// it then reads the offspring, evaluates them and feeds them back as the
// next generation, for GENS generations. A reference model written here
// (its own CA generators with the engine's seeds, roulette-wheel selection on
// the scaled ball, uniform crossover of pairs 0/1 and 2/3, mutation of whole
// genes) predicts every offspring gene, which is checked, together with the
// timing: offspring appear 2*POP+2 clocks after the last load beat, for
// GENES clocks, and done ends the run.
// Mechanisms counted, each must occur: chromosome selected by each column,
// the same chromosome selected by several columns, a zero-fitness
// chromosome left out, crossover swapping genes, mutation inverting a gene,
// the fitness sum saturating, a paused load, and a full generation loop.
module tb_ga_engine;
  import ga_pkg::*;
  localparam int GENS = 60;
  localparam logic [15:0] SEED = 16'h0001;   // the engine's default

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                       clr, pop_valid, pop_ready, out_valid, out_first, busy, done;
  logic [GENE_W-1:0]          pop_gene;
  logic [FIT_W-1:0]           pop_fit;
  logic [RNG_W-1:0]           pmut;
  logic [POP-1:0][GENE_W-1:0] out_gene;
  logic [POP-1:0]             sel_found;

  ga_engine dut (.clk, .clr, .pop_valid, .pop_gene, .pop_fit, .pop_ready, .pmut,
                 .out_valid, .out_first, .out_gene, .sel_found, .busy, .done);

  // ---------------------------------------------------------------- reference
  function automatic logic [15:0] seed_of(input int i);
    return SEED + 16'(i * 16'h3C5B);
  endfunction

  function automatic logic [15:0] ca16(input logic [15:0] s);
    logic [17:0] e;
    logic [15:0] n;
    e = {1'b1, s, 1'b0};
    for (int i = 0; i < 16; i++) n[i] = e[i] ^ e[i+2] ^ ((i == 0 || i % 2 == 1) ? s[i] : 1'b0);
    return n;
  endfunction

  function automatic logic [7:0] ca8(input logic [7:0] s);
    logic [9:0] e;
    logic [7:0] n;
    e = {1'b1, s, 1'b0};
    for (int i = 0; i < 8; i++) n[i] = e[i] ^ e[i+2] ^ ((i == 0 || i % 2 == 1) ? s[i] : 1'b0);
    return n;
  endfunction

  logic [15:0] ran_st [POP];
  logic [7:0]  xo_st;
  logic [15:0] mut_st [POP];

  logic [7:0]  pop [POP][GENES];
  logic [15:0] fit [POP];
  logic [7:0]  expo [POP][GENES];

  // Mechanism counters.
  int n_sel_col [POP];
  int n_dup, n_zero_skip, n_swap, n_mut, n_sat, n_pause, n_loop;

  function automatic logic [15:0] fitness(input int unsigned k);
    int ones;
    ones = 1;
    for (int g = 0; g < GENES; g++) ones += $countones(pop[k][g]);
    return 16'(ones);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Predict the offspring of the population in pop/fit.
  task automatic predict();
    int sum, ball, acc;
    int pick [POP];
    logic [7:0] sel [POP][GENES];
    logic [7:0] ch [POP][GENES];
    logic [31:0] prod;
    sum = 0;
    for (int k = 0; k < POP; k++) sum += int'(fit[k]);
    if (sum > 65535) begin sum = 65535; n_sat++; end
    for (int j = 0; j < POP; j++) begin
      ran_st[j] = ca16(ran_st[j]);          // one step per generation
      prod = ran_st[j] * 32'(sum);
      ball = int'(prod >> 16);
      acc = 0; pick[j] = -1;
      for (int k = 0; k < POP; k++) begin
        acc += int'(fit[k]);
        if (pick[j] < 0 && ball < acc) pick[j] = k;
        else if (pick[j] < 0 && fit[k] == 0) n_zero_skip++;
      end
      if (pick[j] >= 0) n_sel_col[j]++;
      for (int g = 0; g < GENES; g++) sel[j][g] = (pick[j] >= 0) ? pop[pick[j]][g] : 8'h00;
    end
    for (int a = 0; a < POP; a++)
      for (int b = a + 1; b < POP; b++)
        if (pick[a] == pick[b]) n_dup++;
    for (int g = 0; g < GENES; g++) begin
      for (int p = 0; p < POP / 2; p++) begin
        ch[2*p][g]   = (sel[2*p][g] & ~xo_st) | (sel[2*p+1][g] & xo_st);
        ch[2*p+1][g] = (sel[2*p+1][g] & ~xo_st) | (sel[2*p][g] & xo_st);
        if (((sel[2*p][g] ^ sel[2*p+1][g]) & xo_st) != 8'h00) n_swap++;
      end
      xo_st = ca8(xo_st);
      for (int m = 0; m < POP; m++) begin
        if (mut_st[m] < pmut) begin
          expo[m][g] = ~ch[m][g];
          n_mut++;
        end else begin
          expo[m][g] = ch[m][g];
        end
        mut_st[m] = ca16(mut_st[m]);
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, got;
    clr = 1'b1; pop_valid = 1'b0; pop_gene = '0; pop_fit = '0; pmut = 16'h0800;
    n_dup = 0; n_zero_skip = 0; n_swap = 0; n_mut = 0; n_sat = 0; n_pause = 0; n_loop = 0;
    foreach (n_sel_col[j]) n_sel_col[j] = 0;
    for (int j = 0; j < POP; j++) ran_st[j] = seed_of(j);
    xo_st = seed_of(POP)[7:0];
    for (int m = 0; m < POP; m++) mut_st[m] = seed_of(POP + 1 + m);
    for (int k = 0; k < POP; k++)
      for (int g = 0; g < GENES; g++) pop[k][g] = 8'($urandom);
    #12 clr = 1'b0;
    @(negedge clk);   // seed load clock

    for (int gen = 0; gen < GENS; gen++) begin
      // Fitness evaluation of the current population.
      for (int k = 0; k < POP; k++) fit[k] = fitness(k);
      if (gen % 7 == 3) fit[1] = 16'd0;                 // an unfit individual
      if (gen % 11 == 5) foreach (fit[k]) fit[k] = 16'd30000;   // fitness sum beyond 16 bits
      predict();
      // Write the population in.
      check(pop_ready, "engine ready for a population");
      for (int k = 0; k < POP; k++) begin
        for (int g = 0; g < GENES; g++) begin
          if (gen % 5 == 2 && g == 3) begin
            pop_valid = 1'b0;
            @(negedge clk);
            n_pause++;
          end
          pop_valid = 1'b1; pop_gene = pop[k][g]; pop_fit = fit[k];
          @(negedge clk);
        end
      end
      pop_valid = 1'b0;
      // Collect the offspring.
      cyc = 0; got = 0;
      while (!done && cyc < 100) begin
        if (out_valid) begin
          if (got == 0) check(out_first && cyc == 2*POP + 2, $sformatf("first offspring gene after %0d clocks", cyc));
          check(sel_found == '1, "every column selected");
          check(busy, "busy while offspring come out");
          for (int m = 0; m < POP; m++)
            check(out_gene[m] == expo[m][got],
                  $sformatf("gen %0d offspring %0d gene %0d: %02x vs %02x", gen, m, got, out_gene[m], expo[m][got]));
          got++;
        end
        @(negedge clk);
        cyc++;
      end
      // done coincides with the last gene, which the loop has not yet read.
      check(out_valid && got == GENES - 1, $sformatf("done with the last gene (%0d)", got));
      for (int m = 0; m < POP; m++) begin
        check(out_gene[m] == expo[m][got], "last offspring gene");
        for (int g = 0; g < GENES - 1; g++) pop[m][g] = expo[m][g];
        pop[m][GENES-1] = out_gene[m];
      end
      check(cyc == 2*POP + 2 + GENES - 1, $sformatf("run length %0d", cyc));
      @(negedge clk);
      n_loop++;
    end

    $display("mechanisms: selected per column %0d %0d %0d %0d, same chromosome in two columns %0d, unfit skipped %0d",
             n_sel_col[0], n_sel_col[1], n_sel_col[2], n_sel_col[3], n_dup, n_zero_skip);
    $display("            crossover swaps %0d, mutated genes %0d, saturated sums %0d, paused loads %0d, generations %0d",
             n_swap, n_mut, n_sat, n_pause, n_loop);
    foreach (n_sel_col[j]) check(n_sel_col[j] > 0, "selection in every column");
    check(n_dup > 0, "duplicate selection seen");
    check(n_zero_skip > 0, "unfit chromosome skipped");
    check(n_swap > 0, "crossover swap seen");
    check(n_mut > 0, "mutation seen");
    check(n_sat > 0, "fitness sum saturation seen");
    check(n_pause > 0, "paused load seen");
    check(n_loop == GENS, "all generations ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
