// tb_chrom_mem: self-checking test of a chromosome memory block.
//
// Writes random chromosomes of six genes with their fitness and reads them
// back through the shared wrapping pointer, checking the one-clock read
// latency, the order of the genes, the fitness output, that reads with gaps
// keep their place, and that several chromosomes in a row are handled.
module tb_chrom_mem;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, wr_en, rd_en;
  logic [7:0]  wr_gene, rd_gene;
  logic [15:0] wr_fit, rd_fit;

  chrom_mem dut (.clk, .clr, .wr_en, .wr_gene, .wr_fit, .rd_en, .rd_gene, .rd_fit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  c [6];
    logic [15:0] f;
    clr = 1'b1; wr_en = 1'b0; rd_en = 1'b0; wr_gene = '0; wr_fit = '0;
    #12 clr = 1'b0;
    for (int t = 0; t < 50; t++) begin
      f = 16'($urandom);
      for (int g = 0; g < 6; g++) begin
        c[g] = 8'($urandom);
        @(negedge clk); wr_en = 1'b1; wr_gene = c[g]; wr_fit = f;
      end
      @(negedge clk); wr_en = 1'b0; wr_gene = 8'hEE; wr_fit = 16'hDEAD;
      check(rd_fit == f, "fitness kept");
      for (int g = 0; g < 6; g++) begin
        if (t % 2 == 1) begin
          // Idle clocks between reads must not move the pointer.
          rd_en = 1'b0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        rd_en = 1'b1;
        @(negedge clk);
        rd_en = 1'b0;
        check(rd_gene == c[g], $sformatf("trial %0d gene %0d: %02x vs %02x", t, g, rd_gene, c[g]));
        check(rd_fit == f, "fitness during read");
      end
      // A second pass reads the same chromosome again.
      rd_en = 1'b1;
      for (int g = 0; g < 6; g++) begin
        @(negedge clk);
        check(rd_gene == c[g], $sformatf("trial %0d reread gene %0d", t, g));
      end
      rd_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
