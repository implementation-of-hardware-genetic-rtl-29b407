// tb_sel_array: self-checking test of the 4x4 systolic selection array.
//
// For many random populations (four chromosomes of six 8-bit genes, random
// fitness values) and random column numbers, feeds row k k clocks after row
// 0, one gene per clock, and checks that after exactly 2*4-1 clocks every
// column delivers, gene by gene and all columns aligned, the chromosome a
// roulette-wheel reference picks: the first k whose running fitness sum
// exceeds ball = (rnd * sum) >> 16.
module tb_sel_array;
  localparam int N = 4, NG = 6, LAT = 2*N - 1;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                   clr;
  logic [N-1:0][7:0]      ga_in, sg_out;
  logic [N-1:0][15:0]     fit_in, rnd;
  logic [15:0]            fit_sum;
  logic [N-1:0]           sel_out;

  sel_array dut (.clk, .clr, .ce(1'b1), .ga_in, .fit_in, .rnd, .fit_sum, .sg_out, .sel_out);

  logic [7:0]  chrom [N][NG];
  logic [15:0] fit [N];
  int          pick [N];
  int          hist [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    int cyc;
    logic [31:0] prod;
    int ball, acc;
    foreach (hist[i]) hist[i] = 0;
    clr = 1'b1; ga_in = '0; fit_in = '0; rnd = '0; fit_sum = '0;
    #12 clr = 1'b0;
    for (int t = 0; t < 200; t++) begin
      sum = 0;
      for (int k = 0; k < N; k++) begin
        fit[k] = 16'($urandom_range(1, 16000));
        if (t % 10 == 0 && k == 1) fit[k] = 16'd0;   // a zero-fitness chromosome is never picked
        sum += int'(fit[k]);
        for (int g = 0; g < NG; g++) chrom[k][g] = 8'($urandom);
      end
      for (int j = 0; j < N; j++) begin
        rnd[j] = 16'($urandom);
        prod = rnd[j] * 32'(sum);
        ball = int'(prod >> 16);
        acc = 0; pick[j] = -1;
        for (int k = 0; k < N; k++) begin
          acc += int'(fit[k]);
          if (pick[j] < 0 && ball < acc) pick[j] = k;
        end
        hist[pick[j]]++;
      end
      fit_sum = 16'(sum);
      // Feed the staggered rows and collect outputs.
      for (cyc = 0; cyc < N + NG + LAT + 1; cyc++) begin
        @(negedge clk);
        for (int k = 0; k < N; k++) begin
          int g;
          g = cyc - k;
          if (g >= 0 && g < NG) begin
            ga_in[k] = chrom[k][g];
            fit_in[k] = fit[k];
          end
        end
        // Gene g of row 0 was applied in cycle g; its selection is visible in cycle g+LAT.
        begin
          int g;
          g = cyc - LAT;
          if (g >= 0 && g < NG) begin
            for (int j = 0; j < N; j++) begin
              check(sel_out[j], $sformatf("trial %0d column %0d found", t, j));
              check(sg_out[j] == chrom[pick[j]][g],
                    $sformatf("trial %0d column %0d gene %0d: %02x vs chrom %0d %02x",
                              t, j, g, sg_out[j], pick[j], chrom[pick[j]][g]));
            end
          end
        end
      end
    end
    for (int k = 0; k < N; k++) check(hist[k] > 0, $sformatf("chromosome %0d picked at least once", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
