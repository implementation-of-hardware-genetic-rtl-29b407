// tb_mut_cell: self-checking test of one mutation cell.
//
// Drives random numbers, probabilities and gene bits, and checks the
// comparator output (random number below the probability) and the
// registered gene, inverted exactly when the comparator is high, including
// the boundaries rnd = pmut and pmut = 0.
module tb_mut_cell;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, ce, gene, lt, mg;
  logic [15:0] rnd, pmut;

  mut_cell dut (.clk, .clr, .ce, .rnd, .pmut, .gene, .lt, .mg);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [15:0] r, input logic [15:0] p, input logic g);
    logic e;
    e = (r < p);
    @(negedge clk); rnd = r; pmut = p; gene = g;
    #1 check(lt == e, $sformatf("lt rnd=%0d pmut=%0d", r, p));
    @(negedge clk);
    check(mg == (g ^ e), $sformatf("mg rnd=%0d pmut=%0d gene=%0d", r, p, g));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; ce = 1'b1; rnd = '0; pmut = '0; gene = 1'b0;
    #12 clr = 1'b0;
    run(16'h0AF7, 16'h1000, 1'b1);   // below: inverted
    run(16'h9A36, 16'h1000, 1'b1);   // above: kept
    run(16'h1000, 16'h1000, 1'b0);   // equal: kept
    run(16'h0000, 16'h0000, 1'b1);   // zero probability: never
    run(16'hFFFE, 16'hFFFF, 1'b0);
    for (int n = 0; n < 300; n++) run(16'($urandom), 16'($urandom), 1'($urandom));
    @(negedge clk); ce = 1'b0; gene = ~mg; pmut = 16'h0;
    begin
      logic h;
      h = mg;
      @(negedge clk);
      check(mg == h, "ce low holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
