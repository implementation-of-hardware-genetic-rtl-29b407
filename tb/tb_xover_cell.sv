// tb_xover_cell: self-checking test of the uniform crossover cell.
//
// Checks the published 16-bit example (parents 0011100111110000 and
// 1110011100001111 with mask 1000101100010000 give children
// 1011001111100000 and 0110110100011111), then random words against a
// bit-by-bit reference, the one-clock latency, and the clock enable.
module tb_xover_cell;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, ce;
  logic [15:0] i1, i2, rand_i, o1, o2;

  xover_cell #(.W(16)) dut (.clk, .clr, .ce, .i1, .i2, .rand_i, .o1, .o2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [15:0] a, input logic [15:0] b, input logic [15:0] r);
    logic [15:0] e1, e2;
    for (int k = 0; k < 16; k++) begin
      e1[k] = r[k] ? b[k] : a[k];
      e2[k] = r[k] ? a[k] : b[k];
    end
    @(negedge clk); i1 = a; i2 = b; rand_i = r;
    @(negedge clk);
    check(o1 == e1, $sformatf("o1 %b vs %b", o1, e1));
    check(o2 == e2, $sformatf("o2 %b vs %b", o2, e2));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; ce = 1'b1; i1 = '0; i2 = '0; rand_i = '0;
    #12 clr = 1'b0;
    run(16'b0011100111110000, 16'b1110011100001111, 16'b1000101100010000);
    check(o1 == 16'b1011001111100000 && o2 == 16'b0110110100011111, "published example");
    // Latency: new inputs are not visible before the next edge.
    @(negedge clk); i1 = 16'hFFFF; i2 = 16'h0000; rand_i = 16'h0000;
    #1 check(o1 == 16'b1011001111100000, "output registered");
    for (int n = 0; n < 200; n++) run(16'($urandom), 16'($urandom), 16'($urandom));
    @(negedge clk); ce = 1'b0; i1 = ~o1; i2 = ~o2; rand_i = 16'h0;
    begin
      logic [15:0] h1;
      h1 = o1;
      @(negedge clk);
      check(o1 == h1, "ce low holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
