// tb_xover_module: self-checking test of the crossover module.
//
// Loads a seed, streams random parent genes into both cells with gaps
// (ce low) in between, and checks each child gene against a reference that
// runs its own model of the eight-site generator (rule 150 at sites 0, 1,
// 3, 5, 7, rule 90 elsewhere, left boundary 0, right boundary 1) and applies
// the swap rule. Also checks that the generator returns to zero after 255
// steps from zero.
module tb_xover_module;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             clr, ce, load;
  logic [7:0]       seed, mask;
  logic [3:0][7:0]  par, child;

  xover_module dut (.clk, .clr, .ce, .load, .seed, .par, .child, .mask);

  function automatic logic [7:0] ref_next(input logic [7:0] s);
    logic [9:0] e;
    logic [7:0] n;
    e = {1'b1, s, 1'b0};
    for (int i = 0; i < 8; i++) n[i] = e[i] ^ e[i+2] ^ ((i == 0 || i % 2 == 1) ? s[i] : 1'b0);
    return n;
  endfunction

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
    logic [7:0] st;
    logic [3:0][7:0] p;
    int steps;
    clr = 1'b1; ce = 1'b0; load = 1'b0; seed = '0; par = '0;
    #12 clr = 1'b0;
    @(negedge clk); load = 1'b1; seed = 8'h5C;
    @(negedge clk); load = 1'b0;
    st = 8'h5C;
    check(mask == st, "seed loaded");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ce = ($urandom_range(0, 3) != 0);
      for (int c = 0; c < 4; c++) p[c] = 8'($urandom);
      par = p;
      if (ce) begin
        check(mask == st, $sformatf("mask %02x vs %02x", mask, st));
        @(negedge clk);
        ce = 1'b0;
        for (int q = 0; q < 2; q++) begin
          check(child[2*q]   == ((p[2*q] & ~st) | (p[2*q+1] & st)), "child even");
          check(child[2*q+1] == ((p[2*q+1] & ~st) | (p[2*q] & st)), "child odd");
        end
        st = ref_next(st);
      end
    end
    // Period from zero.
    @(negedge clk); load = 1'b1; seed = 8'h00;
    @(negedge clk); load = 1'b0; ce = 1'b1; steps = 0;
    do begin @(negedge clk); steps++; end while (mask != 8'h00 && steps < 400);
    ce = 1'b0;
    check(steps == 255, $sformatf("8-site period %0d", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
