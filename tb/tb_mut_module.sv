// tb_mut_module: self-checking test of the mutation module.
//
// Reproduces the published case (gene 11001100, probability 0x1000,
// random number 0x0AF7 below it, so the gene comes out as 00110011, with the
// next random number 0x9A36 above it, so the following gene passes
// unchanged), then streams random genes at several probabilities and checks
// every output gene against a reference that runs its own model of the
// 16-site generator. Also checks that the observed mutation rate is close
// to the probability.
module tb_mut_module;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, ce, load;
  logic [15:0] seed, pmut, q, d;
  logic [7:0]  gene, lt, mg;

  mut_module dut (.clk, .clr, .ce, .load, .seed, .a(1'b0), .z(1'b1), .pmut, .gene,
                  .lt, .mg, .q, .d);

  localparam logic [15:0] PM [4] = '{16'h0000, 16'h1000, 16'h8000, 16'hFFFF};

  function automatic logic [15:0] ref_next(input logic [15:0] s);
    logic [17:0] e;
    logic [15:0] n;
    e = {1'b1, s, 1'b0};
    for (int i = 0; i < 16; i++) n[i] = e[i] ^ e[i+2] ^ ((i == 0 || i % 2 == 1) ? s[i] : 1'b0);
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] st;
    logic [7:0]  g;
    logic        hit;
    int          mutated;
    clr = 1'b1; ce = 1'b0; load = 1'b0; seed = '0; pmut = '0; gene = '0;
    #12 clr = 1'b0;
    // Published case.
    @(negedge clk); load = 1'b1; seed = 16'h0AF7;
    @(negedge clk); load = 1'b0; ce = 1'b1; gene = 8'hCC; pmut = 16'h1000;
    #1 check(lt == 8'hFF, "published: all comparators high");
    check(d == 16'h9A36, "published: next random number");
    @(negedge clk);
    check(mg == 8'h33, $sformatf("published: gene inverted, %08b", mg));
    check(lt == 8'h00, "published: next number above probability");
    @(negedge clk);
    check(mg == 8'hCC, "published: next gene unchanged");
    ce = 1'b0;
    // Random streams at several probabilities.
    for (int pi = 0; pi < 4; pi++) begin
      pmut = PM[pi];
      st = 16'h1234 + 16'(pi);
      @(negedge clk); load = 1'b1; seed = st;
      @(negedge clk); load = 1'b0;
      mutated = 0;
      for (int n = 0; n < 2000; n++) begin
        g = 8'($urandom);
        hit = (st < pmut);
        @(negedge clk); ce = 1'b1; gene = g;
        check(q == st, "generator state");
        @(negedge clk); ce = 1'b0;
        check(mg == (hit ? ~g : g), $sformatf("p=%04x gene %0d", pmut, n));
        if (mg != g) mutated++;
        st = ref_next(st);
      end
      // Rate within 2% of 2000 * pmut / 65536.
      check(mutated >= int'(2000 * pmut / 65536) - 40 && mutated <= int'(2000 * pmut / 65536) + 40,
            $sformatf("mutation rate %0d of 2000 at p=%04x", mutated, pmut));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
