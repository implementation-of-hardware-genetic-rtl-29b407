// tb_sel_cell: self-checking test of one selection cell.
//
// Starts with the published cell example (fitness 255 against balls 191 and
// 447), then drives random inputs and compares every registered output with
// a reference computed here: selection when the ball is below the fitness
// and the column has not selected yet, all-ones ball after a selection,
// ball minus fitness otherwise, and row data passed on unchanged.
module tb_sel_cell;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr, ce, sel_i, sel_o;
  logic [7:0]  ga_i, sg_i, ga_o, sg_o;
  logic [15:0] fit_i, ball_i, fit_o, ball_o;

  sel_cell dut (.clk, .clr, .ce, .ga_i, .fit_i, .ball_i, .sel_i, .sg_i,
                .ga_o, .fit_o, .ball_o, .sel_o, .sg_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply_and_check(input logic [7:0] g, input logic [15:0] f, input logic [15:0] b,
                                 input logic s, input logic [7:0] sg);
    logic        hit;
    logic [15:0] eb;
    @(negedge clk);
    ga_i = g; fit_i = f; ball_i = b; sel_i = s; sg_i = sg;
    hit = !s && (b < f);
    eb  = (hit || s) ? 16'hFFFF : 16'(b - f);
    @(negedge clk);
    check(ga_o == g && fit_o == f, "row data passed on");
    check(sel_o == (s || hit), $sformatf("sel_o ball=%0d fit=%0d sel_i=%0d", b, f, s));
    check(ball_o == eb, $sformatf("ball_o %0d vs %0d", ball_o, eb));
    check(sg_o == (hit ? g : sg), "selected gene");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; ce = 1'b1; ga_i = '0; sg_i = '0; fit_i = '0; ball_i = '0; sel_i = 1'b0;
    #12 clr = 1'b0;
    // Published example.
    apply_and_check(8'h01, 16'd255, 16'd191, 1'b0, 8'h00);
    check(ball_o == 16'hFFFF && sel_o, "example: selected, ball all ones");
    apply_and_check(8'h01, 16'd255, 16'd447, 1'b0, 8'h00);
    check(ball_o == 16'd192 && !sel_o, "example: not selected, ball 192");
    // Boundary: ball equal to fitness is not a zero crossing.
    apply_and_check(8'h5A, 16'd100, 16'd100, 1'b0, 8'h33);
    apply_and_check(8'h5A, 16'd100, 16'd99, 1'b0, 8'h33);
    // Already selected column never selects again.
    apply_and_check(8'hA5, 16'd500, 16'd3, 1'b1, 8'h77);
    for (int i = 0; i < 300; i++)
      apply_and_check(8'($urandom), 16'($urandom), 16'($urandom), 1'($urandom), 8'($urandom));
    // Clock enable low holds the outputs.
    begin
      logic [15:0] b0;
      b0 = ball_o;
      @(negedge clk); ce = 1'b0; ball_i = ~ball_i; fit_i = 16'd1;
      @(negedge clk);
      check(ball_o == b0, "ce low holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
