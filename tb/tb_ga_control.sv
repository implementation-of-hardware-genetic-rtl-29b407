// tb_ga_control: self-checking test of the chromosome delivery controller.
//
// After reset checks the one-clock seed load, then loads populations of four
// chromosomes (six beats each, with random pauses) and checks the one-hot
// write enables, the saturating fitness sum, the single generator step on
// the last beat, the staggered read windows of the four blocks, the
// crossover and mutation enables, the output window of six clocks with its
// first-gene marker, done and the total run length of 2*4+1+6 clocks.
module tb_ga_control;
  localparam int N = 4, NG = 6, XO0 = 2*N, OUT0 = XO0 + 2, LAST = OUT0 + NG - 1;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         clr, pop_valid, pop_ready, seed_load, sel_step, xo_ce, mut_ce;
  logic         out_valid, out_first, busy, done;
  logic [15:0]  pop_fit, fit_sum;
  logic [N-1:0] wr_en, rd_en;

  ga_control dut (.clk, .clr, .pop_valid, .pop_fit, .pop_ready, .wr_en, .rd_en, .fit_sum,
                  .seed_load, .sel_step, .xo_ce, .mut_ce, .out_valid, .out_first, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    logic [15:0] f;
    clr = 1'b1; pop_valid = 1'b0; pop_fit = '0;
    #12 clr = 1'b0;
    check(seed_load && !pop_ready, "seed load right after reset");
    @(negedge clk);
    check(!seed_load && pop_ready, "seed load lasts one clock");
    for (int t = 0; t < 20; t++) begin
      sum = 0;
      for (int k = 0; k < N; k++) begin
        f = (t % 4 == 3) ? 16'hF000 : 16'($urandom_range(0, 16000));
        sum += int'(f);
        for (int g = 0; g < NG; g++) begin
          if (t % 2 == 1) begin
            pop_valid = 1'b0;
            repeat ($urandom_range(0, 2)) begin
              @(negedge clk);
              check(wr_en == '0 && !sel_step, "idle beat writes nothing");
            end
          end
          pop_valid = 1'b1; pop_fit = f;
          #1;
          check(pop_ready, "ready while loading");
          check(wr_en == N'(1 << k), $sformatf("write enable block %0d", k));
          check(sel_step == (k == N-1 && g == NG-1), "generator step on last beat only");
          @(negedge clk);
        end
      end
      pop_valid = 1'b0;
      check(fit_sum == ((sum > 65535) ? 16'hFFFF : 16'(sum)), $sformatf("fitness sum %0d vs %0d", fit_sum, sum));
      for (int c = 0; c <= LAST; c++) begin
        #1;
        for (int k = 0; k < N; k++)
          check(rd_en[k] == (c >= k && c < k + NG), $sformatf("read window block %0d cycle %0d", k, c));
        check(xo_ce == (c >= XO0 && c < XO0 + NG), $sformatf("crossover enable cycle %0d", c));
        check(mut_ce == (c >= XO0 + 1 && c < XO0 + 1 + NG), "mutation enable");
        check(out_valid == (c >= OUT0), $sformatf("output valid cycle %0d", c));
        check(out_first == (c == OUT0), "first-gene marker");
        check(done == (c == LAST), "done");
        check(busy && !pop_ready, "busy during the run");
        @(negedge clk);
      end
      check(!busy && pop_ready && !out_valid, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
