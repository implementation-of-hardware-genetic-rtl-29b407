// tb_ca_rng: self-checking test of the hybrid CA random number generator.
//
// Checks the 16-site generator against the published output sequences from
// seeds 0 and 1 (first sixteen numbers each), against an independent
// neighbour-by-neighbour reference model from seeds 255 and 65535, the
// next-state output d, the clock enable, the period of 65535 from the
// all-zero state, and the 4-site variant (rule vector 4'hA) from zero.
module tb_ca_rng;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        clr, ce, load;
  logic [15:0] seed, q, d;
  logic        ce4;
  logic [3:0]  q4, d4;

  ca_rng dut (.clk, .clr, .ce, .load, .seed, .a(1'b0), .z(1'b1), .q, .d);
  ca_rng #(.N(4), .RULE150(4'hA)) dut4 (.clk, .clr, .ce(ce4), .load(1'b0), .seed(4'h0),
                                         .a(1'b0), .z(1'b1), .q(q4), .d(d4));

  // Published sequences from seed 0 and seed 1.
  localparam logic [15:0] SEQ0 [16] = '{32768, 16384, 8192, 61440, 47104, 1024, 35328, 23296,
                                        4480, 43840, 10528, 61168, 32824, 16452, 8362, 61867};
  localparam logic [3:0] EXP4 [6] = '{4'd8, 4'd4, 4'd2, 4'd15, 4'd11, 4'd1};
  localparam logic [15:0] SEQ1 [16] = '{32771, 16388, 8202, 61467, 47152, 1112, 35476, 23266,
                                        4631, 44838, 9213, 62637, 45989, 7225, 48711, 2478};

  // Reference: site i uses rule 150 for i = 0 and odd i, rule 90 otherwise.
  function automatic logic [15:0] ref_next(input logic [15:0] s);
    logic l, r, self;
    logic [15:0] n;
    for (int i = 0; i < 16; i++) begin
      l    = (i == 0)  ? 1'b0 : s[i-1];
      r    = (i == 15) ? 1'b1 : s[i+1];
      self = ((i % 2) == 1 || i == 0) ? s[i] : 1'b0;
      n[i] = l ^ r ^ self;
    end
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_seed(input logic [15:0] s);
    @(negedge clk); load = 1'b1; seed = s;
    @(negedge clk); load = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int period;
    clr = 1'b1; ce = 1'b0; load = 1'b0; seed = '0; ce4 = 1'b0;
    #12 clr = 1'b0;
    check(q == 16'd0, "cleared state is zero");

    // Seed 0 column.
    @(negedge clk); ce = 1'b1;
    for (int i = 0; i < 16; i++) begin
      check(d == SEQ0[i], $sformatf("seed0 d step %0d: %0d vs %0d", i, d, SEQ0[i]));
      @(negedge clk);
      check(q == SEQ0[i], $sformatf("seed0 step %0d: %0d vs %0d", i, q, SEQ0[i]));
    end
    // Clock enable low holds the state.
    ce = 1'b0; m = q;
    repeat (3) @(negedge clk);
    check(q == m, "ce low holds");

    // Seed 1 column.
    load_seed(16'd1);
    check(q == 16'd1, "seed loaded");
    ce = 1'b1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      check(q == SEQ1[i], $sformatf("seed1 step %0d: %0d vs %0d", i, q, SEQ1[i]));
    end
    ce = 1'b0;

    // Seeds 255 and 65535 against the reference model.
    for (int c = 0; c < 2; c++) begin
      m = (c == 0) ? 16'd255 : 16'd65535;
      load_seed(m);
      ce = 1'b1;
      for (int i = 0; i < 16; i++) begin
        m = ref_next(m);
        @(negedge clk);
        check(q == m, $sformatf("seed col %0d step %0d: %0d vs %0d", c, i, q, m));
      end
      ce = 1'b0;
    end

    // The state pair shown in the mutation module's simulation.
    load_seed(16'h0AF7);
    check(d == 16'h9A36, "next state of 0x0AF7");

    // Period from zero.
    load_seed(16'h0000);
    ce = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != 16'd0 && period < 70000);
    ce = 1'b0;
    check(period == 65535, $sformatf("period %0d", period));

    // Four-site generator from zero: 8, 4, 2, 15, 11, 1, period 15.
    ce4 = 1'b1;
    begin
      for (int i = 0; i < 6; i++) begin
        @(negedge clk);
        check(q4 == EXP4[i], $sformatf("4-site step %0d: %0d", i, q4));
      end
      for (int i = 6; i < 15; i++) @(negedge clk);
      check(q4 == 4'd0, "4-site period 15");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
