// ca_rng: hybrid cellular-automaton pseudo-random number generator.
//
// N one-bit sites in a line. Each clock with ce high, site i takes the XOR of
// its left and right neighbours (rule 90), and also of itself when
// RULE150[i] is set (rule 150). The boundary is not cyclic: the left
// neighbour of site 0 is input a, the right neighbour of site N-1 is input z.
// Tying z to 1 lets the generator start from the all-zero state: from zero
// the 16-site default runs through 65535 distinct values before it returns to
// zero. q is the registered state; d is the state the next enabled clock
// will load, as the document's simulation shows next to q.
//
// Timing: one step per enabled clock, q updated on the rising edge. clr is an
// asynchronous clear to zero, as in the document's process; load
// (synchronous, over ce) writes seed into the sites, which is this design's
// way of giving each generator instance its own starting point.
// The 16-site rule vector 16'hAAAB (site 0 and odd sites rule 150, the other
// even sites rule 90) reproduces the document's table of outputs from seeds
// 0, 1 and 255; the 4-site generator listed in the document is RULE150=4'hA.
module ca_rng #(
  parameter int unsigned N       = 16,
  parameter logic [N-1:0] RULE150 = N'(ga_pkg::RULE150_16)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         ce,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         a,
  input  logic         z,
  output logic [N-1:0] q,
  output logic [N-1:0] d
);
  // Extended neighbourhood: {z, q, a}, so site i sees ext[i] (left) and ext[i+2] (right).
  logic [N+1:0] ext;
  assign ext = {z, q, a};

  always_comb begin
    for (int i = 0; i < N; i++) begin
      d[i] = ext[i] ^ ext[i+2] ^ (RULE150[i] & q[i]);
    end
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr)       q <= '0;
    else if (load) q <= seed;
    else if (ce)   q <= d;
  end
endmodule
