// mut_cell: one mutation cell.
//
// A 16-bit magnitude comparator raises lt when the random number rnd is
// below the mutation probability pmut (a 16-bit fraction of one). lt is
// XORed into the incoming gene bit(s), so the bit is inverted exactly when
// lt is high, and the result is registered (clock enable ce, asynchronous
// clear clr), giving one clock of latency. W is the number of gene bits
// that share this comparator; the document's cell handles one bit.
// The comparator, XOR gate and clock-enabled register all follow the
// document's schematic.
module mut_cell #(
  parameter int unsigned W  = 1,
  parameter int unsigned RW = 16
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          ce,
  input  logic [RW-1:0] rnd,
  input  logic [RW-1:0] pmut,
  input  logic [W-1:0]  gene,
  output logic          lt,
  output logic [W-1:0]  mg
);
  assign lt = (rnd < pmut);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     mg <= '0;
    else if (ce) mg <= gene ^ {W{lt}};
  end
endmodule
