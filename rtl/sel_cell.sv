// sel_cell: one processing element of the systolic roulette-wheel selection array.
//
// A candidate chromosome travels left to right along a row (ga, one gene per
// clock, with its fitness fit held for the whole chromosome). A "ball" (a
// random point on the roulette wheel) travels top to bottom down a column,
// together with a select flag and the gene stream of whatever the column has
// selected so far (sg). Each cell subtracts the row's fitness from the ball;
// if the ball lies below the fitness (the difference crosses zero) and the
// column has not selected yet, this row's chromosome is the winner: its gene
// overwrites the column's selected-gene stream, the select flag is set and
// the outgoing ball is forced to all ones so no later cell can select again.
// Otherwise the ball leaves reduced by the fitness.
//
// Interface: row inputs ga_i/fit_i, row outputs ga_o/fit_o; column inputs
// ball_i/sel_i/sg_i, column outputs ball_o/sel_o/sg_o. All outputs are
// registered (one clock per cell in both directions), which is what keeps the
// stagger between neighbouring rows and columns. ce enables every register;
// clr clears them asynchronously.
// The subtraction, zero-crossing test, single selection per column and the
// all-ones ball after a selection follow the document and its cell
// simulation; the separate selected-gene channel is this design's choice.
module sel_cell
  import ga_pkg::*;
#(
  parameter int unsigned GW = GENE_W,
  parameter int unsigned FW = FIT_W
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          ce,
  input  logic [GW-1:0] ga_i,
  input  logic [FW-1:0] fit_i,
  input  logic [FW-1:0] ball_i,
  input  logic          sel_i,
  input  logic [GW-1:0] sg_i,
  output logic [GW-1:0] ga_o,
  output logic [FW-1:0] fit_o,
  output logic [FW-1:0] ball_o,
  output logic          sel_o,
  output logic [GW-1:0] sg_o
);
  logic [FW:0] diff;   // ball - fitness with a borrow bit
  logic        hit;

  assign diff = {1'b0, ball_i} - {1'b0, fit_i};
  assign hit  = !sel_i && diff[FW];   // zero crossing, first in this column

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      ga_o   <= '0;
      fit_o  <= '0;
      ball_o <= '0;
      sel_o  <= 1'b0;
      sg_o   <= '0;
    end else if (ce) begin
      ga_o   <= ga_i;
      fit_o  <= fit_i;
      ball_o <= (hit || sel_i) ? '1 : diff[FW-1:0];
      sel_o  <= sel_i || hit;
      sg_o   <= hit ? ga_i : sg_i;
    end
  end
endmodule
