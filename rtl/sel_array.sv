// sel_array: POP x POP systolic roulette-wheel selection array.
//
// Row k carries candidate chromosome k (gene stream and fitness) from left
// to right; column j carries one ball down from the top and picks one
// chromosome, so the array makes POP independent roulette-wheel draws over a
// population of POP. The ball of column j is the column's random number
// taken as a fraction of one and scaled by the population's fitness sum:
// ball = (rnd * fit_sum) >> FW, so it always lies in [0, fit_sum) and column j
// selects chromosome k with probability fit_k / fit_sum.
//
// Timing: row k must be fed k clocks after row 0 (the stagger), gene by gene,
// with its fitness held for the whole chromosome; rnd and fit_sum must stay
// constant while a selection runs. The bottom of column j then delivers the
// selected chromosome j clocks after column 0; the output registers here
// remove that skew, so every sg_out[j] carries gene g of its selected
// chromosome LAT = 2*POP-1 clocks after row 0 received gene g. sel_out[j]
// is high when column j found a winner (always, if fit_sum is the true sum
// of the row fitness values and nonzero).
// The array of selection cells, the ball entering each column from the top
// and the chromosomes entering from the left follow the document; the
// scaling by multiplication and the output deskew registers are this
// design's choices.
module sel_array
  import ga_pkg::*;
#(
  parameter int unsigned N  = POP,
  parameter int unsigned GW = GENE_W,
  parameter int unsigned FW = FIT_W
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  ce,
  input  logic [N-1:0][GW-1:0]  ga_in,
  input  logic [N-1:0][FW-1:0]  fit_in,
  input  logic [N-1:0][FW-1:0]  rnd,
  input  logic [FW-1:0]         fit_sum,
  output logic [N-1:0][GW-1:0]  sg_out,
  output logic [N-1:0]          sel_out
);
  // Horizontal nets: column index 0..N, vertical nets: row index 0..N.
  logic [N-1:0][N:0][GW-1:0] ga_h;
  logic [N-1:0][N:0][FW-1:0] fit_h;
  logic [N:0][N-1:0][FW-1:0] ball_v;
  logic [N:0][N-1:0]         sel_v;
  logic [N:0][N-1:0][GW-1:0] sg_v;
  logic [N-1:0][FW-1:0]      prod_lo;

  for (genvar k = 0; k < N; k++) begin : g_row_in
    assign ga_h[k][0]  = ga_in[k];
    assign fit_h[k][0] = fit_in[k];
  end

  for (genvar j = 0; j < N; j++) begin : g_col_in
    assign {ball_v[0][j], prod_lo[j]} = rnd[j] * fit_sum;
    assign sel_v[0][j]  = 1'b0;
    assign sg_v[0][j]   = '0;
  end

  for (genvar k = 0; k < N; k++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      sel_cell #(.GW(GW), .FW(FW)) u_cell (
        .clk    (clk),
        .clr    (clr),
        .ce     (ce),
        .ga_i   (ga_h[k][j]),
        .fit_i  (fit_h[k][j]),
        .ball_i (ball_v[k][j]),
        .sel_i  (sel_v[k][j]),
        .sg_i   (sg_v[k][j]),
        .ga_o   (ga_h[k][j+1]),
        .fit_o  (fit_h[k][j+1]),
        .ball_o (ball_v[k+1][j]),
        .sel_o  (sel_v[k+1][j]),
        .sg_o   (sg_v[k+1][j])
      );
    end
  end

  // Deskew: column j leaves the array at N+j and is delayed by N-1-j more.
  for (genvar j = 0; j < N; j++) begin : g_deskew
    localparam int unsigned D = N - 1 - j;
    if (D == 0) begin : g_none
      assign sg_out[j]  = sg_v[N][j];
      assign sel_out[j] = sel_v[N][j];
    end else begin : g_dly
      logic [D-1:0][GW-1:0] sg_d;
      logic [D-1:0]         sel_d;
      always_ff @(posedge clk or posedge clr) begin
        if (clr) begin
          sg_d  <= '0;
          sel_d <= '0;
        end else if (ce) begin
          sg_d[0]  <= sg_v[N][j];
          sel_d[0] <= sel_v[N][j];
          for (int i = 1; i < D; i++) begin
            sg_d[i]  <= sg_d[i-1];
            sel_d[i] <= sel_d[i-1];
          end
        end
      end
      assign sg_out[j]  = sg_d[D-1];
      assign sel_out[j] = sel_d[D-1];
    end
  end

  // The last column's row outputs, the bottom row's balls and the low half
  // of the scaling products are not used further.
  logic unused_row_out;
  always_comb begin
    unused_row_out = 1'b0;
    for (int k = 0; k < N; k++) unused_row_out ^= ^{ga_h[k][N], fit_h[k][N]};
    for (int j = 0; j < N; j++) unused_row_out ^= ^{ball_v[N][j], prod_lo[j]};
  end
endmodule
