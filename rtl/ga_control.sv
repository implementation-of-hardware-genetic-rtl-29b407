// ga_control: chromosome delivery control of the genetic engine.
//
// Sequencing of one generation:
//   INIT  one clock after reset: seed_load tells every random number
//         generator to take its seed (applied once only).
//   IDLE  waits for the population; pop_ready is high. The first pop_valid
//         beat starts LOAD.
//   LOAD  POP*GENES beats, one gene each, chromosome after chromosome; beat b
//         is written to memory block b / GENES (wr_en one-hot). The fitness
//         of each chromosome (sampled on its first gene) is added to fit_sum,
//         saturating at all ones. On the last beat sel_step advances the
//         selection generators once, so each column's ball is new for this
//         generation and then stays unchanged for the whole selection period.
//   RUN   a cycle counter drives everything: block k is read (rd_en[k]) in
//         cycles k .. k+GENES-1, which gives the stagger the systolic
//         selection array needs; after the array latency SEL_LAT the gene
//         streams reach crossover (xo_ce), one clock later mutation (mut_ce),
//         and one clock after that the offspring are on the outputs
//         (out_valid, out_first on gene 0). done pulses on the last
//         offspring gene and the controller returns to IDLE.
// The document gives this unit the job of delivering chromosomes, clocking
// the random number generators once per selection period and storing the
// initial values; the states, the clock enables used in place of a
// separate master clock and all timings are this design's choices.
module ga_control
  import ga_pkg::*;
#(
  parameter int unsigned N      = POP,
  parameter int unsigned NG     = GENES,
  parameter int unsigned FW     = FIT_W,
  parameter int unsigned SEL_LAT = 2*N - 1
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          pop_valid,
  input  logic [FW-1:0] pop_fit,
  output logic          pop_ready,
  output logic [N-1:0]  wr_en,
  output logic [N-1:0]  rd_en,
  output logic [FW-1:0] fit_sum,
  output logic          seed_load,
  output logic          sel_step,
  output logic          xo_ce,
  output logic          mut_ce,
  output logic          out_valid,
  output logic          out_first,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {S_INIT, S_IDLE, S_LOAD, S_RUN} state_t;

  localparam int unsigned XO0  = 1 + SEL_LAT;       // first gene at crossover
  localparam int unsigned OUT0 = XO0 + 2;           // first gene on the outputs
  localparam int unsigned LAST = OUT0 + NG - 1;     // last cycle of RUN
  localparam int unsigned CW   = $clog2(LAST + 1) + 1;
  localparam int unsigned GIW  = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned CIW  = (N > 1) ? $clog2(N) : 1;

  state_t         state;
  logic [CW-1:0]  cnt;
  logic [GIW-1:0] gidx;    // gene index within the chromosome being loaded
  logic [CIW-1:0] cidx;    // chromosome (memory block) being loaded
  logic           last_beat;
  logic           loading;
  logic [FW:0]    sum_ext;

  assign loading   = pop_valid && (state == S_IDLE || state == S_LOAD);
  assign last_beat = loading && (gidx == GIW'(NG - 1)) && (cidx == CIW'(N - 1));
  assign sum_ext   = {1'b0, fit_sum} + {1'b0, pop_fit};

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      state   <= S_INIT;
      cnt     <= '0;
      gidx    <= '0;
      cidx    <= '0;
      fit_sum <= '0;
    end else begin
      case (state)
        S_INIT: state <= S_IDLE;
        S_IDLE, S_LOAD: begin
          if (loading) begin
            if (gidx == '0) begin
              if (state == S_IDLE) fit_sum <= pop_fit;
              else                 fit_sum <= sum_ext[FW] ? '1 : sum_ext[FW-1:0];
            end
            if (gidx == GIW'(NG - 1)) begin
              gidx <= '0;
              cidx <= (cidx == CIW'(N - 1)) ? '0 : cidx + 1'b1;
            end else begin
              gidx <= gidx + 1'b1;
            end
            state <= last_beat ? S_RUN : S_LOAD;
            cnt   <= '0;
          end
        end
        S_RUN: begin
          if (cnt == CW'(LAST)) begin
            state <= S_IDLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      wr_en[k] = loading && (cidx == CIW'(k));
      rd_en[k] = (state == S_RUN) && (cnt >= CW'(k)) && (cnt < CW'(k + NG));
    end
  end

  assign pop_ready = (state == S_IDLE) || (state == S_LOAD);
  assign seed_load = (state == S_INIT);
  assign sel_step  = last_beat;
  assign xo_ce     = (state == S_RUN) && (cnt >= CW'(XO0))     && (cnt < CW'(XO0 + NG));
  assign mut_ce    = (state == S_RUN) && (cnt >= CW'(XO0 + 1)) && (cnt < CW'(XO0 + 1 + NG));
  assign out_valid = (state == S_RUN) && (cnt >= CW'(OUT0))    && (cnt <= CW'(LAST));
  assign out_first = (state == S_RUN) && (cnt == CW'(OUT0));
  assign busy      = (state == S_RUN);
  assign done      = (state == S_RUN) && (cnt == CW'(LAST));
endmodule
