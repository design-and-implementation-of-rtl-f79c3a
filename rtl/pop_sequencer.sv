// pop_sequencer: population sequencer module (PSM).
//
// Sorts the population by fitness, best (lowest) first. It is a parallel rank
// sort: in the first cycle every chromosome counts how many others beat it
// (lower fitness, or equal fitness and lower index), which is its rank; in the
// second cycle each index is written to the position of its rank. The best and
// worst chromosome and their fitness values come out with the order.
//
// Sorting by fitness, and reporting the best and worst index, follow the
// published design; the rank-sort structure is this design's choice.
//
// Interface: pulse start with fit valid in that cycle. Timing: done rises
// one clock edge after the edge that samples start (two cycles in all);
// order and the min/max outputs then hold until the next
// start.
module pop_sequencer
  import ga_pkg::*;
#(
  parameter int unsigned POP = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  fitness_t [POP-1:0]             fit,
  output logic                           done,
  output logic [POP-1:0][$clog2(POP)-1:0] order,
  output logic [$clog2(POP)-1:0]         min_idx,
  output logic [$clog2(POP)-1:0]         max_idx,
  output fitness_t                       min_fit,
  output fitness_t                       max_fit
);

  localparam int unsigned IW = $clog2(POP);

  logic [POP-1:0][IW-1:0] rank_c, rank_q;
  fitness_t [POP-1:0]     fit_q;
  logic                   phase2;

  always_comb begin
    for (int i = 0; i < POP; i++) begin
      rank_c[i] = '0;
      for (int j = 0; j < POP; j++) begin
        if (j != i && (fit[j] < fit[i] || (fit[j] == fit[i] && j < i)))
          rank_c[i] = rank_c[i] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase2  <= 1'b0;
      done    <= 1'b0;
      rank_q  <= '0;
      fit_q   <= '0;
      order   <= '0;
      min_idx <= '0;
      max_idx <= '0;
      min_fit <= '0;
      max_fit <= '0;
    end else begin
      done   <= 1'b0;
      phase2 <= 1'b0;
      if (start) begin
        rank_q <= rank_c;
        fit_q  <= fit;
        phase2 <= 1'b1;
      end
      if (phase2) begin
        for (int i = 0; i < POP; i++) begin
          order[rank_q[i]] <= IW'(i);
          if (rank_q[i] == '0)           begin min_idx <= IW'(i); min_fit <= fit_q[i]; end
          if (rank_q[i] == IW'(POP - 1)) begin max_idx <= IW'(i); max_fit <= fit_q[i]; end
        end
        done <= 1'b1;
      end
    end
  end

endmodule
