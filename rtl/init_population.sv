// init_population: initial population generator.
//
// Fills the population with random chromosomes taken from the random number
// generator. Each chromosome is built from two consecutive 16-bit random
// words: the first gives genes 0..3 (x1 y1 x2 y2), the second genes 4..7
// (x3 y3 x4 y4), four 4-bit coordinates per word.
//
// A random initial population drawn from the random number generator follows
// the published design; the two-words-per-chromosome packing is this design's
// choice.
//
// Interface: pulse start; wr_en/wr_idx/wr_chrom write chromosome i on cycle
// 2i+2 after start. Timing: 2*POP cycles; done pulses with the last write.
module init_population
  import ga_pkg::*;
#(
  parameter int unsigned POP = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [15:0]            rnd,
  output logic                   wr_en,
  output logic [$clog2(POP)-1:0] wr_idx,
  output chrom_t                 wr_chrom,
  output logic                   done
);

  localparam int unsigned IW = $clog2(POP);

  logic          run, half;
  logic [IW-1:0] idx;
  logic [15:0]   first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run      <= 1'b0;
      half     <= 1'b0;
      idx      <= '0;
      first    <= '0;
      wr_en    <= 1'b0;
      wr_idx   <= '0;
      wr_chrom <= '0;
      done     <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      done  <= 1'b0;
      if (start) begin
        run  <= 1'b1;
        half <= 1'b0;
        idx  <= '0;
      end else if (run) begin
        half <= ~half;
        if (!half) begin
          first <= rnd;
        end else begin
          wr_en    <= 1'b1;
          wr_idx   <= idx;
          wr_chrom <= {first, rnd};
          idx      <= idx + 1'b1;
          if (idx == IW'(POP - 1)) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
