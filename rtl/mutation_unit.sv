// mutation_unit: mutation module (MM).
//
// Mutates one offspring. It walks the eight genes, one per clock. For each gene
// it compares the 8-bit random number rnd[7:0] with MUT_RATE; if the random
// number is smaller the gene is replaced by the new random coordinate
// rnd[11:8]. MUT_RATE/256 is thus the per-gene mutation probability.
//
// The per-gene compare against a predefined rate and the new random 4-bit
// coordinate follow the published design; the rate value and the random bits
// used are this design's choices.
//
// Interface: pulse start with chrom_in valid in that cycle. Timing: done pulses
// GENES cycles later (8) with chrom_out and mutations (genes changed) valid
// until the next start. rnd takes the low 12 bits of the random number.
module mutation_unit
  import ga_pkg::*;
#(
  parameter logic [7:0] MUT_RATE = 8'd64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  chrom_t      chrom_in,
  input  logic [11:0] rnd,
  output logic        busy,
  output logic        done,
  output chrom_t      chrom_out,
  output logic [3:0]  mutations
);

  logic [$clog2(GENES)-1:0] g;
  logic                     run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run       <= 1'b0;
      done      <= 1'b0;
      g         <= '0;
      chrom_out <= '0;
      mutations <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run       <= 1'b1;
        g         <= '0;
        chrom_out <= chrom_in;
        mutations <= '0;
      end else if (run) begin
        if (rnd[7:0] < MUT_RATE) begin
          chrom_out[g] <= rnd[11:8];
          mutations    <= mutations + 1'b1;
        end
        g <= g + 1'b1;
        if (g == $clog2(GENES)'(GENES - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = run;

endmodule
