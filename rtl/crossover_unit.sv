// crossover_unit: crossover module (CM), single-point crossover.
//
// Two parents are cut before gene `point` (0..7, gene 0 being x of the first
// intermediate node) and their tails are exchanged: child1 = parent1 head +
// parent2 tail, child2 = parent2 head + parent1 tail. Point 0 exchanges the
// whole chromosome, which leaves the pair unchanged as a set.
//
// Single-point crossover at a 3-bit random point follows the published design;
// where exactly the cut falls for each point value is this design's choice.
//
// Timing: registered, one cycle from in_valid to out_valid, one pair per clock.
module crossover_unit
  import ga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  chrom_t     parent1,
  input  chrom_t     parent2,
  input  logic [2:0] point,
  output logic       out_valid,
  output chrom_t     child1,
  output chrom_t     child2
);

  chrom_t c1, c2;
  always_comb begin
    for (int g = 0; g < GENES; g++) begin
      if (g < int'(point)) begin
        c1[g] = parent1[g];
        c2[g] = parent2[g];
      end else begin
        c1[g] = parent2[g];
        c2[g] = parent1[g];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      child1    <= '0;
      child2    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        child1 <= c1;
        child2 <= c2;
      end
    end
  end

endmodule
