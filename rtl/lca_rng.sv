// lca_rng: random number generator module (RNGM).
//
// A 16-cell one-dimensional linear cellular automaton with null boundaries.
// Cell i follows rule 150 (s_i+ = s_i-1 ^ s_i ^ s_i+1) when RULE150[i] is set
// and rule 90 (s_i+ = s_i-1 ^ s_i+1) otherwise. The whole 16-bit state is the
// random number and changes on every clock edge, independently of the GA
// operators, which sample it whenever they need it.
//
// The hybrid 90/150 structure, 16 cells and one word per clock follow the
// published design. The per-cell rule vector is this design's choice: cells 0,
// 2 and 4 use rule 150, the rest rule 90, a vector whose cycle has the maximum
// length of 2^16-1 states. A zero seed would lock the automaton at zero, so the
// reset value is forced non-zero.
//
// Timing: rnd shows the state; it advances every cycle after reset.
module lca_rng #(
  parameter logic [15:0] RULE150 = 16'h0015,
  parameter logic [15:0] SEED    = 16'h1D2B
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd
);

  localparam logic [15:0] SEED_NZ = (SEED == 16'h0000) ? 16'h0001 : SEED;

  logic [15:0] nxt;

  always_comb begin
    // left neighbour of cell i is cell i-1, right neighbour cell i+1, 0 at the ends
    nxt = (rnd << 1) ^ (rnd >> 1) ^ (rnd & RULE150);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rnd <= SEED_NZ;
    else        rnd <= nxt;
  end

endmodule
