// ga_ip_top: genetic-algorithm path-planning IP core, host view.
//
// A host processor writes the 16 x 16 obstacle map and the start and target
// nodes into the register file, writes 1 to Control, polls Status and reads
// the best path from Path_Coordinates (register map in ga_regs). Inside, the
// cellular-automaton random number generator runs freely on every clock and
// feeds the GA engine (ga_core), which runs POP chromosomes for GENERATIONS
// generations and returns the best four-node path found.
//
// The split into register file, random number generator and GA engine, and the
// default sizes, follow the published design; the bus timing is this design's
// choice (see ga_regs). A run of 100 generations takes roughly 60-100 thousand
// clocks, depending on path lengths.
//
// Besides the register bus, the top brings out a run monitor: busy, the
// generation counter, the best fitness so far and the counts of evaluations
// that hit an obstacle and of genes changed by mutation.
module ga_ip_top
  import ga_pkg::*;
#(
  parameter int unsigned POP         = 16,
  parameter int unsigned GENERATIONS = 100,
  parameter logic [7:0]  MUT_RATE    = 8'd64,
  parameter int unsigned PENALTY     = 100,
  parameter logic [15:0] SEED        = 16'h1D2B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // run monitor
  output logic        busy,
  output logic [7:0]  generation,
  output logic [15:0] best_fit,
  output logic [15:0] n_infeasible,
  output logic [15:0] n_mutated
);

  logic [15:0]   rnd;
  logic          ga_start, ga_done;
  start_target_t start_target;
  grid_t         grid;
  chrom_t        best_path;

  lca_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .rnd);

  ga_regs u_regs (
    .clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .ga_start, .start_target, .grid, .ga_busy(busy), .ga_done, .best_path
  );

  ga_core #(.POP(POP), .GENERATIONS(GENERATIONS), .MUT_RATE(MUT_RATE), .PENALTY(PENALTY)) u_core (
    .clk, .rst_n, .start(ga_start), .start_target, .grid, .rnd,
    .busy, .done(ga_done), .best_path, .best_fit, .generation,
    .n_infeasible, .n_mutated
  );

endmodule
