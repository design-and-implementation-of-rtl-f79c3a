// ga_core: genetic-algorithm engine and its controlling state machine.
//
// Holds the population (POP chromosomes), the next population being built and
// the fitness of every chromosome, and steps the GA operators one after the
// other:
//   INIT   random initial population (init_population)
//   FIT    fitness of each chromosome in turn (fitness_unit)
//   SEQ    sort by fitness, note best and worst (pop_sequencer); after
//          GENERATIONS rounds of breeding the best path is reported here
//   ELITE  the best chromosome is copied to slot 0 of the next population
//   SEL    roulette-wheel draws fill a mating pool of POP parents
//   MATE   pool entries 2k and 2k+1 are fetched as parent1/parent2
//   XO     single-point crossover; the two children go to slots 2k+1, 2k+2
//          (the last child falls off the end)
//   MUT    one offspring, chosen by rnd[15:12], is mutated gene by gene
// then the next population replaces the current one and FIT runs again.
// The random number generator is outside; every operator samples the current
// rnd word when it needs randomness.
//
// The operator sequence, elitism with roulette-wheel selection, population of
// 16 and 100 generations follow the published design. The controller itself,
// the pairing of the pool, the placement of the elite and of the children, and
// the choice of a single mutated offspring among slots 1..POP-1 (slot 0 would
// overwrite the elite) are this design's choices.
//
// Interface: pulse start with start_target and grid stable for the whole run.
// busy is high during a run; done pulses at the end with best_path/best_fit
// valid (they also follow the best of each generation during the run).
// n_infeasible and n_mutated count, per run, evaluations that met an obstacle
// and genes changed by mutation. ffu_busy, mm_busy and max_idx are not needed
// by this controller, which waits for the done pulses.
// Timing per generation: POP fitness evaluations of 7 + path cells each
// (the unit's 5 + cells plus 2 for hand-over), 3 for sorting, 1 for the
// elite, POP+2 to build the wheel and POP+2 for the draws, 3 per pair for
// mating and crossover, 10 for mutation, 1 to swap in the new population:
// about 600 cycles at POP = 16.
module ga_core
  import ga_pkg::*;
#(
  parameter int unsigned POP         = 16,
  parameter int unsigned GENERATIONS = 100,
  parameter logic [7:0]  MUT_RATE    = 8'd64,
  parameter int unsigned PENALTY     = 100
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  start_target_t start_target,
  input  grid_t         grid,
  input  logic [15:0]   rnd,
  output logic          busy,
  output logic          done,
  output chrom_t        best_path,
  output fitness_t      best_fit,
  output logic [7:0]    generation,
  output logic [15:0]   n_infeasible,   // evaluations that hit an obstacle
  output logic [15:0]   n_mutated       // genes changed by mutation
);

  localparam int unsigned IW    = $clog2(POP);
  localparam int unsigned NPAIR = POP / 2;

  // POP must be a power of two between 4 and 16 (the mutation index is taken
  // from a 4-bit random field), GENERATIONS must fit the 8-bit counter
  if (POP < 4 || POP > 16 || (1 << IW) != POP || GENERATIONS > 255) begin : g_bad_param
    $error("ga_core: unsupported POP or GENERATIONS");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_FIT_GO, S_FIT_WAIT, S_SEQ, S_SEQ_WAIT, S_ELITE,
    S_SEL_PREP, S_SEL, S_MATE, S_XO, S_XO_WAIT, S_MUT, S_MUT_WAIT, S_NEXT, S_DONE
  } state_t;
  state_t state;

  chrom_t   [POP-1:0] pop, nxt;
  fitness_t [POP-1:0] fit;
  logic     [POP-1:0][IW-1:0] pool;

  logic [IW-1:0] fi;          // chromosome under evaluation
  logic [IW:0]   draws, got;  // selection requests issued / results stored
  logic [IW-1:0] pair;        // mating pair
  logic [IW-1:0] mut_idx;
  chrom_t        parent1, parent2;

  // ---- operators ----------------------------------------------------------
  logic          init_start, init_wr, init_done;
  logic [IW-1:0] init_idx;
  chrom_t        init_chrom;
  init_population #(.POP(POP)) u_init (
    .clk, .rst_n, .start(init_start), .rnd,
    .wr_en(init_wr), .wr_idx(init_idx), .wr_chrom(init_chrom), .done(init_done)
  );

  logic       ffu_start, ffu_busy, ffu_done;
  fitness_t   ffu_fit;
  logic [7:0] ffu_obst;
  fitness_unit #(.PENALTY(PENALTY)) u_ffu (
    .clk, .rst_n, .start(ffu_start), .chrom(pop[fi]), .start_target, .grid,
    .busy(ffu_busy), .done(ffu_done), .fitness(ffu_fit), .obstacles(ffu_obst)
  );

  logic                   psm_start, psm_done;
  logic [POP-1:0][IW-1:0] order;
  logic [IW-1:0]          min_idx, max_idx;
  fitness_t               min_fit, max_fit;
  pop_sequencer #(.POP(POP)) u_psm (
    .clk, .rst_n, .start(psm_start), .fit, .done(psm_done), .order,
    .min_idx, .max_idx, .min_fit, .max_fit
  );

  logic          sm_prep, sm_ready, sm_req, sm_valid;
  logic [IW-1:0] sm_idx;
  selection_unit #(.POP(POP)) u_sm (
    .clk, .rst_n, .prep(sm_prep), .fit, .order, .max_fit, .ready(sm_ready),
    .sel_req(sm_req), .rnd8(rnd[7:0]), .sel_valid(sm_valid), .sel_idx(sm_idx)
  );

  logic   xo_in, xo_out;
  chrom_t child1, child2;
  crossover_unit u_cm (
    .clk, .rst_n, .in_valid(xo_in), .parent1, .parent2, .point(rnd[10:8]),
    .out_valid(xo_out), .child1, .child2
  );

  logic       mm_start, mm_busy, mm_done;
  chrom_t     mm_out;
  logic [3:0] mm_count;
  mutation_unit #(.MUT_RATE(MUT_RATE)) u_mm (
    .clk, .rst_n, .start(mm_start), .chrom_in(nxt[mut_idx]), .rnd(rnd[11:0]),
    .busy(mm_busy), .done(mm_done), .chrom_out(mm_out), .mutations(mm_count)
  );

  // ---- control ------------------------------------------------------------
  always_comb begin
    init_start = (state == S_IDLE) && start;
    ffu_start  = (state == S_FIT_GO);
    psm_start  = (state == S_SEQ);
    sm_prep    = (state == S_SEL_PREP);
    sm_req     = (state == S_SEL) && sm_ready && (draws < (IW+1)'(POP));
    xo_in      = (state == S_XO);
    mm_start   = (state == S_MUT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pop        <= '0;
      nxt        <= '0;
      fit        <= '0;
      pool       <= '0;
      fi         <= '0;
      draws      <= '0;
      got        <= '0;
      pair       <= '0;
      mut_idx    <= '0;
      parent1    <= '0;
      parent2    <= '0;
      best_path  <= '0;
      best_fit   <= '0;
      generation <= '0;
      done       <= 1'b0;
      n_infeasible <= '0;
      n_mutated    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          generation   <= '0;
          n_infeasible <= '0;
          n_mutated    <= '0;
          state      <= S_INIT;
        end
        S_INIT: begin
          if (init_wr) pop[init_idx] <= init_chrom;
          if (init_done) begin
            fi    <= '0;
            state <= S_FIT_GO;
          end
        end
        S_FIT_GO: state <= S_FIT_WAIT;
        S_FIT_WAIT: if (ffu_done) begin
          fit[fi] <= ffu_fit;
          if (ffu_obst != '0) n_infeasible <= n_infeasible + 1'b1;
          if (fi == IW'(POP - 1)) state <= S_SEQ;
          else begin
            fi    <= fi + 1'b1;
            state <= S_FIT_GO;
          end
        end
        S_SEQ: state <= S_SEQ_WAIT;
        S_SEQ_WAIT: if (psm_done) begin
          best_path <= pop[min_idx];
          best_fit  <= min_fit;
          if (generation == 8'(GENERATIONS)) state <= S_DONE;
          else                               state <= S_ELITE;
        end
        S_ELITE: begin
          nxt[0] <= pop[min_idx];
          state  <= S_SEL_PREP;
        end
        S_SEL_PREP: begin
          draws <= '0;
          got   <= '0;
          state <= S_SEL;
        end
        S_SEL: begin
          if (sm_req) draws <= draws + 1'b1;
          if (sm_valid) begin
            pool[got[IW-1:0]] <= sm_idx;
            got <= got + 1'b1;
            if (got == (IW+1)'(POP - 1)) begin
              pair  <= '0;
              state <= S_MATE;
            end
          end
        end
        S_MATE: begin
          parent1 <= pop[pool[2*pair]];
          parent2 <= pop[pool[2*pair+1]];
          state   <= S_XO;
        end
        S_XO: state <= S_XO_WAIT;
        S_XO_WAIT: if (xo_out) begin
          nxt[2*pair+1] <= child1;
          if (pair != IW'(NPAIR - 1)) begin
            nxt[2*pair+2] <= child2;
            pair  <= pair + 1'b1;
            state <= S_MATE;
          end else begin
            // offspring slots 1..POP-1: pick one for mutation
            mut_idx <= (IW'(rnd[15:12]) == '0) ? IW'(POP - 1) : IW'(rnd[15:12]);
            state   <= S_MUT;
          end
        end
        S_MUT: state <= S_MUT_WAIT;
        S_MUT_WAIT: if (mm_done) begin
          nxt[mut_idx] <= mm_out;
          n_mutated    <= n_mutated + 16'(mm_count);
          state        <= S_NEXT;
        end
        S_NEXT: begin
          pop        <= nxt;
          generation <= generation + 1'b1;
          fi         <= '0;
          state      <= S_FIT_GO;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // the elite never gets worse from one generation to the next
  fitness_t prev_best;
  always_ff @(posedge clk) begin
    if (!rst_n)                                   prev_best <= '1;
    else if (init_start)                          prev_best <= '1;
    else if (state == S_SEQ_WAIT && psm_done)     prev_best <= min_fit;
  end
  a_elitism: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEQ_WAIT && psm_done) |-> min_fit <= prev_best);

endmodule
