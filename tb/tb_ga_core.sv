// tb_ga_core: runs the GA engine at reduced size (8 chromosomes, 30
// generations) with random words from the testbench, on random obstacle maps.
// After every run it checks: done arrives once with the generation counter at
// GENERATIONS; every stored fitness equals the reference cost of its
// chromosome; the reported best equals the minimum of the final population and
// the reference cost of the reported path; the best fitness never rose from
// one generation to the next (elitism).
module tb_ga_core;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  localparam int POP = 8, GENS = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start = 0, busy, done;
  start_target_t st;
  grid_t         grid;
  logic [15:0]   rnd;
  chrom_t        best_path;
  fitness_t      best_fit;
  logic [7:0]    generation;
  logic [15:0]   n_infeasible, n_mutated;

  ga_core #(.POP(POP), .GENERATIONS(GENS), .MUT_RATE(8'd64), .PENALTY(100)) dut (
    .clk, .rst_n, .start, .start_target(st), .grid, .rnd, .busy, .done,
    .best_path, .best_fit, .generation, .n_infeasible, .n_mutated);

  always @(posedge clk) rnd <= 16'($urandom);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // best fitness per generation, sampled when the generation counter moves
  int prev_best, rises;
  logic [7:0] last_gen;
  always @(posedge clk) begin
    if (rst_n && busy && generation != last_gen && generation > 1) begin
      if (int'(best_fit) > prev_best) rises++;
      prev_best = int'(best_fit);
    end
    last_gen <= generation;
  end

  initial begin
    logic [15:0] g [16];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int dones, o, c, e;
      for (int y = 0; y < 16; y++) begin
        g[y] = (run == 0) ? 16'h0 : 16'($urandom) & 16'($urandom) & 16'($urandom);
        grid[y] = g[y];
      end
      st = start_target_t'(16'($urandom));
      prev_best = 32'h7fffffff; rises = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      dones = 0;
      while (busy) begin @(negedge clk); if (done) dones++; end
      @(negedge clk); if (done) dones++;
      checks += 3;
      if (dones != 1) begin failures++; $display("run %0d: %0d done pulses", run, dones); end
      if (int'(generation) != GENS) begin failures++; $display("generation %0d", generation); end
      if (rises != 0) begin failures++; $display("best fitness rose %0d times", rises); end
      e = 32'h7fffffff;
      for (int i = 0; i < POP; i++) begin
        int r;
        r = ref_fitness(32'(dut.pop[i]), 16'(st), g, 100, o, c);
        checks++;
        if (r != int'(dut.fit[i])) begin failures++; $display("fit[%0d] %0d expected %0d", i, dut.fit[i], r); end
        if (r < e) e = r;
      end
      checks += 2;
      if (int'(best_fit) != e) begin failures++; $display("best %0d, population minimum %0d", best_fit, e); end
      if (ref_fitness(32'(best_path), 16'(st), g, 100, o, c) != int'(best_fit)) begin
        failures++; $display("best path %h does not cost %0d", best_path, best_fit);
      end
      $display("run %0d: best %0d path %h, infeasible evaluations %0d, genes mutated %0d",
               run, best_fit, best_path, n_infeasible, n_mutated);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
