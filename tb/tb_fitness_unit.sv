// tb_fitness_unit: scores 400 random chromosomes on random maps (plus hand
// cases: a straight obstacle-free path, a path through a wall, a path whose
// nodes all coincide) and compares fitness, obstacle count and the cycle
// count (5 + cells traced) with the reference model.
module tb_fitness_unit;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start = 0;
  chrom_t        chrom;
  start_target_t st;
  grid_t         grid;
  logic          busy, done;
  fitness_t      fitness;
  logic [7:0]    obstacles;

  fitness_unit #(.PENALTY(100)) dut (.clk, .rst_n, .start, .chrom, .start_target(st), .grid,
                                     .busy, .done, .fitness, .obstacles);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [31:0] c, input logic [15:0] s, input logic [15:0] g [16]);
    int ef, eo, ec, cyc;
    for (int y = 0; y < 16; y++) grid[y] = g[y];
    chrom = c; st = s;
    ef = ref_fitness(c, s, g, 100, eo, ec);
    @(negedge clk); start = 1;
    @(posedge clk); #1 start = 0;   // start sampled at this edge
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    checks += 3;
    if (int'(fitness) != ef) begin failures++; $display("fitness %0d expected %0d (c=%h s=%h)", fitness, ef, c, s); end
    if (int'(obstacles) != eo) begin failures++; $display("obstacles %0d expected %0d", obstacles, eo); end
    if (cyc != 5 + ec) begin failures++; $display("cycles %0d expected %0d", cyc, 5 + ec); end
  endtask

  initial begin
    logic [15:0] g [16];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // empty map, straight path along row 0: length 15, no penalty
    foreach (g[i]) g[i] = '0;
    run_one(32'h3060_90C0, 16'h00F0, g);
    checks++; if (fitness != 16'd15) begin failures++; $display("straight path %0d", fitness); end
    // wall at column 8 rows 0..15: the path must cross it
    foreach (g[i]) g[i] = 16'h0100;
    run_one(32'h3060_90C0, 16'h00F0, g);
    checks++; if (fitness != 16'd115) begin failures++; $display("wall path %0d", fitness); end
    // all nodes equal
    run_one(32'h5555_5555, 16'h5555, g);
    for (int n = 0; n < 400; n++) begin
      foreach (g[i]) g[i] = 16'($urandom) & 16'($urandom);
      run_one($urandom, 16'($urandom), g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
