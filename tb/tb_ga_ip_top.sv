// tb_ga_ip_top: end-to-end run of the path-planning core at its default size
// (population 16, 100 generations), driven through the host register bus the
// way the host processor would: write the 16 map rows and Start_Target,
// write 1 to Control, poll Status, read Path_Coordinates.
//
// Two maps are planned from (0,0) to (15,15): scattered obstacle blocks, and a
// wall across the grid with one gap. For each run it checks that Status goes
// 0 then 1, that the path read back costs exactly the reported best fitness
// (reference model), that the path is collision-free, that its cost is at
// least the Manhattan lower bound of 30, that 100 generations ran, and that
// the best fitness never rose between generations, and that the run took no
// more than 69,500 clock cycles (1.5 times the 0.594 ms at 78 MHz reported
// for the reference implementation). It counts how often each
// mechanism of the design acted and fails if one never did: obstacle penalty,
// crossover with an actual exchange, mutation of a gene, elitism keeping the
// best, the best improving, a restart after a finished run.
module tb_ga_ip_top;
  import ga_pkg::*;
  import ga_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bus_wr = 0, bus_rd = 0, bus_rvalid;
  logic [7:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic        busy;
  logic [7:0]  generation;
  logic [15:0] best_fit, n_infeasible, n_mutated;

  ga_ip_top dut (.clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
                 .busy, .generation, .best_fit, .n_infeasible, .n_mutated);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int ev_xover = 0, ev_elite_kept = 0, ev_improve = 0, ev_rise = 0, ev_restart = 0;
  int prev_best;
  int busy_cycles;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  // cycles spent per controller stage (state encoding order of ga_core)
  int st_init, st_fit, st_seq, st_sel, st_mate, st_mut, st_other;
  always @(posedge clk) if (rst_n && busy) begin
    case (int'(dut.u_core.state))
      1:           st_init++;
      2, 3:        st_fit++;
      4, 5:        st_seq++;
      6, 7, 8:     st_sel++;
      9, 10, 11:   st_mate++;
      12, 13:      st_mut++;
      default:     st_other++;
    endcase
  end
  logic [7:0] last_gen;
  always @(posedge clk) begin
    if (rst_n && dut.u_core.xo_in && dut.u_core.rnd[10:8] != 3'd0 &&
        dut.u_core.parent1 != dut.u_core.parent2) ev_xover++;
    if (rst_n && busy && generation != last_gen && generation > 1) begin
      if (int'(best_fit) > prev_best) begin ev_rise++; $display("rise at generation %0d: %0d after %0d", generation, best_fit, prev_best); end
      else if (int'(best_fit) == prev_best) ev_elite_kept++;
      else ev_improve++;
      prev_best = int'(best_fit);
    end
    last_gen <= generation;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin bus_wr = 1; bus_addr = a; bus_wdata = d; end
    @(negedge clk) bus_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin bus_rd = 1; bus_addr = a; end
    @(negedge clk) begin bus_rd = 0; d = bus_rdata; end
  endtask

  task automatic plan(input logic [15:0] g [16], input logic [15:0] st, input string name);
    logic [31:0] d;
    int cycles, o, c, cost, polls;
    for (int y = 0; y < 16; y++) wr(8'h10 + 8'(4*y), 32'(g[y]));
    wr(8'h08, 32'(st));
    prev_best = 32'h7fffffff;
    busy_cycles = 0;
    st_init = 0; st_fit = 0; st_seq = 0; st_sel = 0; st_mate = 0; st_mut = 0; st_other = 0;
    wr(8'h00, 1);
    cycles = 1;
    rd(8'h04, d);
    checks++; if (d != 0) begin failures++; $display("%s: Status not cleared", name); end
    polls = 0;
    do begin
      repeat (98) @(negedge clk);
      rd(8'h04, d);
      polls++;
    end while (d[0] == 1'b0);
    cycles = busy_cycles;
    rd(8'h0C, d);
    cost = ref_fitness(d, st, g, 100, o, c);
    $display("%s: path %0d,%0d -> %0d,%0d -> %0d,%0d -> %0d,%0d -> %0d,%0d -> %0d,%0d cost %0d, obstacles %0d, %0d cycles",
             name, st[15:12], st[11:8], d[31:28], d[27:24], d[23:20], d[19:16], d[15:12], d[11:8], d[7:4], d[3:0],
             st[7:4], st[3:0], cost, o, cycles);
    $display("%s: cycles per stage: init %0d, fitness %0d (%0d per generation), sequencer %0d, selection %0d, mating+crossover %0d, mutation %0d, other %0d",
             name, st_init, st_fit, st_fit / 101, st_seq, st_sel, st_mate, st_mut, st_other);
    checks += 5;
    if (cost != int'(best_fit)) begin failures++; $display("reported best %0d, path costs %0d", best_fit, cost); end
    if (o != 0) begin failures++; $display("path is not collision-free"); end
    if (cost < 30) begin failures++; $display("cost below the Manhattan bound"); end
    if (generation != 8'd100) begin failures++; $display("generations %0d", generation); end
    if (ev_rise != 0) begin failures++; $display("best fitness rose"); end
    // the reference run time is 0.594 ms at 78 MHz, about 46,300 cycles; this
    // controller evaluates one chromosome at a time and may take up to 1.5x
    checks++;
    if (cycles > 69500) begin failures++; $display("run took %0d cycles", cycles); end
  endtask

  initial begin
    logic [15:0] m1 [16], m2 [16];
    // scattered obstacle blocks
    foreach (m1[i]) m1[i] = '0;
    m1[2]  = 16'b0000_0000_0011_1100;
    m1[3]  = 16'b0000_0000_0011_1100;
    m1[6]  = 16'b0011_1000_0000_0000;
    m1[7]  = 16'b0011_1000_0000_0110;
    m1[8]  = 16'b0000_0000_0000_0110;
    m1[10] = 16'b0000_0111_1000_0000;
    m1[11] = 16'b0000_0111_1000_0000;
    m1[13] = 16'b0110_0000_0000_0000;
    // wall along row 8 with a gap at x = 12
    foreach (m2[i]) m2[i] = '0;
    m2[8] = 16'b1110_1111_1111_1111;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    plan(m1, 16'h00FF, "blocks");
    ev_restart++;
    plan(m2, 16'h00FF, "wall");
    checks += 6;
    if (n_infeasible == 0) begin failures++; $display("obstacle penalty never applied"); end
    if (n_mutated == 0)    begin failures++; $display("no gene mutated"); end
    if (ev_xover == 0)     begin failures++; $display("no crossover exchanged genes"); end
    if (ev_elite_kept == 0) begin failures++; $display("elitism never kept the best"); end
    if (ev_improve == 0)   begin failures++; $display("best never improved"); end
    if (ev_restart == 0)   failures++;
    $display("mechanisms: penalised evaluations %0d (last run), genes mutated %0d (last run), crossovers %0d, best kept %0d, best improved %0d, restarts %0d",
             n_infeasible, n_mutated, ev_xover, ev_elite_kept, ev_improve, ev_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
