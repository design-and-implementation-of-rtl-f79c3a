// tb_selection_unit: builds the roulette wheel for random populations and
// checks every spin against a model of the wheel (slot = max - f + 1, pointer
// = rnd8 * total / 256, best rank first), the wheel build time (POP cycles to
// ready) and the one-cycle spin latency. It also spins all 256 pointer values
// on a population with one clearly best member and checks that member gets
// the largest share.
module tb_selection_unit;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             prep = 0, ready, sel_req = 0, sel_valid;
  fitness_t [15:0]  fit;
  logic [15:0][3:0] order;
  fitness_t         max_fit;
  logic [7:0]       rnd8;
  logic [3:0]       sel_idx;

  selection_unit #(.POP(16)) dut (.clk, .rst_n, .prep, .fit, .order, .max_fit, .ready,
                                  .sel_req, .rnd8, .sel_valid, .sel_idx);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // set up fit and a sorted order (ties by index)
  task automatic make_pop(input int kind);
    int idx [16];
    for (int i = 0; i < 16; i++) begin
      fit[i] = (kind == 0) ? 16'($urandom_range(10, 2000)) : ((i == 5) ? 16'd20 : 16'd900 + 16'(i));
      idx[i] = i;
    end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 15 - a; b++)
        if (fit[idx[b]] > fit[idx[b+1]]) begin int t = idx[b]; idx[b] = idx[b+1]; idx[b+1] = t; end
    for (int k = 0; k < 16; k++) order[k] = 4'(idx[k]);
    max_fit = fit[idx[15]];
  endtask

  function automatic int model(input int r);
    longint total, ptr, run;
    total = 0;
    for (int k = 0; k < 16; k++) total += longint'(max_fit) - longint'(fit[order[k]]) + 1;
    ptr = (longint'(r) * total) / 256;
    run = 0;
    for (int k = 0; k < 16; k++) begin
      run += longint'(max_fit) - longint'(fit[order[k]]) + 1;
      if (run > ptr) return int'(order[k]);
    end
    return int'(order[15]);
  endfunction

  task automatic build();
    int cyc;
    @(negedge clk) prep = 1;
    @(posedge clk); #1 prep = 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ready && cyc < 40);
    checks++; if (cyc != 16) begin failures++; $display("wheel built in %0d cycles", cyc); end
  endtask

  task automatic spin(input int r, output int got);
    @(negedge clk) begin sel_req = 1; rnd8 = 8'(r); end
    @(posedge clk); #1 sel_req = 0;
    checks++; if (!sel_valid) begin failures++; $display("no sel_valid"); end
    got = int'(sel_idx);
  endtask

  initial begin
    int got, hits [16];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      make_pop(0);
      build();
      for (int s = 0; s < 40; s++) begin
        int r;
        r = $urandom_range(0, 255);
        spin(r, got);
        checks++; if (got != model(r)) begin failures++; $display("spin %0d -> %0d expected %0d", r, got, model(r)); end
      end
    end
    make_pop(1);
    build();
    foreach (hits[i]) hits[i] = 0;
    for (int r = 0; r < 256; r++) begin spin(r, got); hits[got]++; end
    for (int i = 0; i < 16; i++) if (i != 5) begin
      checks++; if (hits[i] >= hits[5]) begin failures++; $display("best got %0d spins, %0d got %0d", hits[5], i, hits[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
