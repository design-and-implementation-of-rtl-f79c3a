// tb_pop_sequencer: sorts 500 random fitness sets (many with ties) and checks
// that order lists every index once, by non-decreasing fitness with ties by
// index, that min/max index and fitness match, and that done rises one edge
// after the edge that samples start.
module tb_pop_sequencer;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               start = 0, done;
  fitness_t [15:0]    fit;
  logic [15:0][3:0]   order;
  logic [3:0]         min_idx, max_idx;
  fitness_t           min_fit, max_fit;

  pop_sequencer #(.POP(16)) dut (.clk, .rst_n, .start, .fit, .done, .order, .min_idx, .max_idx, .min_fit, .max_fit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int cyc;
      bit seen [16];
      int best, worst;
      for (int i = 0; i < 16; i++) fit[i] = (n % 2) ? 16'($urandom_range(0, 7)) : 16'($urandom);
      @(negedge clk) start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 10);
      checks++; if (cyc != 1) begin failures++; $display("latency %0d", cyc); end
      foreach (seen[i]) seen[i] = 0;
      for (int k = 0; k < 16; k++) seen[order[k]] = 1;
      checks++; foreach (seen[i]) if (!seen[i]) begin failures++; $display("index %0d missing", i); break; end
      for (int k = 1; k < 16; k++) begin
        checks++;
        if (fit[order[k-1]] > fit[order[k]] ||
            (fit[order[k-1]] == fit[order[k]] && order[k-1] > order[k])) begin
          failures++; $display("order wrong at rank %0d", k);
        end
      end
      best = 0; worst = 0;
      for (int i = 1; i < 16; i++) begin
        if (fit[i] < fit[best]) best = i;
        if (fit[i] >= fit[worst]) worst = i;
      end
      checks += 4;
      if (int'(min_idx) != best)  begin failures++; $display("min_idx %0d expected %0d", min_idx, best); end
      if (int'(max_idx) != worst) begin failures++; $display("max_idx %0d expected %0d", max_idx, worst); end
      if (min_fit != fit[best])   failures++;
      if (max_fit != fit[worst])  failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
