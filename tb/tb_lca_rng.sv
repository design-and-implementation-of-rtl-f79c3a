// tb_lca_rng: checks the cellular-automaton random number generator against a
// cell-by-cell model for 2000 steps, then checks that the sequence returns to
// the seed after exactly 2^16-1 clocks and not earlier.
module tb_lca_rng;
  import ga_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] rnd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lca_rng #(.RULE150(16'h0015), .SEED(16'h1D2B)) dut (.clk, .rst_n, .rnd);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int first_return;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (rnd !== 16'h1D2B) begin failures++; $display("seed mismatch %h", rnd); end
    m = 16'h1D2B;
    first_return = 0;
    for (int t = 1; t <= 65535; t++) begin
      @(negedge clk);
      m = ca_step(m, 16'h0015);
      if (t <= 2000) begin
        checks++;
        if (rnd !== m) begin failures++; if (failures < 5) $display("step %0d: %h expected %h", t, rnd, m); end
      end
      if (rnd == 16'h1D2B && first_return == 0) first_return = t;
      if (rnd == 16'h0000) begin failures++; $display("all-zero state"); end
    end
    checks++;
    if (first_return != 65535) begin failures++; $display("period %0d, expected 65535", first_return); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
