// tb_crossover_unit: 1000 random parent pairs and points; checks both children
// gene by gene (head from own parent, tail from the other, cut before gene
// point) and the one-cycle latency.
module tb_crossover_unit;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, out_valid;
  chrom_t     parent1, parent2, child1, child2;
  logic [2:0] point;

  crossover_unit dut (.clk, .rst_n, .in_valid, .parent1, .parent2, .point, .out_valid, .child1, .child2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] p1, p2, e1, e2;
      int cp;
      p1 = $urandom; p2 = $urandom; cp = $urandom_range(0, 7);
      e1 = p1; e2 = p2;
      for (int g = cp; g < 8; g++) begin
        e1[31-4*g -: 4] = p2[31-4*g -: 4];
        e2[31-4*g -: 4] = p1[31-4*g -: 4];
      end
      @(negedge clk) begin in_valid = 1; parent1 = p1; parent2 = p2; point = 3'(cp); end
      @(negedge clk) begin
        in_valid = 0; parent1 = '0; parent2 = '0;
        checks += 3;
        if (!out_valid) failures++;
        if (32'(child1) != e1) begin failures++; $display("child1 %h expected %h (cp %0d)", child1, e1, cp); end
        if (32'(child2) != e2) begin failures++; $display("child2 %h expected %h (cp %0d)", child2, e2, cp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
