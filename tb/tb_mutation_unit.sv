// tb_mutation_unit: drives its own random words into the mutation unit and
// predicts the result: gene g is replaced by rnd[11:8] of the g-th cycle
// after start when rnd[7:0] of that cycle is below MUT_RATE. Checks the
// mutated chromosome, the count of changed genes and the 8-cycle latency, and
// that both outcomes (kept and replaced) occur.
module tb_mutation_unit;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [7:0] RATE = 8'd64;
  logic        start = 0, busy, done;
  chrom_t      chrom_in, chrom_out;
  logic [11:0] rnd;
  logic [3:0]  mutations;

  mutation_unit #(.MUT_RATE(RATE)) dut (.clk, .rst_n, .start, .chrom_in, .rnd, .busy, .done, .chrom_out, .mutations);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int replaced = 0, kept = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [31:0] c, e;
      int cnt, cyc;
      c = $urandom; e = c; cnt = 0;
      @(negedge clk) begin start = 1; chrom_in = c; rnd = 12'($urandom); end
      @(negedge clk) begin start = 0; chrom_in = '0; end
      cyc = 0;
      for (int g = 0; g < 8; g++) begin
        rnd = 12'($urandom);
        if (rnd[7:0] < RATE) begin e[31-4*g -: 4] = rnd[11:8]; cnt++; replaced++; end
        else kept++;
        @(negedge clk);
        cyc++;
        checks++;
        if (done != (g == 7)) begin failures++; $display("done at gene %0d = %b", g, done); end
      end
      checks += 2;
      if (32'(chrom_out) != e) begin failures++; $display("out %h expected %h", chrom_out, e); end
      if (int'(mutations) != cnt) begin failures++; $display("count %0d expected %0d", mutations, cnt); end
    end
    checks += 2;
    if (replaced == 0) failures++;
    if (kept == 0) failures++;
    $display("genes replaced %0d kept %0d", replaced, kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
