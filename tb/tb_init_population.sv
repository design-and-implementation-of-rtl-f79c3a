// tb_init_population: feeds random words and checks that chromosome i is
// written once, at the right cycle, as {word 2i, word 2i+1} of the words
// presented after start, that all POP indices are written and that done comes
// with the last write.
module tb_init_population;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, wr_en, done;
  logic [15:0] rnd;
  logic [3:0]  wr_idx;
  chrom_t      wr_chrom;

  init_population #(.POP(16)) dut (.clk, .rst_n, .start, .rnd, .wr_en, .wr_idx, .wr_chrom, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] words [32];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      int writes;
      writes = 0;
      @(negedge clk) begin start = 1; rnd = 16'($urandom); end
      @(negedge clk) start = 0;
      for (int t = 0; t < 32; t++) begin
        words[t] = 16'($urandom);
        rnd = words[t];
        @(negedge clk);
        checks++;
        if (wr_en != (t % 2 == 1)) begin failures++; $display("wr_en %b at %0d", wr_en, t); end
        if (wr_en) begin
          writes++;
          checks += 3;
          if (int'(wr_idx) != t / 2) begin failures++; $display("idx %0d at %0d", wr_idx, t); end
          if (32'(wr_chrom) != {words[t-1], words[t]}) begin failures++; $display("chrom %h", wr_chrom); end
          if (done != (t == 31)) begin failures++; $display("done %b at %0d", done, t); end
        end
      end
      @(negedge clk);
      checks += 2;
      if (writes != 16) begin failures++; $display("writes %0d", writes); end
      if (wr_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
