// tb_ga_regs: exercises the host register map: writes and reads back the 16
// map rows and Start_Target and checks them on the core-side outputs, checks
// that a Control write of 1 gives exactly one start pulse and clears Status,
// that a Control write while busy or a write of 0 starts nothing, that done
// sets Status and latches the path, and that unmapped offsets read 0. Read
// data must arrive one cycle after the read strobe.
module tb_ga_regs;
  import ga_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          bus_wr = 0, bus_rd = 0, bus_rvalid;
  logic [7:0]    bus_addr = 0;
  logic [31:0]   bus_wdata = 0, bus_rdata;
  logic          ga_start, ga_busy = 0, ga_done = 0;
  start_target_t start_target;
  grid_t         grid;
  chrom_t        best_path = '0;
  int            starts = 0;

  ga_regs dut (.clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
               .ga_start, .start_target, .grid, .ga_busy, .ga_done, .best_path);

  always @(posedge clk) #1 if (rst_n && ga_start) starts++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin bus_wr = 1; bus_addr = a; bus_wdata = d; end
    @(negedge clk) bus_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin bus_rd = 1; bus_addr = a; end
    @(negedge clk) begin
      bus_rd = 0;
      checks++; if (!bus_rvalid) begin failures++; $display("no rvalid"); end
      d = bus_rdata;
    end
  endtask

  initial begin
    logic [15:0] rows [16];
    logic [31:0] d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rd(8'h04, d); checks++; if (d != 0) begin failures++; $display("status after reset %h", d); end
    for (int y = 0; y < 16; y++) begin rows[y] = 16'($urandom); wr(8'h10 + 8'(4*y), {16'hDEAD, rows[y]}); end
    wr(8'h08, 32'hFFFF_3A5C);
    for (int y = 0; y < 16; y++) begin
      checks += 2;
      if (grid[y] != rows[y]) begin failures++; $display("grid row %0d %h", y, grid[y]); end
      rd(8'h10 + 8'(4*y), d);
      if (d != {16'h0, rows[y]}) begin failures++; $display("row %0d reads %h", y, d); end
    end
    checks += 2;
    if (start_target != 16'h3A5C) failures++;
    rd(8'h08, d); if (d != 32'h3A5C) begin failures++; $display("st %h", d); end
    rd(8'h50, d); checks++; if (d != 0) begin failures++; $display("unmapped %h", d); end
    // write 0: no start
    wr(8'h00, 0);
    checks++; if (starts != 0) begin failures++; $display("start on 0"); end
    // start
    wr(8'h00, 1);
    checks++; if (starts != 1) begin failures++; $display("starts %0d", starts); end
    ga_busy = 1;
    wr(8'h00, 1);                       // ignored while busy
    checks++; if (starts != 1) failures++;
    rd(8'h04, d); checks++; if (d != 0) failures++;
    @(negedge clk) begin best_path = chrom_t'(32'h1234_5678); ga_done = 1; ga_busy = 0; end
    @(negedge clk) begin ga_done = 0; best_path = '0; end
    rd(8'h04, d); checks++; if (d != 1) begin failures++; $display("status %h", d); end
    rd(8'h0C, d); checks++; if (d != 32'h1234_5678) begin failures++; $display("path %h", d); end
    // a new start clears Status
    wr(8'h00, 1);
    checks++; if (starts != 2) failures++;
    rd(8'h04, d); checks++; if (d != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
