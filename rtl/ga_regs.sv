// ga_regs: host register file of the GA IP core.
//
// Twenty 32-bit word registers, addressed by byte offset from the core's base:
//   0x00  Control           W  bit 0: writing 1 starts a run (0 = wait)
//   0x04  Status            R  bit 0: 1 when the last run has finished
//   0x08  Start_Target      W  [15:12] start x, [11:8] start y,
//                              [7:4] target x, [3:0] target y
//   0x0C  Path_Coordinates  R  best path, x1 y1 x2 y2 x3 y3 x4 y4, x1 in [31:28]
//   0x10 + 4*y  Map row y   W  bit x = 1: cell (x,y) is an obstacle, y = 0..15
// The register set, addresses, directions and widths follow the published
// design. The field layouts inside the words, the start pulse, read-back of
// the written registers and the bus timing are this design's choices.
//
// Bus: bus_wr writes bus_wdata at bus_addr in that cycle. bus_rd returns the
// register in bus_rdata with bus_rvalid one cycle later. Unmapped offsets read
// 0 and ignore writes. A Control write of 1 while the core is idle gives a
// one-cycle ga_start pulse and clears Status; ga_done sets Status and latches
// best_path into Path_Coordinates.
module ga_regs
  import ga_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // host bus
  input  logic          bus_wr,
  input  logic          bus_rd,
  input  logic [7:0]    bus_addr,
  input  logic [31:0]   bus_wdata,
  output logic [31:0]   bus_rdata,
  output logic          bus_rvalid,
  // GA core side
  output logic          ga_start,
  output start_target_t start_target,
  output grid_t         grid,
  input  logic          ga_busy,
  input  logic          ga_done,
  input  chrom_t        best_path
);

  localparam logic [7:0] A_CONTROL = 8'h00;
  localparam logic [7:0] A_STATUS  = 8'h04;
  localparam logic [7:0] A_ST      = 8'h08;
  localparam logic [7:0] A_PATH    = 8'h0C;
  localparam logic [7:0] A_MAP0    = 8'h10;
  localparam logic [7:0] A_MAPN    = 8'h4C;

  logic   control_q, status_q;
  chrom_t path_q;

  logic is_map_wr;
  logic [3:0] map_row_wr;
  assign is_map_wr  = bus_wr && bus_addr >= A_MAP0 && bus_addr <= A_MAPN && bus_addr[1:0] == 2'b00;
  assign map_row_wr = 4'((bus_addr - A_MAP0) >> 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      control_q    <= 1'b0;
      status_q     <= 1'b0;
      start_target <= '0;
      grid         <= '0;
      path_q       <= '0;
      ga_start     <= 1'b0;
      bus_rdata    <= '0;
      bus_rvalid   <= 1'b0;
    end else begin
      ga_start <= 1'b0;
      if (bus_wr) begin
        unique case (bus_addr)
          A_CONTROL: begin
            control_q <= bus_wdata[0];
            if (bus_wdata[0] && !ga_busy && !ga_start) begin
              ga_start <= 1'b1;
              status_q <= 1'b0;
            end
          end
          A_ST:    start_target <= start_target_t'(bus_wdata[15:0]);
          default: ;
        endcase
      end
      if (is_map_wr) grid[map_row_wr] <= bus_wdata[GRID-1:0];
      if (ga_done) begin
        status_q <= 1'b1;
        path_q   <= best_path;
      end
      bus_rvalid <= bus_rd;
      if (bus_rd) begin
        if (bus_addr >= A_MAP0 && bus_addr <= A_MAPN && bus_addr[1:0] == 2'b00)
          bus_rdata <= 32'(grid[4'((bus_addr - A_MAP0) >> 2)]);
        else begin
          unique case (bus_addr)
            A_CONTROL: bus_rdata <= 32'(control_q);
            A_STATUS:  bus_rdata <= 32'(status_q);
            A_ST:      bus_rdata <= 32'(start_target);
            A_PATH:    bus_rdata <= 32'(path_q);
            default:   bus_rdata <= '0;
          endcase
        end
      end
    end
  end

  // a start is only issued when the core was idle at the write
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) ga_start |-> !$past(ga_busy));

endmodule
