// selection_unit: selection module (SM), roulette-wheel selection.
//
// Fitness is minimised, so each chromosome gets a wheel slot of
// (max_fit - fit + 1): the worst keeps a slot of one, better ones get more.
// On prep the wheel is laid out in sorted order, best first, one slot per
// clock, storing the running sums. A spin then takes an 8-bit random number,
// scales it to the wheel, pointer = (rnd8 * total) >> 8, and picks the first
// slot whose running sum exceeds the pointer, comparing all slots at once.
//
// Roulette-wheel selection over the sorted population with an 8-bit random
// number follows the published design; the slot formula and the scaled
// pointer are this design's choices.
//
// Interface: pulse prep with fit, order and max_fit stable for POP cycles;
// ready rises when the wheel is complete. Each sel_req cycle (ready high) gives
// sel_idx with sel_valid in the following cycle, one spin per clock.
module selection_unit
  import ga_pkg::*;
#(
  parameter int unsigned POP = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            prep,
  input  fitness_t [POP-1:0]              fit,
  input  logic [POP-1:0][$clog2(POP)-1:0] order,
  input  fitness_t                        max_fit,
  output logic                            ready,
  input  logic                            sel_req,
  input  logic [7:0]                      rnd8,
  output logic                            sel_valid,
  output logic [$clog2(POP)-1:0]          sel_idx
);

  localparam int unsigned IW = $clog2(POP);
  localparam int unsigned SW = FIT_W + 1 + $clog2(POP);   // running-sum width

  logic [POP-1:0][SW-1:0] cum;     // cum[k]: sum of slots of ranks 0..k
  logic [SW-1:0]          total;
  logic [IW-1:0]          k;
  logic                   building;

  fitness_t      f_k;
  logic [SW-1:0] slot;
  assign f_k  = fit[order[k]];
  assign slot = SW'(max_fit - f_k) + SW'(1);

  logic [SW+7:0] prod;
  logic [SW-1:0] ptr;
  logic [IW-1:0] pick;
  always_comb begin
    prod = (SW+8)'(rnd8) * (SW+8)'(total);
    ptr  = prod[SW+7:8];
    pick = IW'(POP - 1);
    for (int i = POP - 1; i >= 0; i--)
      if (cum[i] > ptr) pick = IW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cum       <= '0;
      total     <= '0;
      k         <= '0;
      building  <= 1'b0;
      ready     <= 1'b0;
      sel_valid <= 1'b0;
      sel_idx   <= '0;
    end else begin
      sel_valid <= 1'b0;
      if (prep) begin
        building <= 1'b1;
        ready    <= 1'b0;
        k        <= '0;
        total    <= '0;
      end else if (building) begin
        cum[k] <= total + slot;
        total  <= total + slot;
        k      <= k + 1'b1;
        if (k == IW'(POP - 1)) begin
          building <= 1'b0;
          ready    <= 1'b1;
        end
      end else if (sel_req && ready) begin
        sel_idx   <= order[pick];
        sel_valid <= 1'b1;
      end
    end
  end

  a_req_ready: assert property (@(posedge clk) disable iff (!rst_n) sel_req |-> ready);

endmodule
