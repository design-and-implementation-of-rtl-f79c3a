// fitness_unit: fitness function module (FFM).
//
// Scores one chromosome. The path is start -> node1 -> node2 -> node3 ->
// node4 -> target, five segments. For every segment the Manhattan distance
// |dx| + |dy| is added, and the segment is traced cell by cell with
// Bresenham's integer line algorithm; every traced cell that is an obstacle
// adds PENALTY. A lower fitness is a better path: a collision-free path scores
// its Manhattan length only.
//
// The distance and penalty formulation and the use of Bresenham's algorithm
// follow the published design. The penalty of 100 per obstacle cell matches the
// fitness values the design reports, but is not stated outright. The cells
// tested are those the line enters after leaving a node, up to and including
// the next node.
//
// Interface: pulse start with chrom, start_target and grid stable until done.
// Timing: one cycle to set up each segment and one cycle per traced cell, so a
// chromosome takes 5 + sum over segments of max(|dx|,|dy|) cycles; done pulses
// in the cycle after the last cell with fitness and obstacles valid until the
// next start.
module fitness_unit
  import ga_pkg::*;
#(
  parameter int unsigned PENALTY = 100
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  chrom_t        chrom,
  input  start_target_t start_target,
  input  grid_t         grid,
  output logic          busy,
  output logic          done,
  output fitness_t      fitness,
  output logic [7:0]    obstacles
);

  localparam int unsigned SEGS = NODES + 1;

  typedef enum logic [1:0] {S_IDLE, S_SEG, S_STEP} state_t;
  state_t state;

  logic [2:0]        seg;       // segment being traced
  node_t             cur, dst;  // current cell and segment end
  logic signed [6:0] err;       // Bresenham error term
  logic signed [6:0] ddx, ddy;  // |dx| and -|dy|
  logic              sxp, syp;  // step direction (1: increasing)
  fitness_t          acc;
  logic [7:0]        hits;

  // Node k of the full path (0 = start, SEGS = target).
  function automatic node_t path_node(int unsigned k);
    if (k == 0)         return start_target.start;
    else if (k == SEGS) return start_target.target;
    else                return chrom_node(chrom, k - 1);
  endfunction

  node_t a, b;
  logic [4:0] adx, ady;
  always_comb begin
    a   = path_node(32'(seg));
    b   = path_node(32'(seg) + 1);
    adx = (b.x >= a.x) ? 5'(b.x - a.x) : 5'(a.x - b.x);
    ady = (b.y >= a.y) ? 5'(b.y - a.y) : 5'(a.y - b.y);
  end

  // One Bresenham step from cur.
  logic signed [7:0] e2;
  node_t             nxt;
  logic signed [6:0] err_n;
  logic              hit;
  always_comb begin
    e2    = 8'(err) <<< 1;
    nxt   = cur;
    err_n = err;
    if (e2 >= 8'(ddy)) begin
      err_n = err_n + ddy;
      nxt.x = sxp ? cur.x + 1'b1 : cur.x - 1'b1;
    end
    if (e2 <= 8'(ddx)) begin
      err_n = err_n + ddx;
      nxt.y = syp ? cur.y + 1'b1 : cur.y - 1'b1;
    end
    hit = grid[nxt.y][nxt.x];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      seg       <= '0;
      cur       <= '0;
      dst       <= '0;
      err       <= '0;
      ddx       <= '0;
      ddy       <= '0;
      sxp       <= 1'b0;
      syp       <= 1'b0;
      acc       <= '0;
      hits      <= '0;
      fitness   <= '0;
      obstacles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          seg   <= '0;
          acc   <= '0;
          hits  <= '0;
          state <= S_SEG;
        end
        S_SEG: begin
          cur <= a;
          dst <= b;
          ddx <= 7'(adx);
          ddy <= -7'(ady);
          err <= 7'(adx) - 7'(ady);
          sxp <= (b.x >= a.x);
          syp <= (b.y >= a.y);
          acc <= acc + FIT_W'(adx) + FIT_W'(ady);
          if (a == b) begin
            // zero-length segment: nothing to trace
            if (seg == 3'(SEGS - 1)) begin
              fitness   <= acc;
              obstacles <= hits;
              done      <= 1'b1;
              state     <= S_IDLE;
            end else begin
              seg <= seg + 1'b1;
            end
          end else begin
            state <= S_STEP;
          end
        end
        S_STEP: begin
          cur <= nxt;
          err <= err_n;
          if (hit) begin
            acc  <= acc + FIT_W'(PENALTY);
            hits <= hits + 1'b1;
          end
          if (nxt == dst) begin
            if (seg == 3'(SEGS - 1)) begin
              fitness   <= hit ? acc + FIT_W'(PENALTY) : acc;
              obstacles <= hit ? hits + 1'b1 : hits;
              done      <= 1'b1;
              state     <= S_IDLE;
            end else begin
              seg   <= seg + 1'b1;
              state <= S_SEG;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // start is only honoured when idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
