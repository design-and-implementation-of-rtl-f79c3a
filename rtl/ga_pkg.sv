// ga_pkg: types and constants shared by the genetic-algorithm path planner.
//
// The robot works on a 16 x 16 occupancy grid. A path runs from a start node
// through four intermediate nodes to a target node. A chromosome holds only
// the four intermediate nodes, as eight 4-bit genes x1 y1 x2 y2 x3 y3 x4 y4,
// gene 0 in the most significant nibble, so it fills one 32-bit word. The grid
// size, population of 16 and the 100 generations follow the published design;
// the bit layout of words and the penalty value are this design's choices.
package ga_pkg;

  localparam int unsigned GRID      = 16;            // cells per side
  localparam int unsigned COORD_W   = 4;             // bits per coordinate
  localparam int unsigned NODES     = 4;             // intermediate nodes per path
  localparam int unsigned GENES     = 2 * NODES;     // genes per chromosome
  localparam int unsigned FIT_W     = 16;            // fitness width

  typedef logic [COORD_W-1:0] coord_t;

  // One path node.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } node_t;

  typedef logic [0:GENES-1][COORD_W-1:0] chrom_t;

  // Start and target nodes as written by the host.
  typedef struct packed {
    node_t start;
    node_t target;
  } start_target_t;

  // Occupancy grid: grid[y][x] = 1 marks an obstacle cell.
  typedef logic [GRID-1:0][GRID-1:0] grid_t;

  typedef logic [FIT_W-1:0] fitness_t;

  // Node n (0..NODES-1) of a chromosome.
  function automatic node_t chrom_node(chrom_t c, int unsigned n);
    node_t r;
    r.x = c[2*n];
    r.y = c[2*n+1];
    return r;
  endfunction

endpackage
