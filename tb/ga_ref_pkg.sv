// ga_ref_pkg: reference models used by the testbenches.
//
// Plain behavioural code, written independently of the RTL: the path cost of
// a chromosome (Manhattan length plus a penalty per obstacle cell on the
// Bresenham lines), the cycle count of the fitness unit, and one step of the
// 90/150 cellular automaton.
package ga_ref_pkg;

  // Returns the fitness; obst receives the obstacle cells hit and cells the
  // number of cells traced (sum of Chebyshev segment lengths).
  function automatic int ref_fitness(input logic [31:0] chrom, input logic [15:0] st,
                                     input logic [15:0] grid [16], input int penalty,
                                     output int obst, output int cells);
    int px[6], py[6];
    int f;
    px[0] = int'(st[15:12]); py[0] = int'(st[11:8]);
    px[5] = int'(st[7:4]);   py[5] = int'(st[3:0]);
    for (int n = 0; n < 4; n++) begin
      px[n+1] = int'(chrom[31-8*n -: 4]);
      py[n+1] = int'(chrom[27-8*n -: 4]);
    end
    f = 0; obst = 0; cells = 0;
    for (int s = 0; s < 5; s++) begin
      int x, y, x1, y1, dx, dy, stx, sty, err, e2;
      x = px[s]; y = py[s]; x1 = px[s+1]; y1 = py[s+1];
      dx  = (x1 > x) ? x1 - x : x - x1;
      dy  = (y1 > y) ? y1 - y : y - y1;
      stx = (x < x1) ? 1 : -1;
      sty = (y < y1) ? 1 : -1;
      f  += dx + dy;
      err = dx - dy;
      while (!(x == x1 && y == y1)) begin
        e2 = 2 * err;
        if (e2 >= -dy) begin err -= dy; x += stx; end
        if (e2 <= dx) begin err += dx; y += sty; end
        cells++;
        if (grid[y][x]) begin obst++; f += penalty; end
      end
    end
    return f;
  endfunction

  function automatic logic [15:0] ca_step(input logic [15:0] s, input logic [15:0] rule150);
    logic [15:0] n;
    for (int i = 0; i < 16; i++) begin
      logic l, r;
      l = (i > 0)  ? s[i-1] : 1'b0;
      r = (i < 15) ? s[i+1] : 1'b0;
      n[i] = l ^ r ^ (rule150[i] & s[i]);
    end
    return n;
  endfunction

endpackage
