// stencil_ref_pkg: real-arithmetic reference of the 7-point heat stencil on
// one plane with copied boundary cells, and a tolerance compare for the
// truncating double-precision operators of the RTL.
package stencil_ref_pkg;
  function automatic real ref_cell(real g[3][][], int nx, int ny, int x, int y, real c0, real c1);
    if (x == 0 || y == 0 || x == nx - 1 || y == ny - 1) return g[1][y][x];
    return c0 * g[1][y][x] + c1 * (g[1][y][x-1] + g[1][y][x+1] + g[1][y-1][x] +
                                   g[1][y+1][x] + g[0][y][x] + g[2][y][x]);
  endfunction

  function automatic bit close(real a, real b);
    real d, m;
    d = (a > b) ? a - b : b - a;
    m = (a > 0) ? a : -a;
    return d <= 1e-12 * (m + 1.0);
  endfunction
endpackage
