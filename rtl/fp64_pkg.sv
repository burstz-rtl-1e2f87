// fp64_pkg: combinational IEEE-754 double-precision add and multiply used by
// the stencil core's operator array. Both truncate the result (round toward
// zero), flush subnormal inputs and results to zero and do not handle
// infinities or NaNs; heat-transfer grids stay well inside the normal range.
// The operator algorithms are this design's own; the source design only states
// that the stencil core is built from an array of floating-point operators.
package fp64_pkg;

  function automatic logic [63:0] fp_add(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] x, y;
    logic [10:0] ex, ey, er;
    logic [55:0] mx, my, ms;   // 1 carry + 53 significand + 2 guard bits
    logic [11:0] d;
    logic        sr;
    int          lz;
    if (a[62:52] == 0) return (b[62:52] == 0) ? 64'd0 : b;
    if (b[62:52] == 0) return a;
    // order by magnitude
    if (a[62:0] >= b[62:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    ex = x[62:52]; ey = y[62:52];
    mx = {1'b0, 1'b1, x[51:0], 2'b00};
    my = {1'b0, 1'b1, y[51:0], 2'b00};
    d  = {1'b0, ex} - {1'b0, ey};
    my = (d > 12'd55) ? 56'd0 : (my >> d);
    sr = x[63];
    if (x[63] == y[63]) ms = mx + my;
    else ms = mx - my;
    if (ms == 0) return 64'd0;
    er = ex;
    if (ms[55]) begin
      ms = ms >> 1;
      if (er == 11'h7FE) return {sr, 11'h7FF, 52'd0};
      er = er + 11'd1;
    end else begin
      lz = 0;
      for (int i = 54; i >= 0; i--) begin
        if (ms[i]) break;
        lz++;
      end
      if ({1'b0, er} <= 12'(lz)) return 64'd0;
      ms = ms << lz;
      er = er - 11'(lz);
    end
    return {sr, er, ms[53:2]};
  endfunction

  function automatic logic [63:0] fp_mul(input logic [63:0] a, input logic [63:0] b);
    logic [105:0] p;
    logic [12:0]  e;
    logic         s;
    if (a[62:52] == 0 || b[62:52] == 0) return 64'd0;
    s = a[63] ^ b[63];
    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = {2'b00, a[62:52]} + {2'b00, b[62:52]} - 13'd1023;
    if (p[105]) begin
      p = p >> 1;
      e = e + 13'd1;
    end
    if (e[12] || e == 0) return 64'd0;        // underflow
    if (e >= 13'd2047) return {s, 11'h7FF, 52'd0};
    return {s, e[10:0], p[103:52]};
  endfunction

endpackage
