// stencil_core: 7-point 3-D heat-transfer stencil,
//   u'(x,y,z) = c0*u(x,y,z) + c1*(u(x+-1,y,z) + u(x,y+-1,z) + u(x,y,z+-1)),
// with c0 = 1-6*alpha and c1 = alpha for the heat equation. Each cycle it
// takes one column event: the nine 256-bit words (four doubles each) at one
// word position x of rows r-2, r-1, r of planes z-1, z, z+1 delivered by the
// three circular row buffers, i.e. the 3x3 yz cross-section around the
// stencil, of which the 7-point stencil uses five. The x neighbours come from
// adjacent words, so a word of output row y=r-1 is computed when the next
// column arrives; an end-of-row event (one idle slot after each row) releases
// the row's last word. Cells on the x and y faces of the plane are copied
// unchanged (fixed boundary). The arithmetic is an array of four lanes of
// double-precision adders and multipliers in a five-stage pipeline, so one
// output word leaves per column event, five cycles later; there is no
// backpressure, the caller keeps room for the pipeline contents.
// Stencil shape, the nine-word input and the four-double datapath follow the
// source design; boundary handling, the end-of-row slot and the pipeline are
// this design's choices.
module stencil_core
  import fp64_pkg::*;
#(
  parameter int XW    = 8,
  parameter int ROW_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ROW_W-1:0]  n_rows,
  input  logic [63:0]       c0,
  input  logic [63:0]       c1,
  input  logic              in_valid,
  input  logic              in_eor,        // end-of-row slot, no column data
  input  logic [2:0][2:0][255:0] in_col,   // [plane z-1,z,z+1][row r-2,r-1,r]
  input  logic [XW-1:0]     in_x,
  input  logic [ROW_W-1:0]  in_row,        // r
  output logic              out_valid,
  output logic [255:0]      out_data,
  output logic              out_last       // last word of the plane
);
  typedef logic [3:0][63:0] w4_t;

  // ---------------- column window ----------------
  logic             have_prev;
  w4_t              p_u, p_n, p_s, p_zm, p_zp;
  logic [63:0]      pp3;          // element 3 of the word left of p_u
  logic [XW-1:0]    p_x;
  logic [ROW_W-1:0] p_r;

  typedef struct packed {
    logic       last;
    logic [3:0] copy;
    w4_t u, l, r, n, s, zm, zp;
  } emit_t;

  logic  emit;
  emit_t e;

  always_comb begin
    logic [ROW_W-1:0] y;
    logic             right_ok;
    y        = p_r - 1'b1;
    right_ok = !in_eor;
    emit     = in_valid && have_prev && p_r != 0;
    e.u  = p_u;  e.n = p_n; e.s = p_s; e.zm = p_zm; e.zp = p_zp;
    for (int i = 0; i < 4; i++) begin
      e.l[i] = (i == 0) ? pp3 : p_u[i-1];
      e.r[i] = (i == 3) ? in_col[1][1][63:0] : p_u[i+1];
      e.copy[i] = (y == 0) || (y == n_rows - 1'b1) ||
                  (i == 0 && p_x == 0) || (i == 3 && !right_ok);
    end
    e.last = in_eor && (y == n_rows - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      p_u <= '0; p_n <= '0; p_s <= '0; p_zm <= '0; p_zp <= '0;
      pp3 <= '0; p_x <= '0; p_r <= '0;
    end else if (in_valid) begin
      if (in_eor) have_prev <= 1'b0;
      else begin
        have_prev <= 1'b1;
        pp3  <= p_u[3];
        p_u  <= in_col[1][1];
        p_n  <= in_col[1][0];
        p_s  <= in_col[1][2];
        p_zm <= in_col[0][1];
        p_zp <= in_col[2][1];
        p_x  <= in_x;
        p_r  <= in_row;
      end
    end
  end

  // ---------------- arithmetic pipeline ----------------
  logic [4:1]   v;            // v[k]: stage k holds a word
  logic [4:1]   lst;
  logic [3:0]   cp [4:1];
  w4_t          uu [4:1];
  w4_t          a1, a2, a3, a3d, b, m0, sm, m1;
  w4_t          m0c, m0d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      lst <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      v   <= {v[3:1], emit};
      lst <= {lst[3:1], e.last};
      out_valid <= v[4];
      out_last  <= lst[4] && v[4];
    end
  end

  always_ff @(posedge clk) begin
    cp[1] <= e.copy; cp[2] <= cp[1]; cp[3] <= cp[2]; cp[4] <= cp[3];
    uu[1] <= e.u; uu[2] <= uu[1]; uu[3] <= uu[2]; uu[4] <= uu[3];
    for (int i = 0; i < 4; i++) begin
      a1[i] <= fp_add(e.l[i], e.r[i]);          // stage 1
      a2[i] <= fp_add(e.n[i], e.s[i]);
      a3[i] <= fp_add(e.zm[i], e.zp[i]);
      b[i]  <= fp_add(a1[i], a2[i]);            // stage 2
      a3d[i] <= a3[i];
      m0[i] <= fp_mul(c0, uu[1][i]);
      sm[i] <= fp_add(b[i], a3d[i]);            // stage 3
      m1[i] <= fp_mul(c1, sm[i]);               // stage 4
      out_data[64*i +: 64] <= cp[4][i] ? uu[4][i] : fp_add(m0d[i], m1[i]);  // stage 5
    end
  end

  // m0 is ready after stage 2; delay it to meet m1 after stage 4
  always_ff @(posedge clk) begin
    m0c <= m0;
    m0d <= m0c;
  end
endmodule
