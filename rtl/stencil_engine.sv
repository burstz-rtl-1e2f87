// stencil_engine: the computation engine of the platform, a 3-D 7-point
// stencil that updates plane z from planes z-1, z, z+1. The three planes
// arrive as three parallel streams of 256-bit words (four doubles, x
// fastest, then y), one from each decompressor; a word is taken from all
// three at once. Each stream feeds its own circular row buffer, and the
// stencil core receives the nine words around the stencil every cycle. Per
// row the sequencer issues row_words column slots and one end-of-row slot;
// after the last input row it issues a flush row that reads the buffers
// only, so that the output plane (the same size, rows in order, boundary
// cells copied) leaves with a last flag on its final word, towards the
// compressor. An output FIFO with room for the whole pipeline provides
// backpressure: no slot is issued unless the FIFO can take its result.
// Rate: row_words+1 cycles per row, one row more per plane.
module stencil_engine #(
  parameter int MAX_ROW_WORDS = 256,      // up to 1024 doubles per row
  parameter int ROW_W         = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [$clog2(MAX_ROW_WORDS+1)-1:0] row_words,
  input  logic [ROW_W-1:0]                   n_rows,
  input  logic [63:0]                        c0,
  input  logic [63:0]                        c1,
  input  logic [2:0]                         in_valid,
  output logic [2:0]                         in_ready,
  input  logic [2:0][255:0]                  in_data,
  output logic                               out_valid,
  input  logic                               out_ready,
  output logic [255:0]                       out_data,
  output logic                               out_last
);
  localparam int XW = $clog2(MAX_ROW_WORDS);
  localparam int RWW = $clog2(MAX_ROW_WORDS + 1);
  localparam int OF_DEPTH = 16;

  // ---------------- sequencer ----------------
  logic [XW-1:0]    sx;
  logic [ROW_W-1:0] sr;
  logic             s_eor;        // next slot is the end-of-row slot
  logic             flush, room, col_go, eor_go, eor_d;
  logic [4:0]       of_count;

  assign flush  = (sr == n_rows);
  assign room   = of_count <= 5'(OF_DEPTH - 8);
  assign col_go = room && !s_eor && (flush || in_valid == 3'b111);
  assign eor_go = room && s_eor;
  assign in_ready = {3{room && !s_eor && !flush && in_valid == 3'b111}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx <= '0; sr <= '0; s_eor <= 1'b0; eor_d <= 1'b0;
    end else begin
      eor_d <= eor_go;
      if (col_go) begin
        if (32'(sx) == 32'(row_words) - 1) begin
          sx <= '0;
          s_eor <= 1'b1;
        end else sx <= sx + 1'b1;
      end else if (eor_go) begin
        s_eor <= 1'b0;
        sr <= flush ? '0 : sr + 1'b1;
      end
    end
  end

  // ---------------- three circular row buffers ----------------
  logic [2:0]                rb_valid, rb_eol;
  logic [2:0][2:0][255:0]    col;
  logic [XW-1:0]             rb_x [3];
  logic [ROW_W-1:0]          rb_row [3];

  for (genvar p = 0; p < 3; p++) begin : g_rb
    row_buffer #(.W(256), .MAX_ROW_WORDS(MAX_ROW_WORDS), .ROW_W(ROW_W)) u_rb (
      .clk, .rst_n, .row_words(RWW'(row_words)), .n_rows,
      .in_valid(col_go), .in_flush(flush), .in_data(in_data[p]),
      .out_valid(rb_valid[p]), .out_r2(col[p][0]), .out_r1(col[p][1]), .out_r0(col[p][2]),
      .out_x(rb_x[p]), .out_row(rb_row[p]), .out_eol(rb_eol[p])
    );
  end

  // ---------------- stencil core ----------------
  logic         c_valid, c_last;
  logic [255:0] c_data;
  logic         of_wready;

  stencil_core #(.XW(XW), .ROW_W(ROW_W)) u_core (
    .clk, .rst_n, .n_rows, .c0, .c1,
    .in_valid(rb_valid[0] || eor_d), .in_eor(eor_d), .in_col(col),
    .in_x(rb_x[0]), .in_row(rb_row[0]),
    .out_valid(c_valid), .out_data(c_data), .out_last(c_last)
  );

  sync_fifo #(.W(257), .DEPTH(OF_DEPTH)) u_of (
    .clk, .rst_n,
    .wr_valid(c_valid), .wr_ready(of_wready), .wr_data({c_last, c_data}),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data({out_last, out_data}),
    .count(of_count)
  );

  // The three buffers run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
    rb_valid[0] |-> (rb_x[1] == rb_x[0] && rb_row[2] == rb_row[0]));
  assert property (@(posedge clk) disable iff (!rst_n)
    c_valid |-> of_wready) else $error("stencil output FIFO overflow");
endmodule
