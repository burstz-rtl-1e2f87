// row_buffer: circular row buffer of one input plane of the stencil engine.
// Two row-sized memories (block RAM style, one synchronous read and one write
// per cycle) always hold the two rows that came before the incoming row. For
// each incoming word at column x of row r the buffer outputs, one cycle later,
// the words at column x of rows r-2 and r-1 together with the incoming word:
// the three rows of this plane around the stencil. The write overwrites the
// older of the two rows, so the memories are used round-robin. A flush pass
// (in_flush) reads the buffers for a row after the last one without writing,
// so that the plane's last row can be emitted. Rows are row_words words long
// (at most MAX_ROW_WORDS); row and column counters are kept here and
// reported with the data. Two buffers per plane and their circular use follow
// the source design; the counters and the flush pass are this design's.
module row_buffer #(
  parameter int W             = 256,
  parameter int MAX_ROW_WORDS = 256,
  parameter int ROW_W         = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [$clog2(MAX_ROW_WORDS+1)-1:0] row_words,
  input  logic [ROW_W-1:0]                 n_rows,
  input  logic                             in_valid,
  input  logic                             in_flush,   // read-only pass
  input  logic [W-1:0]                     in_data,
  output logic                             out_valid,
  output logic [W-1:0]                     out_r2,     // row r-2
  output logic [W-1:0]                     out_r1,     // row r-1
  output logic [W-1:0]                     out_r0,     // row r (incoming)
  output logic [$clog2(MAX_ROW_WORDS)-1:0] out_x,
  output logic [ROW_W-1:0]                 out_row,    // r
  output logic                             out_eol     // last word of the row
);
  localparam int XW = $clog2(MAX_ROW_WORDS);

  logic [W-1:0] mem0 [MAX_ROW_WORDS];
  logic [W-1:0] mem1 [MAX_ROW_WORDS];
  logic [XW-1:0]    x;
  logic [ROW_W-1:0] r;
  logic             eol;

  assign eol = (32'(x) == 32'(row_words) - 1);

  // rows with even index live in mem0, odd rows in mem1
  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (r[0]) begin
        out_r2 <= mem1[x];
        out_r1 <= mem0[x];
      end else begin
        out_r2 <= mem0[x];
        out_r1 <= mem1[x];
      end
      out_r0 <= in_data;
      if (!in_flush) begin
        if (r[0]) mem1[x] <= in_data;
        else      mem0[x] <= in_data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      r         <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_row   <= '0;
      out_eol   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_x   <= x;
        out_row <= r;
        out_eol <= eol;
        if (eol) begin
          x <= '0;
          r <= (r == n_rows) ? '0 : r + 1'b1;   // row n_rows is the flush pass
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
