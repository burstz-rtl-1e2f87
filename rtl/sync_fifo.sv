// sync_fifo: single-clock first-in first-out buffer with a show-ahead output
// (the head entry is visible on rd_data whenever rd_valid is high). Storage is
// a plain array, which maps to block or distributed RAM. A push and a pop may
// happen in the same cycle. count gives the occupancy, for callers that
// reserve space ahead of time. Used for the decoder chunk and output buffers
// and the arbiter endpoint buffers.
module sync_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [W-1:0]             wr_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign wr_ready = (count != CW'(DEPTH));
  assign rd_valid = (count != 0);
  assign rd_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (wr_valid && wr_ready) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd_valid && rd_ready) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(wr_valid && wr_ready) - CW'(rd_valid && rd_ready);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
