// chunk_reader: read-request generator for one decompressor input. On start
// it posts n_chunks read bursts to the memory arbiter, one per 6 KB chunk
// (192 words) at consecutive word addresses from base. The arbiter's read
// data for the endpoint flows straight into the decompressor, so no data
// passes through this block. One burst per chunk is this design's choice;
// the source design only requires large bursts.
module chunk_reader
  import szfp_pkg::*;
#(
  parameter int ADDR_W = 25,
  parameter int LEN_W  = 9,
  parameter int CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  n_chunks,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  output logic [LEN_W-1:0]  req_len,
  output logic              busy
);
  logic [CNT_W-1:0] left;

  assign busy      = (left != 0);
  assign req_valid = busy;
  assign req_len   = LEN_W'(CHUNK_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left     <= '0;
      req_addr <= '0;
    end else if (start && !busy) begin
      left     <= n_chunks;
      req_addr <= base;
    end else if (req_valid && req_ready) begin
      left     <= left - 1'b1;
      req_addr <= req_addr + ADDR_W'(CHUNK_WORDS);
    end
  end
endmodule
