// chunk_writer: write-request generator for the compressor output. The
// compressor's words go straight into the arbiter's write buffer for this
// endpoint; this block watches them and, each time a whole 6 KB chunk (192
// words) has been handed over, posts one write burst for it at the next
// chunk address from base. Because the arbiter starts a write burst only when
// all its data is buffered, the burst then runs without a gap. done rises
// once the chunk flagged stream-last has been written, and n_chunks counts
// the chunks written, for the host. One burst per chunk is this design's
// choice.
module chunk_writer
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
  input  logic              data_fire,     // a compressor word entered the buffer
  input  logic              data_chunk_last,
  input  logic              data_stream_last,
  input  logic              ep_idle,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  output logic [LEN_W-1:0]  req_len,
  output logic [CNT_W-1:0]  n_chunks,
  output logic              done
);
  logic [CNT_W-1:0] owed;      // chunks complete but not yet requested
  logic             seen_last;

  assign req_valid = (owed != 0);
  assign req_len   = LEN_W'(CHUNK_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owed      <= '0;
      seen_last <= 1'b0;
      req_addr  <= '0;
      n_chunks  <= '0;
      done      <= 1'b0;
    end else begin
      if (start) begin
        req_addr  <= base;
        n_chunks  <= '0;
        seen_last <= 1'b0;
        done      <= 1'b0;
      end else begin
        owed <= owed + CNT_W'(data_fire && data_chunk_last) - CNT_W'(req_valid && req_ready);
        if (req_valid && req_ready) begin
          req_addr <= req_addr + ADDR_W'(CHUNK_WORDS);
          n_chunks <= n_chunks + 1'b1;
        end
        if (data_fire && data_stream_last) seen_last <= 1'b1;
        if (seen_last && owed == 0 && !req_valid && ep_idle) done <= 1'b1;
      end
    end
  end
endmodule
