// szfp_shuffler: collects coded blocks from N_IN encoders in strict
// round-robin order (the order the blocks were dealt out) and bit-packs them
// into 256-bit words grouped in aligned 6 KB chunks (192 words). No block
// crosses a chunk boundary: when a block plus the 12-bit end-of-chunk marker
// would not fit, the marker is written, the rest of the chunk is zero-padded
// and the block starts the next chunk. The block flagged last closes the
// stream the same way, and out_stream_last marks the final word.
// A block is taken in any cycle in which fewer than 256 bits wait to be sent,
// and one word leaves per cycle, so throughput is one block per cycle as long
// as blocks average at most 256 bits. Chunk alignment and round-robin
// reception follow the source design; the marker and padding format are this
// design's choice (the padding is at most 269 bits per chunk).
module szfp_shuffler
  import szfp_pkg::*;
#(
  parameter int N_IN = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_IN-1:0]       in_valid,
  output logic [N_IN-1:0]       in_ready,
  input  logic [N_IN-1:0][256:0] in_bits,
  input  logic [N_IN-1:0][8:0]  in_len,
  input  logic [N_IN-1:0]       in_last,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [WORD_W-1:0]     out_data,
  output logic                  out_chunk_last,
  output logic                  out_stream_last
);
  localparam int SELW = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int WIC_W = $clog2(CHUNK_WORDS);

  typedef enum logic [1:0] {S_RUN, S_MARK, S_PAD} state_t;
  state_t            state;
  logic [767:0]      acc;     // bits not yet sent, LSB first
  logic [9:0]        fill;    // number of valid bits in acc
  logic [WIC_W-1:0]  wic;     // words already sent in this chunk
  logic [SELW-1:0]   sel;
  logic              closing_last;

  logic        emit, take, nofit;
  logic [9:0]  fill_e;
  logic [767:0] acc_e;
  logic [256:0] b_bits;
  logic [8:0]   b_len;
  logic         b_last, b_valid;
  logic [16:0]  used_e;

  assign b_valid = in_valid[sel];
  assign b_bits  = in_bits[sel];
  assign b_len   = in_len[sel];
  assign b_last  = in_last[sel];

  // A word can leave when 256 bits are buffered, or during padding.
  assign out_valid = (fill >= 10'd256) ||
                     (state == S_PAD && (fill != 0 || wic != 0));
  assign out_data  = acc[255:0];
  assign emit      = out_valid && out_ready;
  assign out_chunk_last  = (wic == WIC_W'(CHUNK_WORDS - 1));
  assign out_stream_last = out_chunk_last && state == S_PAD && closing_last;

  assign fill_e = emit ? ((fill >= 10'd256) ? fill - 10'd256 : 10'd0) : fill;
  assign acc_e  = emit ? (acc >> 256) : acc;
  // bits of the chunk used once this cycle's word has left
  assign used_e = (emit ? 17'(wic) + 17'd1 : 17'(wic)) * 17'd256 + 17'(fill_e);
  assign nofit  = used_e + 17'(b_len) + 17'(MARKER_BITS) > 17'(CHUNK_BITS);
  assign take   = (state == S_RUN) && b_valid && fill_e < 10'd256 && !nofit;

  always_comb begin
    in_ready = '0;
    in_ready[sel] = take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RUN;
      acc   <= '0;
      fill  <= '0;
      wic   <= '0;
      sel   <= '0;
      closing_last <= 1'b0;
    end else begin
      logic [767:0] a;
      logic [9:0]   f;
      a = acc_e;
      f = fill_e;
      if (emit) wic <= (wic == WIC_W'(CHUNK_WORDS - 1)) ? '0 : wic + 1'b1;
      case (state)
        S_RUN: begin
          if (take) begin
            a = a | (768'(b_bits) << f);
            f = f + 10'(b_len);
            sel <= (sel == SELW'(N_IN - 1)) ? '0 : sel + 1'b1;
            if (b_last) begin
              state <= S_MARK;
              closing_last <= 1'b1;
            end
          end else if (b_valid && fill_e < 10'd256 && nofit) begin
            state <= S_MARK;
            closing_last <= 1'b0;
          end
        end
        S_MARK: if (f < 10'd256) begin
          // marker, then round the fill up to a whole word of zero padding
          a = a | (768'(MARKER) << f);
          f = f + 10'(MARKER_BITS);
          f = (f + 10'd255) & ~10'd255;
          state <= S_PAD;
        end
        default: begin
          if (emit && out_chunk_last) state <= S_RUN;
        end
      endcase
      acc  <= a;
      fill <= f;
    end
  end

  // Internal fill never exceeds the buffer.
  assert property (@(posedge clk) disable iff (!rst_n) fill <= 10'd768);
endmodule
