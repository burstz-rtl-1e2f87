// szfp_decoder: one sZFP decoding pipeline of the decompressor. It owns a
// chunk-sized input buffer (192 words of 256 bits) and an output buffer of
// four times the chunk size (768 decoded blocks), so that it can run at its
// own pace while the block-transform stage drains the decoders in turn.
// Words of one chunk are shifted into a 768-bit bit window; each cycle one
// region of a block is parsed from the window's low end (header/blue, green,
// red, as written by szfp_encoder), so a block takes one to three cycles.
// A decoded block is held back one step: when the next block of the chunk is
// found it leaves with last=0, and when the end-of-chunk marker is found it
// leaves with last=1, telling the collector to move to the next decoder. The
// rest of the chunk (padding) is then discarded. The last flag and the two
// buffer sizes follow the source design; the window mechanism is this
// design's choice. minexp must equal the compressor's.
module szfp_decoder
  import szfp_pkg::*;
#(
  parameter int OUT_DEPTH = CHUNK_BYTES * 4 / (WORD_W / 8)   // 768 blocks
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [11:0] minexp,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output szfp_blk_t          out_blk,
  output logic               out_last
);
  localparam int WRD_W = $clog2(CHUNK_WORDS + 1);
  localparam int OW    = 1 + $bits(szfp_blk_t);

  typedef enum logic [1:0] {S_HDR, S_GREEN, S_RED, S_SKIP} state_t;

  // ---------------- input (chunk) buffer ----------------
  logic              ib_valid, ib_ready;
  logic [WORD_W-1:0] ib_data;
  logic [$clog2(CHUNK_WORDS+1)-1:0] ib_count;

  sync_fifo #(.W(WORD_W), .DEPTH(CHUNK_WORDS)) u_inbuf (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_data),
    .rd_valid(ib_valid), .rd_ready(ib_ready), .rd_data(ib_data), .count(ib_count)
  );

  // ---------------- output buffer ----------------
  logic          ob_wvalid, ob_wready;
  logic [OW-1:0] ob_wdata, ob_rdata;
  logic [$clog2(OUT_DEPTH+1)-1:0] ob_count;

  sync_fifo #(.W(OW), .DEPTH(OUT_DEPTH)) u_outbuf (
    .clk, .rst_n,
    .wr_valid(ob_wvalid), .wr_ready(ob_wready), .wr_data(ob_wdata),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data(ob_rdata), .count(ob_count)
  );
  assign {out_last, out_blk} = ob_rdata;

  // ---------------- decode state ----------------
  state_t           state;
  logic [767:0]     win;
  logic [9:0]       wfill;
  logic [WRD_W-1:0] wrd;          // words of the chunk moved into the window
  szfp_blk_t        cur;          // block being assembled
  logic [5:0]       p6_q;
  logic             pend_valid;
  szfp_blk_t        pend;

  // combinational results of one decode step
  logic        enough, step, blk_done, marker, can_push;
  logic [8:0]  consumed;
  szfp_blk_t   nxt;
  state_t      nstate;

  assign enough   = (wfill >= 10'd257) || (wrd == WRD_W'(CHUNK_WORDS));
  assign can_push = !pend_valid || ob_wready;

  always_comb begin
    logic [10:0] emax;
    logic [5:0]  p6;
    logic [1:0]  h;
    logic [5:0]  s [3];
    logic [8:0]  pos;
    int          lo, hi;
    nxt      = cur;
    nstate   = state;
    consumed = '0;
    blk_done = 1'b0;
    marker   = 1'b0;
    emax     = win[11:1];
    p6       = planes6(emax, minexp);
    if (p6 == 6'd63) p6 = 6'd48;
    lo = (state == S_GREEN) ? 0 : 4;
    hi = int'(p6_q) / 6;
    case (state)
      S_HDR: begin
        if (!win[0] && emax == 11'h7FF) begin
          marker = 1'b1;
          nstate = S_SKIP;
        end else if (win[0]) begin
          nxt.raw  = 1'b1;
          nxt.emax = emax;
          nxt.c    = win[256:1];
          consumed = 9'd257;
          blk_done = 1'b1;
        end else begin
          nxt.raw  = 1'b0;
          nxt.emax = emax;
          nxt.c    = '0;
          if (p6 != 0)
            nxt.c[0] = (u64_t'(win[12 +: 48]) & ((64'd1 << p6) - 64'd1)) << (7'd64 - 7'(p6));
          consumed = 9'd12 + 9'(p6);
          if (p6 == 0) blk_done = 1'b1;
          else nstate = S_GREEN;
        end
      end
      S_GREEN, S_RED: begin
        pos = '0;
        for (int j = 0; j < 4; j++) begin
          int k;
          k = int'(lo) + j;
          if (k < int'(hi)) begin
            h = win[10'(pos) +: 2];
            for (int e = 0; e < 3; e++) begin
              s[e] = (e < int'(h)) ? win[10'(pos) + 10'd2 + 10'(6*e) +: 6] : 6'd0;
              nxt.c[e+1] = nxt.c[e+1] | (u64_t'(s[e]) << (58 - 6*k));
            end
            pos = pos + 9'd2 + 9'd6 * 9'(h);
          end
        end
        consumed = pos;
        if (state == S_GREEN && p6_q > 6'd24) nstate = S_RED;
        else begin
          nstate   = S_HDR;
          blk_done = 1'b1;
        end
      end
      default: ;
    endcase
  end

  // a step that finishes a block (or closes the chunk) needs room to push
  assign step = (state != S_SKIP) && enough &&
                (!(blk_done || marker) || can_push);

  assign ob_wvalid = pend_valid && ((step && blk_done) || (step && marker));
  assign ob_wdata  = {marker, pend};

  // refill from the chunk buffer
  logic [9:0] wfill_c;
  assign wfill_c  = step ? wfill - 10'(consumed) : wfill;
  assign ib_ready = (wrd != WRD_W'(CHUNK_WORDS)) &&
                    ((state == S_SKIP) || (step && marker) || (wfill_c <= 10'd512));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HDR;
      win        <= '0;
      wfill      <= '0;
      wrd        <= '0;
      cur        <= '0;
      p6_q       <= '0;
      pend_valid <= 1'b0;
      pend       <= '0;
    end else begin
      logic [767:0] w;
      logic [9:0]   f;
      w = win;
      f = wfill;
      if (step) begin
        w = w >> consumed;
        f = f - 10'(consumed);
        state <= nstate;
        cur   <= nxt;
        if (state == S_HDR) p6_q <= planes6(win[11:1], minexp);
        if (blk_done) begin
          pend       <= nxt;
          pend_valid <= 1'b1;
        end
        if (marker) pend_valid <= 1'b0;
      end
      if (ib_valid && ib_ready) begin
        if (state != S_SKIP && !(step && marker)) begin
          w = w | (768'(ib_data) << f);
          f = f + 10'd256;
        end
        wrd <= wrd + 1'b1;
      end
      if (state == S_SKIP && (wrd == WRD_W'(CHUNK_WORDS) ||
          (wrd == WRD_W'(CHUNK_WORDS - 1) && ib_valid))) begin
        // whole chunk consumed: start the next one with an empty window
        w = '0;
        f = '0;
        wrd <= '0;
        state <= S_HDR;
      end
      win   <= w;
      wfill <= f;
    end
  end

  // A chunk always holds at least one block before its marker.
  assert property (@(posedge clk) disable iff (!rst_n) (step && marker) |-> pend_valid);
endmodule
