// szfp_compressor: multi-pipeline sZFP compressor. A stream of 256-bit words,
// each a block of four doubles, passes fixed-point conversion and the forward
// block transform at one block per cycle. Transformed blocks are dealt out
// round-robin to N_ENC encoders, each needing one to three cycles per block,
// and the shuffler takes their results back in the same round-robin order and
// packs them into aligned 6 KB chunks. in_last on the final block closes the
// last chunk. Output: 256-bit words, whole chunks, with chunk-last and
// stream-last flags. Two encoders are the default of the source design; with
// them the worst case (every block needing three cycles) is two blocks per
// three cycles, and three encoders reach one block per cycle.
module szfp_compressor
  import szfp_pkg::*;
#(
  parameter int N_ENC = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [11:0] minexp,      // error bound 2^minexp
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [255:0]       in_data,
  input  logic               in_last,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [WORD_W-1:0]  out_data,
  output logic               out_chunk_last,
  output logic               out_stream_last
);
  localparam int SELW = (N_ENC > 1) ? $clog2(N_ENC) : 1;

  logic      fx_valid, fx_ready, fx_last;
  szfp_fix_t fx_blk;
  logic      tr_valid, tr_ready, tr_last;
  szfp_fix_t tr_blk;

  szfp_fixpt u_fixpt (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .out_valid(fx_valid), .out_ready(fx_ready), .out_blk(fx_blk), .out_last(fx_last)
  );

  szfp_fwd_xform u_xform (
    .clk, .rst_n,
    .in_valid(fx_valid), .in_ready(fx_ready), .in_blk(fx_blk), .in_last(fx_last),
    .out_valid(tr_valid), .out_ready(tr_ready), .out_blk(tr_blk), .out_last(tr_last)
  );

  logic [SELW-1:0]          dsel;
  logic [N_ENC-1:0]         e_in_valid, e_in_ready;
  logic [N_ENC-1:0]         e_out_valid, e_out_ready, e_out_last;
  logic [N_ENC-1:0][256:0]  e_out_bits;
  logic [N_ENC-1:0][8:0]    e_out_len;

  always_comb begin
    e_in_valid = '0;
    e_in_valid[dsel] = tr_valid;
  end
  assign tr_ready = e_in_ready[dsel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsel <= '0;
    else if (tr_valid && tr_ready)
      dsel <= (dsel == SELW'(N_ENC - 1)) ? '0 : dsel + 1'b1;
  end

  for (genvar i = 0; i < N_ENC; i++) begin : g_enc
    szfp_encoder u_enc (
      .clk, .rst_n, .minexp,
      .in_valid(e_in_valid[i]), .in_ready(e_in_ready[i]), .in_blk(tr_blk), .in_last(tr_last),
      .out_valid(e_out_valid[i]), .out_ready(e_out_ready[i]),
      .out_bits(e_out_bits[i]), .out_len(e_out_len[i]), .out_last(e_out_last[i])
    );
  end

  szfp_shuffler #(.N_IN(N_ENC)) u_shuf (
    .clk, .rst_n,
    .in_valid(e_out_valid), .in_ready(e_out_ready), .in_bits(e_out_bits),
    .in_len(e_out_len), .in_last(e_out_last),
    .out_valid, .out_ready, .out_data, .out_chunk_last, .out_stream_last
  );
endmodule
