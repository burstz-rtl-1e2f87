// szfp_decompressor: multi-pipeline sZFP decompressor. The compressed input
// stream (256-bit words, whole 6 KB chunks of 192 words) is dealt out one
// chunk at a time, round-robin, to N_DEC decoders. Only the decoders are
// replicated: the block-transform stage collects decoded blocks from the
// decoders in the same round-robin order, staying on one decoder until a
// block flagged last-of-chunk arrives, and the float conversion produces one
// 256-bit word of four doubles per cycle. Five decoders are the default of the
// source design. Each decoder's chunk buffer and 4x output buffer keep a slow
// decoder from blocking the others.
module szfp_decompressor
  import szfp_pkg::*;
#(
  parameter int N_DEC = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [11:0] minexp,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [WORD_W-1:0]  in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [255:0]       out_data
);
  localparam int SELW = (N_DEC > 1) ? $clog2(N_DEC) : 1;
  localparam int WCW  = $clog2(CHUNK_WORDS);

  logic [SELW-1:0]  dsel, csel;
  logic [WCW-1:0]   wcnt;
  logic [N_DEC-1:0] d_in_valid, d_in_ready, d_out_valid, d_out_ready, d_out_last;
  szfp_blk_t        d_out_blk [N_DEC];

  // chunk distributor
  always_comb begin
    d_in_valid = '0;
    d_in_valid[dsel] = in_valid;
  end
  assign in_ready = d_in_ready[dsel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsel <= '0;
      wcnt <= '0;
    end else if (in_valid && in_ready) begin
      if (wcnt == WCW'(CHUNK_WORDS - 1)) begin
        wcnt <= '0;
        dsel <= (dsel == SELW'(N_DEC - 1)) ? '0 : dsel + 1'b1;
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N_DEC; i++) begin : g_dec
    szfp_decoder u_dec (
      .clk, .rst_n, .minexp,
      .in_valid(d_in_valid[i]), .in_ready(d_in_ready[i]), .in_data,
      .out_valid(d_out_valid[i]), .out_ready(d_out_ready[i]),
      .out_blk(d_out_blk[i]), .out_last(d_out_last[i])
    );
  end

  // in-order collector
  logic      c_valid, c_ready;
  szfp_blk_t c_blk;
  assign c_valid = d_out_valid[csel];
  assign c_blk   = d_out_blk[csel];
  always_comb begin
    d_out_ready = '0;
    d_out_ready[csel] = c_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) csel <= '0;
    else if (c_valid && c_ready && d_out_last[csel])
      csel <= (csel == SELW'(N_DEC - 1)) ? '0 : csel + 1'b1;
  end

  logic      t_valid, t_ready;
  szfp_blk_t t_blk;

  szfp_inv_xform u_xform (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_blk(c_blk),
    .out_valid(t_valid), .out_ready(t_ready), .out_blk(t_blk)
  );

  szfp_float_conv u_fconv (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_blk(t_blk),
    .out_valid, .out_ready, .out_data
  );
endmodule
