// szfp_fwd_xform: block transform of the sZFP compressor. Applies the ZFP
// 1-D forward lifting transform to the four fixed-point values of a block and
// maps the results to negabinary, so that values of small magnitude of either
// sign have leading zero bits for the bit-plane coder. Sequency ordering is
// the identity for 1-D blocks. One registered stage, valid/ready handshake,
// one block per cycle. The lifting steps and negabinary mapping are those of
// ZFP, which the source design keeps unchanged for this stage.
module szfp_fwd_xform
  import szfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  szfp_fix_t  in_blk,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output szfp_fix_t  out_blk,
  output logic       out_last
);
  szfp_fix_t nxt;

  always_comb begin
    logic signed [63:0] x, y, z, w;
    x = in_blk.c[0]; y = in_blk.c[1]; z = in_blk.c[2]; w = in_blk.c[3];
    x = x + w; x = x >>> 1; w = w - x;
    z = z + y; z = z >>> 1; y = y - z;
    x = x + z; x = x >>> 1; z = z - x;
    w = w + y; w = w >>> 1; y = y - w;
    w = w + (y >>> 1); y = y - (w >>> 1);
    nxt      = in_blk;
    nxt.c[0] = int2nb(x);
    nxt.c[1] = int2nb(y);
    nxt.c[2] = int2nb(z);
    nxt.c[3] = int2nb(w);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_blk  <= nxt;
        out_last <= in_last;
      end
    end
  end
endmodule
