// szfp_inv_xform: block transform stage of the sZFP decompressor. Maps the
// four decoded negabinary coefficients back to two's complement and applies
// the ZFP 1-D inverse lifting transform. Raw blocks pass unchanged. One
// registered stage with a valid/ready handshake, one block per cycle; the
// last-of-chunk flag travels with the block.
module szfp_inv_xform
  import szfp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  szfp_blk_t  in_blk,
  output logic       out_valid,
  input  logic       out_ready,
  output szfp_blk_t  out_blk
);
  szfp_blk_t nxt;

  always_comb begin
    logic signed [63:0] x, y, z, w;
    x = nb2int(in_blk.c[0]); y = nb2int(in_blk.c[1]);
    z = nb2int(in_blk.c[2]); w = nb2int(in_blk.c[3]);
    y = y + (w >>> 1); w = w - (y >>> 1);
    y = y + w; w = w <<< 1; w = w - y;
    z = z + x; x = x <<< 1; x = x - z;
    y = y + z; z = z <<< 1; z = z - y;
    w = w + x; x = x <<< 1; x = x - w;
    nxt = in_blk;
    if (!in_blk.raw) begin
      nxt.c[0] = x; nxt.c[1] = y; nxt.c[2] = z; nxt.c[3] = w;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= nxt;
    end
  end
endmodule
