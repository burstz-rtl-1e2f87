// szfp_float_conv: float conversion, the last stage of the sZFP decompressor.
// Each signed 64-bit fixed-point value v of a block with exponent emax is
// turned back into the double v * 2^(emax-1084): the magnitude's leading one
// at bit L gives the biased exponent L+emax-61, and the 52 bits below it form
// the fraction (truncated). Results below the normal range become zero. Raw
// blocks already hold doubles and pass unchanged. One registered stage with a
// valid/ready handshake, one 256-bit word of four doubles per cycle.
module szfp_float_conv
  import szfp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  szfp_blk_t    in_blk,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [255:0] out_data
);
  logic [255:0] nxt;

  always_comb begin
    u64_t        a;
    u64_t        f;
    int          l;
    logic [12:0] e;
    for (int i = 0; i < 4; i++) begin
      a = in_blk.c[i][63] ? (~in_blk.c[i] + 64'd1) : in_blk.c[i];
      l = 0;
      for (int b = 0; b < 64; b++) if (a[b]) l = b;
      e = 13'(l) + {2'b00, in_blk.emax} - 13'd61;
      f = (l >= 52) ? (a >> (l - 52)) : (a << (52 - l));
      if (a == 0 || e[12] || e == 0) nxt[64*i +: 64] = 64'd0;
      else nxt[64*i +: 64] = {in_blk.c[i][63], e[10:0], f[51:0]};
      if (in_blk.raw) nxt[64*i +: 64] = in_blk.c[i];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= nxt;
    end
  end
endmodule
