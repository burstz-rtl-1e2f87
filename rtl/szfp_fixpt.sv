// szfp_fixpt: fixed-point conversion, the first stage of the sZFP compressor.
// Four doubles are normalised to the largest biased exponent of the block
// (emax) and cast to signed 64-bit integers scaled by 2^(62-emax+1022), the
// ZFP block-floating-point convention: a value with exponent e becomes
// its 53-bit significand shifted by 9-(emax-e). Subnormals and zeros are
// coded as 0. The original doubles travel along for the raw fallback.
// One registered stage with a valid/ready handshake: a block is accepted
// every cycle and appears one cycle later.
module szfp_fixpt
  import szfp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [255:0]   in_data,    // element i in bits 64*i+63 : 64*i
  input  logic           in_last,
  output logic           out_valid,
  input  logic           out_ready,
  output szfp_fix_t      out_blk,
  output logic           out_last
);
  szfp_fix_t nxt;

  always_comb begin
    logic [10:0] e [4];
    logic [10:0] em;
    logic [11:0] diff;
    u64_t        m;
    em = '0;
    for (int i = 0; i < 4; i++) begin
      e[i] = in_data[64*i+52 +: 11];
      if (e[i] > em) em = e[i];
    end
    nxt.emax = em;
    for (int i = 0; i < 4; i++) begin
      nxt.d[i] = in_data[64*i +: 64];
      diff = {1'b0, em} - {1'b0, e[i]};
      m    = {11'd0, 1'b1, in_data[64*i +: 52]};
      if (e[i] == 0) m = '0;
      else if (diff <= 12'd9) m = m << (12'd9 - diff);
      else if (diff >= 12'd73) m = '0;
      else m = m >> (diff - 12'd9);
      nxt.c[i] = in_data[64*i+63] ? (~m + 64'd1) : m;
    end
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
