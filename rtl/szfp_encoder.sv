// szfp_encoder: one sZFP embedded-coding pipeline. Codes one transformed
// block (negabinary coefficients) into a variable-length bit string of at
// most 257 bits, one region per cycle:
//   cycle 1 (blue)  raw flag, emax and the top P6 planes of element 0; a raw
//                   block (more than 48 planes needed) is finished here
//   cycle 2 (green) groups 0..3 of elements 1..3, each a 2-bit header plus
//                   the non-zero prefix of its three 6-bit slices
//   cycle 3 (red)   groups 4..7, only when P6 > 24
// so a block takes one to three cycles, as in the source design; several
// encoders run in parallel to reach one block per cycle. The coded bits are
// LSB first in out_bits, out_len gives their number. minexp is log2 of the
// absolute error bound and must stay constant over a stream.
module szfp_encoder
  import szfp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [11:0]  minexp,
  input  logic                in_valid,
  output logic                in_ready,
  input  szfp_fix_t           in_blk,
  input  logic                in_last,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [256:0]        out_bits,
  output logic [8:0]          out_len,
  output logic                out_last
);
  typedef enum logic [1:0] {S_BLUE, S_GREEN, S_RED} state_t;
  state_t      state;
  szfp_fix_t   blk;
  logic        last_q;
  logic [5:0]  p6_q;
  logic [256:0] acc;
  logic [8:0]   len;

  // Groups lo..hi-1 of elements 1..3, concatenated LSB first.
  function automatic void region(input szfp_fix_t b, input int lo, input int hi,
                                 output logic [79:0] f, output logic [6:0] flen);
    logic [5:0] s1, s2, s3;
    logic [1:0] h;
    logic [19:0] g;
    f = '0; flen = '0;
    for (int k = lo; k < lo + 4; k++) begin
      if (k < hi) begin
        s1 = 6'(b.c[1] >> (58 - 6*k));
        s2 = 6'(b.c[2] >> (58 - 6*k));
        s3 = 6'(b.c[3] >> (58 - 6*k));
        h  = grp_hdr(s1, s2, s3);
        g  = {s3, s2, s1, h};
        g  = g & ((20'd1 << (7'd2 + 7'd6 * 7'(h))) - 20'd1);
        f  = f | (80'(g) << flen);
        flen = flen + 7'd2 + 7'd6 * 7'(h);
      end
    end
  endfunction

  logic [5:0]  p6_in;
  logic        can_out;
  logic [79:0] rf;
  logic [6:0]  rlen;
  logic [256:0] blue_bits;
  logic [8:0]   blue_len;

  assign p6_in   = planes6(in_blk.emax, minexp);
  assign can_out = !out_valid || out_ready;
  assign in_ready = (state == S_BLUE) && can_out;

  always_comb begin
    u64_t r1;
    r1 = (p6_in == 0 || p6_in == 63) ? '0 : (in_blk.c[0] >> (7'd64 - 7'(p6_in)));
    if (p6_in == 63) begin
      blue_bits = {in_blk.d, 1'b1};
      blue_len  = 9'd257;
    end else begin
      blue_bits = 257'({r1, in_blk.emax, 1'b0});
      blue_len  = 9'd12 + 9'(p6_in);
    end
    if (state == S_GREEN) region(blk, 0, int'(p6_q) / 6, rf, rlen);
    else                  region(blk, 4, int'(p6_q) / 6, rf, rlen);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_BLUE;
      blk       <= '0;
      last_q    <= 1'b0;
      p6_q      <= '0;
      acc       <= '0;
      len       <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_len   <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state)
        S_BLUE: if (in_valid && in_ready) begin
          if (p6_in == 0 || p6_in == 63) begin
            out_valid <= 1'b1;
            out_bits  <= blue_bits;
            out_len   <= blue_len;
            out_last  <= in_last;
          end else begin
            blk    <= in_blk;
            last_q <= in_last;
            p6_q   <= p6_in;
            acc    <= blue_bits;
            len    <= blue_len;
            state  <= S_GREEN;
          end
        end
        S_GREEN: begin
          if (p6_q > 6'd24) begin
            acc   <= acc | (257'(rf) << len);
            len   <= len + 9'(rlen);
            state <= S_RED;
          end else if (can_out) begin
            out_valid <= 1'b1;
            out_bits  <= acc | (257'(rf) << len);
            out_len   <= len + 9'(rlen);
            out_last  <= last_q;
            state     <= S_BLUE;
          end
        end
        default: if (can_out) begin
          out_valid <= 1'b1;
          out_bits  <= acc | (257'(rf) << len);
          out_len   <= len + 9'(rlen);
          out_last  <= last_q;
          state     <= S_BLUE;
        end
      endcase
    end
  end
endmodule
