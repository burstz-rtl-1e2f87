// tb_szfp_xform: checks the forward transform (with negabinary mapping)
// and the inverse transform against the reference lifting model on random
// blocks of 62-bit fixed-point values, that raw blocks pass the inverse stage
// unchanged, and that inverse(forward(x)) returns x to within a few units of
// the last place (the forward lifting drops low bits).
module tb_szfp_xform;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      f_out_valid, i_out_valid, f_ready, i_ready;
  szfp_fix_t f_in, f_out;
  szfp_blk_t i_in, i_out;
  logic      f_last;

  szfp_fwd_xform u_fwd (.clk, .rst_n, .in_valid(1'b1), .in_ready(f_ready), .in_blk(f_in),
    .in_last(1'b0), .out_valid(f_out_valid), .out_ready(1'b1), .out_blk(f_out), .out_last(f_last));
  szfp_inv_xform u_inv (.clk, .rst_n, .in_valid(1'b1), .in_ready(i_ready), .in_blk(i_in),
    .out_valid(i_out_valid), .out_ready(1'b1), .out_blk(i_out));

  initial begin
    f_in = '0; i_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      logic [63:0] x[4], y[4], z[4];
      for (int i = 0; i < 4; i++) begin
        x[i] = {$urandom, $urandom};
        x[i] = $signed(x[i]) >>> (2 + $urandom % 62);
        f_in.c[i] = x[i];
        y[i] = x[i];
      end
      ref_fwd(y);
      i_in.raw = (k % 7 == 0);
      for (int i = 0; i < 4; i++) i_in.c[i] = y[i];
      z = y;
      if (!i_in.raw) ref_inv(z);
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        longint dlt;
        checks += 2;
        if (!f_out_valid || f_out.c[i] !== y[i]) failures++;
        if (!i_out_valid || i_out.c[i] !== z[i]) failures++;
        if (!i_in.raw) begin
          dlt = longint'(z[i]) - longint'(x[i]);
          checks++;
          if (dlt > 4 || dlt < -4) begin
            failures++;
            if (failures < 5) $display("round trip elem %0d off by %0d", i, dlt);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
