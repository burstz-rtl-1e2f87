// tb_szfp_fixpt: checks the two number-format stages. The fixed-point
// converter is fed random blocks (mixed signs, exponents spread over a wide
// range, zeros) and compared with a real-arithmetic reference; the float
// converter is fed random fixed-point values and compared with an integer
// normalisation reference, and raw blocks must pass unchanged. Both stages
// must deliver one block per cycle with one cycle of latency.
module tb_szfp_fixpt;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         a_in_valid, a_in_ready, a_in_last, a_out_valid, a_out_last;
  logic [255:0] a_in_data;
  szfp_fix_t    a_out_blk;
  logic         b_in_valid, b_in_ready, b_out_valid;
  szfp_blk_t    b_in_blk;
  logic [255:0] b_out_data;

  szfp_fixpt u_fix (.clk, .rst_n, .in_valid(a_in_valid), .in_ready(a_in_ready),
    .in_data(a_in_data), .in_last(a_in_last), .out_valid(a_out_valid), .out_ready(1'b1),
    .out_blk(a_out_blk), .out_last(a_out_last));
  szfp_float_conv u_flt (.clk, .rst_n, .in_valid(b_in_valid), .in_ready(b_in_ready),
    .in_blk(b_in_blk), .out_valid(b_out_valid), .out_ready(1'b1), .out_data(b_out_data));

  initial begin
    a_in_valid = 0; b_in_valid = 0; a_in_last = 0; a_in_data = 0; b_in_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 2000; k++) begin
      logic [63:0] d[4], c[4], v;
      int emax;
      for (int i = 0; i < 4; i++) begin
        d[i] = {$urandom, $urandom};
        d[i][62:52] = 11'(1000 + $urandom % 100);
        if ($urandom % 8 == 0) d[i][62:0] = '0;
      end
      ref_fix(d, emax, c);
      a_in_data = {d[3], d[2], d[1], d[0]};
      a_in_last = k[0];
      a_in_valid = 1;
      // float conversion input
      b_in_blk.raw  = (k % 10 == 0);
      b_in_blk.emax = 11'(1000 + $urandom % 100);
      for (int i = 0; i < 4; i++) b_in_blk.c[i] = {$urandom, $urandom} >>> ($urandom % 64);
      b_in_valid = 1;
      @(posedge clk); #1;
      checks++;
      if (!a_out_valid || a_out_blk.emax !== 11'(emax) || a_out_last !== k[0]) failures++;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (a_out_blk.c[i] !== c[i] || a_out_blk.d[i] !== d[i]) begin
          failures++;
          if (failures < 5) $display("fixpt blk %0d elem %0d: %h expected %h", k, i, a_out_blk.c[i], c[i]);
        end
        v = b_in_blk.raw ? b_in_blk.c[i] : ref_float(b_in_blk.c[i], int'(b_in_blk.emax));
        checks++;
        if (!b_out_valid || b_out_data[64*i +: 64] !== v) begin
          failures++;
          if (failures < 5) $display("float blk %0d elem %0d: %h expected %h", k, i, b_out_data[64*i +: 64], v);
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
