// tb_szfp_encoder: drives random transformed blocks (random exponents and
// coefficients with random numbers of leading zeros, so every header value,
// plane count and the raw fallback occur) into one encoder and compares the
// coded bits and length with the bit-serial reference coder. Also checks the
// cycle count per block: one cycle for raw or zero-plane blocks, two when the
// green region suffices and three when the red region is needed.
module tb_szfp_encoder;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic signed [11:0] minexp;
  logic in_valid, in_ready, in_last;
  szfp_fix_t in_blk;
  logic out_valid, out_ready, out_last;
  logic [256:0] out_bits;
  logic [8:0] out_len;

  szfp_encoder dut (.*);

  int n_cyc[4];
  initial begin
    in_valid = 0; in_last = 0; in_blk = '0; out_ready = 1; minexp = -10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 3000; k++) begin
      logic [63:0] nb[4], d[4];
      int emax, mexp, p6, t0, ncyc, expc;
      bitq_t q;
      mexp = int'($urandom % 60) - 40;
      emax = (k % 50 == 0) ? 0 : 1000 + int'($urandom % 60);
      for (int i = 0; i < 4; i++) begin
        nb[i] = {$urandom, $urandom} >> ($urandom % 64);
        d[i]  = {$urandom, $urandom};
      end
      p6 = ref_p6(emax, mexp);
      q = ref_encode(emax, nb, d, mexp);
      minexp = 12'(mexp);
      in_blk.emax = 11'(emax);
      for (int i = 0; i < 4; i++) begin in_blk.c[i] = nb[i]; in_blk.d[i] = d[i]; end
      in_last = k[0];
      in_valid = 1;
      t0 = cyc;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk); #1;
      in_valid = 0;
      while (!out_valid) @(posedge clk);
      ncyc = cyc - t0;
      expc = (p6 == 0 || p6 == 63) ? 1 : (p6 <= 24 ? 2 : 3);
      checks++;
      if (out_len != 9'(q.size())) begin
        failures++;
        $display("blk %0d p6 %0d: len %0d expected %0d", k, p6, out_len, q.size());
      end else begin
        for (int b = 0; b < q.size(); b++) if (out_bits[b] !== q[b]) begin
          failures++;
          $display("blk %0d p6 %0d: bit %0d differs", k, p6, b);
          break;
        end
      end
      checks++;
      if (out_last !== k[0]) failures++;
      checks++;
      if (ncyc != expc) begin
        failures++;
        $display("blk %0d p6 %0d: %0d cycles, expected %0d", k, p6, ncyc, expc);
      end
      n_cyc[expc]++;
      @(posedge clk); #1;
    end
    $display("blocks taking 1/2/3 cycles: %0d %0d %0d", n_cyc[1], n_cyc[2], n_cyc[3]);
    checks++;
    if (n_cyc[1] == 0 || n_cyc[2] == 0 || n_cyc[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
