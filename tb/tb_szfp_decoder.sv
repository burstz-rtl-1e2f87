// tb_szfp_decoder: packs reference-coded blocks of several data kinds and
// error bounds into 6 KB chunks, feeds them to one decoder and checks every
// decoded block (raw flag, exponent and the truncated negabinary
// coefficients) and that exactly the last block of each chunk carries the
// last flag. The consumer stalls at random to exercise the output buffer.
module tb_szfp_decoder;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [11:0] minexp;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [255:0] in_data;
  szfp_blk_t out_blk;

  szfp_decoder dut (.*);

  szfp_blk_t exp_blk[$];
  bit        exp_last[$];
  int        n_out;
  always @(posedge clk) out_ready <= ($urandom % 4 != 0);

  always @(posedge clk) if (out_valid && out_ready) begin
    szfp_blk_t e;
    bit l;
    e = exp_blk.pop_front();
    l = exp_last.pop_front();
    n_out++;
    checks++;
    if (out_blk !== e || out_last !== l) begin
      failures++;
      if (failures < 5) $display("block %0d: got raw %b emax %h last %b, expected raw %b emax %h last %b",
                                 n_out, out_blk.raw, out_blk.emax, out_last, e.raw, e.emax, l);
    end
  end

  task automatic run(int kind, int nblk, int mexp);
    bitq_t blocks[$];
    word_t words[$];
    int bits_in_chunk;
    minexp = 12'(mexp);
    bits_in_chunk = 0;
    for (int k = 0; k < nblk; k++) begin
      logic [63:0] d[4], c[4];
      int emax, p6;
      szfp_blk_t e;
      for (int i = 0; i < 4; i++) d[i] = ref_value(4 * k + i, kind);
      blocks.push_back(ref_compress(d, mexp));
      // expected decoder output and chunk-end flags, from the same rule
      if (bits_in_chunk + blocks[k].size() + 12 > 49152) begin
        exp_last[$] = 1;
        bits_in_chunk = 0;
      end
      bits_in_chunk += blocks[k].size();
      ref_fix(d, emax, c);
      ref_fwd(c);
      p6 = ref_p6(emax, mexp);
      e.raw = (p6 == 63);
      e.emax = 11'(emax);
      for (int i = 0; i < 4; i++)
        e.c[i] = e.raw ? d[i] : (p6 == 0 ? 64'd0 : (c[i] >> (64 - p6)) << (64 - p6));
      exp_blk.push_back(e);
      exp_last.push_back(k == nblk - 1);
    end
    ref_pack(blocks, words);
    foreach (words[w]) begin
      in_data = words[w];
      in_valid = 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk); #1;
    end
    in_valid = 0;
    while (exp_blk.size() != 0) @(posedge clk);
    #1;
    $display("kind %0d minexp %0d: %0d blocks in %0d chunks decoded", kind, mexp, nblk, words.size() / 192);
  endtask

  initial begin
    in_valid = 0; in_data = 0; minexp = -10; n_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(1, 1200, -20);
    run(0, 2500, -10);
    run(2, 500, -10);
    run(1, 200, 0);
    checks++;
    if (n_out != 4400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
