// tb_szfp_compressor: streams blocks of three data kinds (smooth, noisy,
// widely varying exponents, which exercise the raw fallback) through the
// compressor at three error bounds and compares every output word with the
// bit-serial reference packer, including chunk and stream flags. Enough
// data is sent to fill several chunks, so chunk closing is covered. Also
// checks that smooth data is compressed at one block per cycle.
module tb_szfp_compressor;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic signed [11:0] minexp;
  logic in_valid, in_ready, in_last;
  logic [255:0] in_data;
  logic out_valid, out_ready, out_chunk_last, out_stream_last;
  logic [255:0] out_data;

  szfp_compressor dut (.*);

  word_t got[$];
  int    n_chunk_last, n_stream_last;
  always @(posedge clk) if (out_valid && out_ready) begin
    got.push_back(out_data);
    if (out_chunk_last) n_chunk_last++;
    if (out_stream_last) n_stream_last++;
  end

  task automatic run(int kind, int nblk, int mexp, bit check_rate);
    bitq_t blocks[$];
    word_t exp_w[$];
    logic [63:0] d[4];
    int t0, t1;
    got.delete(); n_chunk_last = 0; n_stream_last = 0;
    minexp = 12'(mexp);
    out_ready = 1;
    t0 = cyc;
    for (int k = 0; k < nblk; k++) begin
      for (int i = 0; i < 4; i++) d[i] = ref_value(4 * k + i, kind);
      blocks.push_back(ref_compress(d, mexp));
      in_data = {d[3], d[2], d[1], d[0]};
      in_last = (k == nblk - 1);
      in_valid = 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk); #1;
    end
    in_valid = 0;
    t1 = cyc;
    ref_pack(blocks, exp_w);
    while (n_stream_last == 0) @(posedge clk);
    @(posedge clk); #1;
    checks++;
    if (got.size() != exp_w.size()) begin
      failures++;
      $display("kind %0d: %0d words, expected %0d", kind, got.size(), exp_w.size());
    end
    for (int w = 0; w < exp_w.size() && w < got.size(); w++) begin
      checks++;
      if (got[w] !== exp_w[w]) begin
        failures++;
        if (failures < 5) begin
          int fb;
          fb = -1;
          for (int b = 255; b >= 0; b--) if (got[w][b] !== exp_w[w][b]) fb = b;
          $display("kind %0d word %0d differs from bit %0d (stream bit %0d)", kind, w, fb, 256*w+fb);
        end
      end
    end
    checks++;
    if (n_chunk_last != exp_w.size() / 192) failures++;
    if (check_rate) begin
      checks++;
      if (t1 - t0 > nblk + nblk / 16) begin
        failures++;
        $display("rate: %0d cycles for %0d blocks", t1 - t0, nblk);
      end
    end
    $display("kind %0d minexp %0d: %0d blocks -> %0d words (%0d chunks), input took %0d cycles",
             kind, mexp, nblk, got.size(), got.size() / 192, t1 - t0, nblk);
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = 0; out_ready = 1; minexp = -10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(0, 2000, -10, 1);
    run(1, 1500, -20, 0);
    run(2, 600, -10, 0);
    run(1, 300, 0, 0);
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
