// tb_szfp_decompressor: feeds reference-packed chunk streams to the
// five-decoder decompressor and checks each output word against the
// reference decompression, and that every decompressed value lies within
// the error bound 2^minexp of the original (raw blocks must be exact).
// It also measures the output rate for easily compressed data, where the
// decoders together must keep up with one word per cycle.
module tb_szfp_decompressor;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic signed [11:0] minexp;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [255:0] in_data, out_data;

  szfp_decompressor dut (.*);

  logic [255:0] exp_w[$], orig_w[$];
  int n_out, t_first, t_last, t_half, n_half;
  real max_err;
  always @(posedge clk) if (out_valid && out_ready) begin
    logic [255:0] e, o;
    e = exp_w.pop_front();
    o = orig_w.pop_front();
    if (n_out == 0) t_first = cyc;
    t_last = cyc;
    if (n_out == n_half) t_half = cyc;
    n_out++;
    checks++;
    if (out_data !== e) begin
      failures++;
      if (failures < 5) $display("word %0d: %h expected %h", n_out, out_data, e);
    end
    for (int i = 0; i < 4; i++) begin
      real a, b, err;
      a = $bitstoreal(out_data[64*i +: 64]);
      b = $bitstoreal(o[64*i +: 64]);
      err = (a > b) ? a - b : b - a;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 2.0 ** real'(minexp)) begin
        failures++;
        if (failures < 5) $display("word %0d elem %0d: error %g above bound", n_out, i, err);
      end
    end
  end

  task automatic run(int kind, int nblk, int mexp, bit check_rate);
    bitq_t blocks[$];
    word_t words[$];
    minexp = 12'(mexp);
    n_out = 0; max_err = 0.0; n_half = nblk / 2;
    for (int k = 0; k < nblk; k++) begin
      logic [63:0] d[4];
      for (int i = 0; i < 4; i++) d[i] = ref_value(4 * k + i, kind);
      blocks.push_back(ref_compress(d, mexp));
      exp_w.push_back(ref_decompress(d, mexp));
      orig_w.push_back({d[3], d[2], d[1], d[0]});
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
    while (exp_w.size() != 0) @(posedge clk);
    #1;
    $display("kind %0d minexp %0d: %0d blocks from %0d chunks, output over %0d cycles, max error %g",
             kind, mexp, nblk, words.size() / 192, t_last - t_first + 1, max_err);
    if (check_rate) begin
      checks++;
      $display("second half of the output: %0d blocks in %0d cycles", nblk - n_half, t_last - t_half);
      if (t_last - t_half > (nblk - n_half) + 8) failures++;
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; minexp = -10; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(1, 3000, -10, 1);
    run(1, 1500, -20, 0);
    run(2, 400, -10, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
