// tb_burstz_top: one complete stencil step through the whole accelerator.
// Three planes of a smooth field with sparse very large cells (which force
// raw blocks) are compressed by the reference coder, written into DRAM
// through the host-to-card endpoint, then the engine is started: the three
// decompressors read and expand the planes, the engine updates the middle
// plane and the compressor stores the result. The host reads the result back
// through the card-to-host endpoint and decodes it with the reference
// decoder; every cell is compared with a real-arithmetic stencil over the
// decompressed inputs, within the error bound. Counts how often each
// mechanism occurred (raw blocks, red-region encodes, chunk changes across
// all decoders, arbiter write and read holds, engine input stalls, shuffler
// chunk closing) and fails if any never did. The grid size is a run-time
// setting (localparams RW, NY below); the design's parameters stay at their
// defaults, so this is also the full-size test.
module tb_burstz_top;
  import szfp_pkg::*;
  import szfp_ref_pkg::*;
  import stencil_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int RW = 16, NX = 4 * RW, NY = 160, MINEXP = -20;
  localparam int AW = 25;

  logic start, done;
  logic signed [11:0] minexp;
  logic [8:0] row_words;
  logic [15:0] n_rows, out_chunks;
  logic [63:0] c0, c1;
  logic [2:0][AW-1:0] src_base;
  logic [2:0][15:0] src_chunks;
  logic [AW-1:0] dst_base;
  logic [1:0] host_req_valid, host_req_ready, host_req_write, host_wr_valid, host_wr_ready;
  logic [1:0] host_rd_valid, host_rd_ready, host_idle;
  logic [1:0][AW-1:0] host_req_addr;
  logic [1:0][8:0] host_req_len;
  logic [1:0][255:0] host_wr_data, host_rd_data;
  logic dram_cmd_valid, dram_cmd_ready, dram_cmd_write, dram_rd_valid;
  logic [AW-1:0] dram_cmd_addr;
  logic [255:0] dram_cmd_wdata, dram_rd_data;

  burstz_top dut (.*);
  dram_model u_dram (.clk, .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready),
    .cmd_write(dram_cmd_write), .cmd_addr(dram_cmd_addr), .cmd_wdata(dram_cmd_wdata),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data));

  // ---------------- mechanism counters ----------------
  int n_raw_in, n_red, n_dec_switch, n_wr_hold, n_rd_hold, n_eng_stall, n_close;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_plane[0].u_dec.c_valid && dut.g_plane[0].u_dec.c_ready && dut.g_plane[0].u_dec.c_blk.raw)
      n_raw_in++;
    if (dut.u_comp.g_enc[0].u_enc.state == 2'd2) n_red++;
    if (dut.g_plane[1].u_dec.c_valid && dut.g_plane[1].u_dec.c_ready && dut.g_plane[1].u_dec.d_out_last[dut.g_plane[1].u_dec.csel])
      n_dec_switch++;
    // a write burst waiting for its data, a read burst waiting for buffer room
    if (dut.u_arb.q_valid[0] && !dut.u_arb.eligible[0]) n_wr_hold++;
    if ((dut.u_arb.q_valid[4:1] & ~dut.u_arb.eligible[4:1]) != 0) n_rd_hold++;
    if (dut.u_eng.in_valid != 3'b111 && dut.u_eng.in_valid != 3'b000) n_eng_stall++;
    if (dut.u_comp.u_shuf.state == 2'd0 && dut.u_comp.u_shuf.b_valid && dut.u_comp.u_shuf.nofit &&
        dut.u_comp.u_shuf.fill_e < 10'd256) n_close++;
  end

  // ---------------- host side ----------------
  word_t w[$];    // words for host_write
  task automatic host_write(int addr);
    for (int ch = 0; ch < w.size() / 192; ch++) begin
      host_req_valid[0] = 1; host_req_write[0] = 1;
      host_req_addr[0] = AW'(addr + 192 * ch); host_req_len[0] = 9'd192;
      @(negedge clk);
      while (!host_req_ready[0]) @(negedge clk);
      @(posedge clk); #1;
      host_req_valid[0] = 0;
      for (int k = 0; k < 192; k++) begin
        host_wr_valid[0] = 1; host_wr_data[0] = w[192 * ch + k];
        @(negedge clk);
        while (!host_wr_ready[0]) @(negedge clk);
        @(posedge clk); #1;
      end
      host_wr_valid[0] = 0;
    end
    while (!host_idle[0]) @(posedge clk);
    #1;
  endtask

  word_t rd_q[$];
  always @(posedge clk) if (host_rd_valid[1] && host_rd_ready[1]) rd_q.push_back(host_rd_data[1]);

  task automatic host_read(int addr, int nwords);
    // the host starts taking data late: later bursts wait for read-buffer room
    fork
      begin repeat (600) @(posedge clk); #1; host_rd_ready[1] = 1; end
    join_none
    for (int ch = 0; ch < nwords / 192; ch++) begin
      host_req_valid[1] = 1; host_req_write[1] = 0;
      host_req_addr[1] = AW'(addr + 192 * ch); host_req_len[1] = 9'd192;
      @(negedge clk);
      while (!host_req_ready[1]) @(negedge clk);
      @(posedge clk); #1;
      host_req_valid[1] = 0;
    end
    while (rd_q.size() < nwords) @(posedge clk);
    #1;
  endtask

  real g[3][][];
  initial begin
    word_t comp[3][$];
    word_t dec_in[$], res[$];
    int n_raw_out, t0, t1;
    real c0r, c1r, max_err;
    c0r = 1.0 - 6.0 * 0.125; c1r = 0.125;
    start = 0; minexp = 12'(MINEXP); row_words = 9'(RW); n_rows = 16'(NY);
    c0 = $realtobits(c0r); c1 = $realtobits(c1r);
    host_req_valid = 0; host_req_write = 0; host_req_addr = 0; host_req_len = 0;
    host_wr_valid = 0; host_wr_data = 0; host_rd_ready = 2'b00;
    dst_base = AW'(3 << 16);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // build, compress and load the three planes
    for (int p = 0; p < 3; p++) begin
      bitq_t blocks[$];
      blocks.delete();
      g[p] = new[NY];
      for (int y = 0; y < NY; y++) begin
        g[p][y] = new[NX];
        for (int x = 0; x < NX; x++) begin
          g[p][y][x] = 20.0 * $sin(0.09 * x + 0.3 * p) * $cos(0.05 * y) + 0.5 * p;
          if ((x * 7 + y * 13 + p) % 211 == 0) g[p][y][x] = 3.0e7;
        end
      end
      for (int y = 0; y < NY; y++)
        for (int xw = 0; xw < RW; xw++) begin
          logic [63:0] d[4];
          for (int i = 0; i < 4; i++) d[i] = $realtobits(g[p][y][4*xw+i]);
          blocks.push_back(ref_compress(d, MINEXP));
        end
      ref_pack(blocks, comp[p]);
      src_base[p] = AW'(p << 16);
      src_chunks[p] = 16'(comp[p].size() / 192);
      w = comp[p];
      host_write(p << 16);
      // what the engine will see: the decompressed plane
      dec_in.delete();
      begin int nr; nr = 0; ref_unpack(comp[p], MINEXP, dec_in, nr); end
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) g[p][y][x] = $bitstoreal(dec_in[y * RW + x / 4][64*(x%4) +: 64]);
      $display("plane %0d: %0d chunks", p, src_chunks[p]);
    end
    // run one sweep step
    t0 = cyc;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) @(posedge clk);
    t1 = cyc;
    #1;
    $display("stencil step: %0d cells in %0d cycles, %0d output chunks", NX * NY, t1 - t0, out_chunks);
    host_read(3 << 16, out_chunks * 192);
    n_raw_out = 0;
    ref_unpack(rd_q, MINEXP, res, n_raw_out);
    checks++;
    if (res.size() != NX * NY / 4) begin
      failures++;
      $display("%0d words decoded, expected %0d", res.size(), NX * NY / 4);
    end
    max_err = 0;
    for (int k = 0; k < res.size() && k < NX * NY / 4; k++)
      for (int i = 0; i < 4; i++) begin
        real a, b, e;
        int x, y;
        y = k / RW; x = 4 * (k % RW) + i;
        a = $bitstoreal(res[k][64*i +: 64]);
        b = ref_cell(g, NX, NY, x, y, c0r, c1r);
        e = (a > b) ? a - b : b - a;
        if (e > max_err && (b < 1e6 && b > -1e6)) max_err = e;
        checks++;
        if (e > 2.0 ** MINEXP + 1e-12 * ((b > 0) ? b : -b)) begin
          failures++;
          if (failures < 6) $display("cell (%0d,%0d): %g expected %g", x, y, a, b);
        end
      end
    $display("max error on ordinary cells %g (bound %g)", max_err, 2.0 ** MINEXP);
    $display("mechanisms: raw blocks in %0d / out %0d, red-region encodes %0d, decoder changes %0d,",
             n_raw_in, n_raw_out, n_red, n_dec_switch);
    $display("  write holds %0d, read holds %0d, engine input stalls %0d, chunk closes %0d",
             n_wr_hold, n_rd_hold, n_eng_stall, n_close);
    checks += 8;
    if (n_raw_in == 0) failures++;
    if (n_raw_out == 0) failures++;
    if (n_red == 0) failures++;
    if (n_dec_switch < 5) failures++;
    if (n_wr_hold == 0) failures++;
    if (n_rd_hold == 0) failures++;
    if (n_eng_stall == 0) failures++;
    if (n_close == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
