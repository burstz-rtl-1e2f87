// tb_mem_arbiter: four endpoints against the DRAM model. Endpoints 0-2
// write bursts of random length into their own regions and read them back;
// write data is supplied slowly after the request, so the write-start rule
// (whole burst buffered first) is checked on the DRAM command stream.
// Endpoint 3 posts reads but refuses its read data for a long time: the read
// start rule must hold its third burst back while the others keep going,
// and no read buffer may overflow. Checks all read data, burst contiguity
// on the DRAM port, and that the others finish while endpoint 3 is stalled.
module tb_mem_arbiter;
  localparam int N = 4, AW = 25, DW = 256, LW = 9;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req_valid, req_ready, req_write, wr_valid, wr_ready, rd_valid, rd_ready, ep_idle;
  logic [N-1:0][AW-1:0] req_addr;
  logic [N-1:0][LW-1:0] req_len;
  logic [N-1:0][DW-1:0] wr_data, rd_data;
  logic dram_cmd_valid, dram_cmd_ready, dram_cmd_write, dram_rd_valid;
  logic [AW-1:0] dram_cmd_addr;
  logic [DW-1:0] dram_cmd_wdata, dram_rd_data;

  mem_arbiter #(.N_EP(N)) dut (.*);
  dram_model u_dram (.clk, .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready),
    .cmd_write(dram_cmd_write), .cmd_addr(dram_cmd_addr), .cmd_wdata(dram_cmd_wdata),
    .rd_valid(dram_rd_valid), .rd_data(dram_rd_data));

  function automatic logic [DW-1:0] pat(int ep, int a);
    return {8{32'(ep * 1000003 + a * 7919 + 5)}};
  endfunction

  // words pushed per endpoint, to check the write-start rule
  int pushed[N];
  int wr_cmds_seen[N];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) if (wr_valid[i] && wr_ready[i]) pushed[i]++;
    if (dram_cmd_valid && dram_cmd_ready && dram_cmd_write) begin
      int e;
      e = int'(dram_cmd_addr >> 20);
      wr_cmds_seen[e]++;
      checks++;
      if (wr_cmds_seen[e] > pushed[e]) failures++;
    end
  end

  // contiguity: a DRAM command either continues the last address or starts a burst
  int n_bursts_started = 0, n_breaks = 0;
  logic [AW-1:0] last_a = '0;
  always @(posedge clk) if (dram_cmd_valid && dram_cmd_ready) begin
    if (dram_cmd_addr != last_a + 1) n_breaks++;
    last_a <= dram_cmd_addr;
  end

  task automatic req(int ep, bit w, int a, int len);
    req_valid[ep] = 1; req_write[ep] = w; req_addr[ep] = AW'(a); req_len[ep] = LW'(len);
    @(negedge clk);
    while (!req_ready[ep]) @(negedge clk);
    @(posedge clk); #1;
    req_valid[ep] = 0;
    n_bursts_started++;
  endtask

  task automatic writer(int ep, int nb);
    int a = ep << 20;
    for (int b = 0; b < nb; b++) begin
      int len = 1 + int'($urandom % 256);
      req(ep, 1, a, len);
      for (int k = 0; k < len; k++) begin
        wr_valid[ep] = 1; wr_data[ep] = pat(ep, a + k);
        @(negedge clk);
        while (!wr_ready[ep]) @(negedge clk);
        @(posedge clk); #1;
        wr_valid[ep] = 0;
        if ($urandom % 3 == 0) @(posedge clk);
        #1;
      end
      a += len;
    end
  endtask

  int rd_words[N], rd_bad[N];
  task automatic reader(int ep, int nwords);
    int a = ep << 20;
    int left = nwords;
    while (left > 0) begin
      int len = (left > 200) ? 200 : left;
      req(ep, 0, a, len);
      a += len;
      left -= len;
    end
  endtask

  int exp_a[N];
  always @(posedge clk) for (int i = 0; i < N; i++) if (rd_valid[i] && rd_ready[i]) begin
    checks++;
    if (i < 3 && rd_data[i] !== pat(i, exp_a[i])) begin
      failures++;
      rd_bad[i]++;
    end
    exp_a[i]++;
    rd_words[i]++;
  end

  int total_w[N];
  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_len = 0; wr_valid = 0; wr_data = 0;
    rd_ready = 4'b0111;
    for (int i = 0; i < N; i++) exp_a[i] = i << 20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    fork
      writer(0, 6);
      writer(1, 6);
      writer(2, 6);
      begin reader(3, 200); reader(3, 200); reader(3, 200); end
    join_none
    // wait until the three writers are done and idle
    wait (pushed[0] > 0 && pushed[1] > 0 && pushed[2] > 0);
    repeat (50) @(posedge clk);
    while (!(ep_idle[0] && ep_idle[1] && ep_idle[2] && req_valid[2:0] == 0 && wr_valid[2:0] == 0)) @(posedge clk);
    repeat (20) @(posedge clk);
    while (!(ep_idle[0] && ep_idle[1] && ep_idle[2])) @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++) total_w[i] = pushed[i];
    // endpoint 3 still blocked: its third burst must not have been started
    checks++;
    if (dut.inflight[3] + dut.rb_count[3] > 512) failures++;
    checks++;
    if (dut.q_valid[3] !== 1'b1) begin
      failures++;
      $display("endpoint 3's third burst was started without read-buffer room");
    end
    // read everything back on endpoints 0..2
    fork
      reader(0, total_w[0]);
      reader(1, total_w[1]);
      reader(2, total_w[2]);
    join
    while (rd_words[0] < total_w[0] || rd_words[1] < total_w[1] || rd_words[2] < total_w[2])
      @(posedge clk);
    // now release endpoint 3
    rd_ready[3] = 1;
    while (rd_words[3] < 600) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (rd_words[i] != total_w[i]) failures++;
    end
    checks++;
    if (n_breaks > n_bursts_started) failures++;
    $display("bursts %0d, address breaks on the DRAM port %0d, row misses %0d, commands %0d",
             n_bursts_started, n_breaks, u_dram.n_row_miss, u_dram.n_cmds);
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
