// mem_arbiter: burst-based arbiter giving N_EP endpoints shared access to
// one DRAM port. Every endpoint has a request queue, a write-data buffer and a
// read-data buffer. An endpoint first posts a burst request (direction, word
// address, length in 256-bit words); the scheduler serves whole bursts, so the
// DRAM sees long sequential runs even when many endpoints stream at once. A
// burst is started only when it can finish: a read when the endpoint's read
// buffer has room for the whole burst (counting data still in flight), a write
// when the endpoint's write buffer already holds all of its data. A slow or
// misbehaving endpoint therefore cannot stall the DRAM port or the others.
// Among eligible endpoints the scheduler picks round-robin after the last one
// served. The DRAM port issues one word command per cycle (valid/ready) and
// returns read data in order, rdv-qualified, a fixed or variable number of
// cycles later; a tag queue routes returning words to their endpoint.
// The burst interface, the per-endpoint buffers, the start rule and the
// compile-time endpoint count follow the source design; the buffer depths,
// round-robin choice and the word-level DRAM port are this design's choices.
module mem_arbiter #(
  parameter int N_EP       = 6,
  parameter int DATA_W     = 256,
  parameter int ADDR_W     = 25,     // word address: 1 GB of 32-byte words
  parameter int LEN_W      = 9,      // burst length 1..256 words (8 KB)
  parameter int REQ_DEPTH  = 4,
  parameter int WBUF_DEPTH = 512,
  parameter int RBUF_DEPTH = 512,
  parameter int TAG_DEPTH  = 64      // read words in flight in the DRAM
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // endpoint side
  input  logic [N_EP-1:0]                req_valid,
  output logic [N_EP-1:0]                req_ready,
  input  logic [N_EP-1:0]                req_write,
  input  logic [N_EP-1:0][ADDR_W-1:0]    req_addr,
  input  logic [N_EP-1:0][LEN_W-1:0]     req_len,
  input  logic [N_EP-1:0]                wr_valid,
  output logic [N_EP-1:0]                wr_ready,
  input  logic [N_EP-1:0][DATA_W-1:0]    wr_data,
  output logic [N_EP-1:0]                rd_valid,
  input  logic [N_EP-1:0]                rd_ready,
  output logic [N_EP-1:0][DATA_W-1:0]    rd_data,
  output logic [N_EP-1:0]                ep_idle,
  // DRAM side
  output logic                           dram_cmd_valid,
  input  logic                           dram_cmd_ready,
  output logic                           dram_cmd_write,
  output logic [ADDR_W-1:0]              dram_cmd_addr,
  output logic [DATA_W-1:0]              dram_cmd_wdata,
  input  logic                           dram_rd_valid,
  input  logic [DATA_W-1:0]              dram_rd_data
);
  localparam int EPW = (N_EP > 1) ? $clog2(N_EP) : 1;
  localparam int RQW = 1 + ADDR_W + LEN_W;
  localparam int WCW = $clog2(WBUF_DEPTH + 1);
  localparam int RCW = $clog2(RBUF_DEPTH + 1);
  localparam int TCW = $clog2(TAG_DEPTH + 1);

  // ---------------- per-endpoint queues ----------------
  logic [N_EP-1:0]          q_valid, q_pop, wb_valid, wb_pop, rb_push;
  logic [N_EP-1:0][RQW-1:0] q_data;
  logic [N_EP-1:0][DATA_W-1:0] wb_data;
  logic [WCW-1:0]           wb_count [N_EP];
  logic [RCW-1:0]           rb_count [N_EP];
  logic [RCW-1:0]           inflight [N_EP];
  logic [$clog2(REQ_DEPTH+1)-1:0] q_count [N_EP];
  logic [N_EP-1:0]          rb_wready;

  for (genvar i = 0; i < N_EP; i++) begin : g_ep
    sync_fifo #(.W(RQW), .DEPTH(REQ_DEPTH)) u_req (
      .clk, .rst_n,
      .wr_valid(req_valid[i]), .wr_ready(req_ready[i]),
      .wr_data({req_write[i], req_addr[i], req_len[i]}),
      .rd_valid(q_valid[i]), .rd_ready(q_pop[i]), .rd_data(q_data[i]), .count(q_count[i])
    );
    sync_fifo #(.W(DATA_W), .DEPTH(WBUF_DEPTH)) u_wbuf (
      .clk, .rst_n,
      .wr_valid(wr_valid[i]), .wr_ready(wr_ready[i]), .wr_data(wr_data[i]),
      .rd_valid(wb_valid[i]), .rd_ready(wb_pop[i]), .rd_data(wb_data[i]), .count(wb_count[i])
    );
    sync_fifo #(.W(DATA_W), .DEPTH(RBUF_DEPTH)) u_rbuf (
      .clk, .rst_n,
      .wr_valid(rb_push[i]), .wr_ready(rb_wready[i]), .wr_data(dram_rd_data),
      .rd_valid(rd_valid[i]), .rd_ready(rd_ready[i]), .rd_data(rd_data[i]), .count(rb_count[i])
    );
  end

  // ---------------- scheduler ----------------
  logic              busy, cur_write;
  logic [EPW-1:0]    cur_ep, rr;
  logic [ADDR_W-1:0] cur_addr;
  logic [LEN_W-1:0]  remain;
  logic [N_EP-1:0]   eligible;
  logic              grant;
  logic [EPW-1:0]    gnt_ep;

  always_comb begin
    for (int i = 0; i < N_EP; i++) begin
      logic             w;
      logic [LEN_W-1:0] l;
      w = q_data[i][RQW-1];
      l = q_data[i][LEN_W-1:0];
      eligible[i] = q_valid[i] &&
        (w ? (WCW'(l) <= wb_count[i])
           : (RCW'(l) + rb_count[i] + inflight[i] <= RCW'(RBUF_DEPTH)));
    end
    grant  = 1'b0;
    gnt_ep = '0;
    for (int k = 0; k < N_EP; k++) begin
      int j;
      j = (int'(rr) + k) % N_EP;
      if (!grant && eligible[j]) begin
        grant  = 1'b1;
        gnt_ep = EPW'(j);
      end
    end
    if (busy) grant = 1'b0;
  end

  always_comb begin
    q_pop = '0;
    if (grant) q_pop[gnt_ep] = 1'b1;
  end

  // tag queue: endpoint of every read word in flight
  logic           tag_full, tag_valid, tag_wready;
  logic [EPW-1:0] tag_ep;
  logic [TCW-1:0] tag_count;
  logic           issue;

  assign tag_full = !tag_wready;
  assign dram_cmd_valid = busy && (cur_write ? 1'b1 : !tag_full);
  assign dram_cmd_write = cur_write;
  assign dram_cmd_addr  = cur_addr;
  assign dram_cmd_wdata = wb_data[cur_ep];
  assign issue = dram_cmd_valid && dram_cmd_ready;

  always_comb begin
    wb_pop = '0;
    if (issue && cur_write) wb_pop[cur_ep] = 1'b1;
  end

  sync_fifo #(.W(EPW), .DEPTH(TAG_DEPTH)) u_tag (
    .clk, .rst_n,
    .wr_valid(issue && !cur_write), .wr_ready(tag_wready), .wr_data(cur_ep),
    .rd_valid(tag_valid), .rd_ready(dram_rd_valid), .rd_data(tag_ep), .count(tag_count)
  );

  always_comb begin
    rb_push = '0;
    if (dram_rd_valid) rb_push[tag_ep] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cur_write <= 1'b0;
      cur_ep    <= '0;
      rr        <= '0;
      cur_addr  <= '0;
      remain    <= '0;
      for (int i = 0; i < N_EP; i++) inflight[i] <= '0;
    end else begin
      if (grant) begin
        busy      <= 1'b1;
        cur_ep    <= gnt_ep;
        cur_write <= q_data[gnt_ep][RQW-1];
        cur_addr  <= q_data[gnt_ep][LEN_W +: ADDR_W];
        remain    <= q_data[gnt_ep][LEN_W-1:0];
        rr        <= (gnt_ep == EPW'(N_EP - 1)) ? '0 : gnt_ep + 1'b1;
      end else if (issue) begin
        cur_addr <= cur_addr + 1'b1;
        remain   <= remain - 1'b1;
        if (remain == LEN_W'(1)) busy <= 1'b0;
      end
      for (int i = 0; i < N_EP; i++) begin
        inflight[i] <= inflight[i]
          + ((grant && gnt_ep == EPW'(i) && !q_data[i][RQW-1]) ? RCW'(q_data[i][LEN_W-1:0]) : '0)
          - RCW'(dram_rd_valid && tag_ep == EPW'(i));
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_EP; i++)
      ep_idle[i] = !q_valid[i] && !wb_valid[i] && inflight[i] == 0 &&
                   !(busy && cur_ep == EPW'(i));
  end

  // Protocol rules.
  for (genvar i = 0; i < N_EP; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[i] |-> req_len[i] != 0) else $error("zero-length burst request");
  end
  assert property (@(posedge clk) disable iff (!rst_n)
    dram_rd_valid |-> tag_valid) else $error("read data without a request");
  assert property (@(posedge clk) disable iff (!rst_n)
    dram_rd_valid |-> rb_wready[tag_ep]) else $error("read buffer overflow");
endmodule
