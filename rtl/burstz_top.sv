// burstz_top: accelerator side of the BurstZ platform running one 7-point
// stencil sweep step. Data lives compressed (sZFP, 6 KB chunks) in the
// on-board DRAM; it is decompressed only on its way into the computation
// engine and the result is compressed before it is stored again.
//   - mem_arbiter with six burst endpoints: 0 host-to-card (PCIe write into
//     DRAM), 1 card-to-host (PCIe read from DRAM), 2..4 the three plane
//     readers, 5 the result writer; the DRAM port goes to the memory
//     controller outside.
//   - three szfp_decompressor pipelines (N_DEC_PIPES decoders each), fed by
//     chunk_reader request generators with the compressed planes z-1, z, z+1
//   - stencil_engine (three circular row buffers and the stencil core)
//   - one szfp_compressor (N_ENC_PIPES encoders) whose chunks chunk_writer
//     stores from dst_base on.
// The host endpoints are brought out as ports, for a PCIe DMA engine. On
// start the three readers and the writer are armed; done rises when the last
// output chunk is in DRAM, and out_chunks gives the compressed size. Boundary
// planes (z = 0 and z = nZ-1) are not swept here; the host keeps them.
module burstz_top
  import szfp_pkg::*;
#(
  parameter int N_DEC_PIPES   = 5,
  parameter int N_ENC_PIPES   = 2,
  parameter int MAX_ROW_WORDS = 256,
  parameter int ADDR_W        = 25,
  parameter int LEN_W         = 9,
  parameter int CNT_W         = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control
  input  logic                       start,
  input  logic signed [11:0]         minexp,
  input  logic [$clog2(MAX_ROW_WORDS+1)-1:0] row_words,
  input  logic [15:0]                n_rows,
  input  logic [63:0]                c0,
  input  logic [63:0]                c1,
  input  logic [2:0][ADDR_W-1:0]     src_base,
  input  logic [2:0][CNT_W-1:0]      src_chunks,
  input  logic [ADDR_W-1:0]          dst_base,
  output logic                       done,
  output logic [CNT_W-1:0]           out_chunks,
  // host (PCIe) endpoints: [0] writes into DRAM, [1] reads from DRAM
  input  logic [1:0]                 host_req_valid,
  output logic [1:0]                 host_req_ready,
  input  logic [1:0]                 host_req_write,
  input  logic [1:0][ADDR_W-1:0]     host_req_addr,
  input  logic [1:0][LEN_W-1:0]      host_req_len,
  input  logic [1:0]                 host_wr_valid,
  output logic [1:0]                 host_wr_ready,
  input  logic [1:0][WORD_W-1:0]     host_wr_data,
  output logic [1:0]                 host_rd_valid,
  input  logic [1:0]                 host_rd_ready,
  output logic [1:0][WORD_W-1:0]     host_rd_data,
  output logic [1:0]                 host_idle,
  // DRAM controller port
  output logic                       dram_cmd_valid,
  input  logic                       dram_cmd_ready,
  output logic                       dram_cmd_write,
  output logic [ADDR_W-1:0]          dram_cmd_addr,
  output logic [WORD_W-1:0]          dram_cmd_wdata,
  input  logic                       dram_rd_valid,
  input  logic [WORD_W-1:0]          dram_rd_data
);
  localparam int N_EP = 6;

  logic [N_EP-1:0]              req_valid, req_ready, req_write;
  logic [N_EP-1:0][ADDR_W-1:0]  req_addr;
  logic [N_EP-1:0][LEN_W-1:0]   req_len;
  logic [N_EP-1:0]              wr_valid, wr_ready, rd_valid, rd_ready, ep_idle;
  logic [N_EP-1:0][WORD_W-1:0]  wr_data, rd_data;

  mem_arbiter #(.N_EP(N_EP), .DATA_W(WORD_W), .ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_arb (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_addr, .req_len,
    .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .ep_idle,
    .dram_cmd_valid, .dram_cmd_ready, .dram_cmd_write, .dram_cmd_addr, .dram_cmd_wdata,
    .dram_rd_valid, .dram_rd_data
  );

  // host endpoints
  assign req_valid[1:0] = host_req_valid;
  assign req_write[1:0] = host_req_write;
  assign req_addr[1:0]  = host_req_addr;
  assign req_len[1:0]   = host_req_len;
  assign wr_valid[1:0]  = host_wr_valid;
  assign wr_data[1:0]   = host_wr_data;
  assign rd_ready[1:0]  = host_rd_ready;
  assign host_req_ready = req_ready[1:0];
  assign host_wr_ready  = wr_ready[1:0];
  assign host_rd_valid  = rd_valid[1:0];
  assign host_rd_data   = rd_data[1:0];
  assign host_idle      = ep_idle[1:0];

  // three plane readers and decompressors
  logic [2:0]              d_valid, d_ready;
  logic [2:0][255:0]       d_data;

  for (genvar p = 0; p < 3; p++) begin : g_plane
    logic rbusy;
    chunk_reader #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .CNT_W(CNT_W)) u_rd (
      .clk, .rst_n, .start, .base(src_base[p]), .n_chunks(src_chunks[p]),
      .req_valid(req_valid[2+p]), .req_ready(req_ready[2+p]),
      .req_addr(req_addr[2+p]), .req_len(req_len[2+p]), .busy(rbusy)
    );
    assign req_write[2+p] = 1'b0;
    assign wr_valid[2+p]  = 1'b0;
    assign wr_data[2+p]   = '0;

    szfp_decompressor #(.N_DEC(N_DEC_PIPES)) u_dec (
      .clk, .rst_n, .minexp,
      .in_valid(rd_valid[2+p]), .in_ready(rd_ready[2+p]), .in_data(rd_data[2+p]),
      .out_valid(d_valid[p]), .out_ready(d_ready[p]), .out_data(d_data[p])
    );
  end

  // computation engine
  logic         s_valid, s_ready, s_last;
  logic [255:0] s_data;

  stencil_engine #(.MAX_ROW_WORDS(MAX_ROW_WORDS)) u_eng (
    .clk, .rst_n, .row_words, .n_rows, .c0, .c1,
    .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data), .out_last(s_last)
  );

  // compressor and result writer
  logic c_chunk_last, c_stream_last;

  szfp_compressor #(.N_ENC(N_ENC_PIPES)) u_comp (
    .clk, .rst_n, .minexp,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data), .in_last(s_last),
    .out_valid(wr_valid[5]), .out_ready(wr_ready[5]), .out_data(wr_data[5]),
    .out_chunk_last(c_chunk_last), .out_stream_last(c_stream_last)
  );
  assign req_write[5] = 1'b1;
  assign rd_ready[5]  = 1'b1;

  chunk_writer #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .CNT_W(CNT_W)) u_wr (
    .clk, .rst_n, .start, .base(dst_base),
    .data_fire(wr_valid[5] && wr_ready[5]), .data_chunk_last(c_chunk_last),
    .data_stream_last(c_stream_last), .ep_idle(ep_idle[5]),
    .req_valid(req_valid[5]), .req_ready(req_ready[5]),
    .req_addr(req_addr[5]), .req_len(req_len[5]),
    .n_chunks(out_chunks), .done
  );
endmodule
