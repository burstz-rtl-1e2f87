// dram_model: behavioural model of the on-board DRAM behind its memory
// controller, for simulation only. It accepts one word command per cycle,
// returns read data in order LAT cycles later, and charges ROW_PENALTY idle
// cycles whenever an access leaves the current 8 KB row, so that short
// interleaved bursts run visibly slower than long sequential ones. Storage is
// sparse; unwritten words read as a function of their address.
module dram_model #(
  parameter int ADDR_W      = 25,
  parameter int DATA_W      = 256,
  parameter int LAT         = 20,
  parameter int ROW_WORDS   = 256,
  parameter int ROW_PENALTY = 8
) (
  input  logic              clk,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] rq_data[$];
  longint            rq_time[$];
  longint            cyc = 0;
  int                stall = 0;
  logic [ADDR_W-1:0] open_row = '1;
  int                n_row_miss = 0;
  int                n_cmds = 0;

  assign cmd_ready = (stall == 0) && (cmd_addr / ROW_WORDS == open_row || !cmd_valid);

  initial begin
    rd_valid = 0;
    rd_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall > 0) stall <= stall - 1;
    if (cmd_valid && stall == 0 && cmd_addr / ROW_WORDS != open_row) begin
      open_row <= cmd_addr / ROW_WORDS;
      stall <= ROW_PENALTY;
      n_row_miss++;
    end
    if (cmd_valid && cmd_ready) begin
      n_cmds++;
      if (cmd_write) mem[cmd_addr] = cmd_wdata;
      else begin
        rq_data.push_back(mem.exists(cmd_addr) ? mem[cmd_addr] : DATA_W'(cmd_addr) * 7);
        rq_time.push_back(cyc + LAT);
      end
    end
    if (rq_time.size() > 0 && rq_time[0] <= cyc) begin
      rd_valid <= 1'b1;
      rd_data  <= rq_data.pop_front();
      void'(rq_time.pop_front());
    end else begin
      rd_valid <= 1'b0;
    end
  end

  // backdoor access for testbenches
  function automatic void poke(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    mem[a] = d;
  endfunction
  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
endmodule
