// tb_stencil_engine: random planes z-1, z, z+1 of a 32 x 7 grid are streamed
// into the engine with random gaps on each of the three inputs and random
// output stalls; every output cell is compared with the real-arithmetic
// stencil (boundary cells must be copied exactly). A second plane with
// continuous streams checks the rate of row_words+1 cycles per row plus one
// flush row.
module tb_stencil_engine;
  import stencil_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int NX = 32, NY = 7, RW = NX / 4;
  real c0r = 1.0 - 6.0 * 0.1, c1r = 0.1;
  logic [8:0] row_words = 9'(RW);
  logic [15:0] n_rows = 16'(NY);
  logic [63:0] c0, c1;
  logic [2:0] in_valid, in_ready;
  logic [2:0][255:0] in_data;
  logic out_valid, out_ready, out_last;
  logic [255:0] out_data;
  bit gaps;

  stencil_engine dut (.*);

  real g[3][][];
  int n_out, n_last, t_first, t_end;

  always @(posedge clk) out_ready <= gaps ? ($urandom % 4 != 0) : 1'b1;

  always @(posedge clk) if (out_valid && out_ready) begin
    int y, x0;
    y = n_out / RW;
    x0 = 4 * (n_out % RW);
    if (n_out == 0) t_first = cyc;
    for (int i = 0; i < 4; i++) begin
      real a, b;
      a = $bitstoreal(out_data[64*i +: 64]);
      b = ref_cell(g, NX, NY, x0 + i, y, c0r, c1r);
      checks++;
      if (!close(a, b)) begin
        failures++;
        if (failures < 6) $display("cell (%0d,%0d): %g expected %g", x0 + i, y, a, b);
      end
    end
    checks++;
    if (out_last !== (n_out == NX * NY / 4 - 1)) failures++;
    if (out_last) begin n_last++; t_end = cyc; end
    n_out++;
  end

  task automatic feed(int p);
    for (int y = 0; y < NY; y++)
      for (int xw = 0; xw < RW; xw++) begin
        for (int i = 0; i < 4; i++) in_data[p][64*i +: 64] = $realtobits(g[p][y][4*xw+i]);
        if (gaps) while ($urandom % 3 == 0) begin in_valid[p] = 0; @(posedge clk); #1; end
        in_valid[p] = 1;
        @(negedge clk);
        while (!in_ready[p]) @(negedge clk);
        @(posedge clk); #1;
        in_valid[p] = 0;
      end
  endtask

  task automatic plane(bit with_gaps);
    gaps = with_gaps;
    n_out = 0;
    for (int p = 0; p < 3; p++) begin
      g[p] = new[NY];
      foreach (g[p][y]) begin
        g[p][y] = new[NX];
        foreach (g[p][y][x]) g[p][y][x] = real'($urandom % 100000) / 1000.0 - 20.0;
      end
    end
    fork
      feed(0);
      feed(1);
      feed(2);
    join
    while (n_out < NX * NY / 4) @(posedge clk);
    #1;
  endtask

  initial begin
    c0 = $realtobits(c0r); c1 = $realtobits(c1r);
    in_valid = 0; in_data = 0; gaps = 0; n_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    plane(1);
    plane(0);
    $display("continuous plane: first output to last %0d cycles", t_end - t_first);
    checks++;
    // NY output rows, each row_words+1 slots
    if (t_end - t_first > NY * (RW + 1)) failures++;
    checks++;
    if (n_last != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
