// tb_axi_dma: runs read jobs (external memory to a target array) and write
// jobs (target array to external memory) of random shapes against an AXI
// memory model with random ready and response delays, and checks every word
// and its (row, col) placement, the done pulse and the byte addresses.
module tb_axi_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, dir = 0, busy, done, wr_en, rd_en;
  logic [31:0] ext_addr = 0, wr_data, rd_data;
  logic [15:0] rows = 0, row;
  logic [7:0]  cols = 0, col;
  logic [31:0] araddr, rdata, awaddr, wdata;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  logic [1:0] rresp, bresp;
  logic [3:0] wstrb;
  logic [31:0] tgt [16][16];
  int checks = 0, failures = 0;

  axi_dma dut (.*);
  axi_mem_model #(.WORDS(4096), .MAX_WAIT(3)) u_mem (.*);

  // on-chip target: written directly, read with one cycle of latency
  always_ff @(posedge clk) begin
    if (wr_en) tgt[row[3:0]][col[3:0]] <= wr_data;
    if (rd_en) rd_data <= tgt[row[3:0]][col[3:0]];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(input bit d, input int base, input int nr, input int nc);
    @(negedge clk);
    start = 1; dir = d; ext_addr = 32'(base * 4); rows = 16'(nr); cols = 8'(nc);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    @(negedge clk);
    if (busy) failures++;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 12; j++) begin
      int nr, nc, base;
      nr = $urandom_range(16, 1); nc = $urandom_range(16, 1);
      base = $urandom_range(3000, 0);
      // read job
      run_job(0, base, nr, nc);
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++) begin
          checks++;
          if (tgt[r][c] != u_mem.mem[base + r * nc + c]) failures++;
        end
      // write job from a fresh target pattern to another place
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) tgt[r][c] = $urandom;
      base = $urandom_range(3000, 0);
      run_job(1, base, nr, nc);
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++) begin
          checks++;
          if (tgt[r][c] != u_mem.mem[base + r * nc + c]) begin
            failures++;
            if (failures < 5) $display("FAIL write r%0d c%0d", r, c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
