// tb_omem: all cores write random FXP8 results into random pixels, channel
// groups and kernel indices; every 32-bit word of the memory is then read
// back (one-cycle latency) and compared with a byte-level reference.
module tb_omem;
  localparam int PIX = 16, COUT_MAX = 32, NCORES = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NCORES-1:0] wr_en = 0;
  logic [$clog2(PIX)-1:0] wr_pix = 0, rd_pix = 0;
  logic [$clog2(COUT_MAX)-1:0] wr_base = 0;
  logic wr_och = 0, rd_en = 0;
  logic [7:0] wr_data [NCORES];
  logic [$clog2(COUT_MAX/4)-1:0] rd_word = 0;
  logic [31:0] rd_data;
  logic [7:0] ref_b [PIX][COUT_MAX];
  int checks = 0, failures = 0;

  omem #(.PIX(PIX), .COUT_MAX(COUT_MAX), .NCORES(NCORES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wr_data[i]) wr_data[i] = 0;
    // initialise every byte so the whole map is known
    for (int p = 0; p < PIX; p++)
      for (int b = 0; b < COUT_MAX / (2 * NCORES); b++)
        for (int o = 0; o < 2; o++) begin
          @(negedge clk);
          wr_en = '1; wr_pix = 4'(p); wr_base = 5'(b * 2 * NCORES); wr_och = 1'(o);
          for (int c = 0; c < NCORES; c++) begin
            wr_data[c] = 8'($urandom);
            ref_b[p][b * 2 * NCORES + 2 * c + o] = wr_data[c];
          end
        end
    // random partial overwrites
    for (int n = 0; n < 200; n++) begin
      int b;
      b = $urandom_range(COUT_MAX / (2 * NCORES) - 1, 0);
      @(negedge clk);
      wr_en = 4'($urandom); wr_pix = 4'($urandom); wr_base = 5'(b * 2 * NCORES); wr_och = 1'($urandom);
      for (int c = 0; c < NCORES; c++) begin
        wr_data[c] = 8'($urandom);
        if (wr_en[c]) ref_b[wr_pix][b * 2 * NCORES + 2 * c + wr_och] = wr_data[c];
      end
    end
    @(negedge clk);
    wr_en = 0;
    for (int p = 0; p < PIX; p++)
      for (int w = 0; w < COUT_MAX / 4; w++) begin
        rd_en = 1; rd_pix = 4'(p); rd_word = 3'(w);
        @(negedge clk);
        checks++;
        if (rd_data != {ref_b[p][4*w+3], ref_b[p][4*w+2], ref_b[p][4*w+1], ref_b[p][4*w]}) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
