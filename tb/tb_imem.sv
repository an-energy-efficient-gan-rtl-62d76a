// tb_imem: fills the idle bank with random words, swaps, reads every pixel
// back (one-cycle latency) while filling the other bank, and checks that the
// read data is the bank filled before the swap and that filling never
// disturbs the bank being read.
module tb_imem;
  localparam int PIX = 32, CIN_MAX = 16, PVW = CIN_MAX * 8, WPP = CIN_MAX / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic swap = 0, active, wr_en = 0, rd_en = 0;
  logic [$clog2(PIX)-1:0] wr_pix = 0, rd_pix = 0;
  logic [$clog2(WPP)-1:0] wr_word = 0;
  logic [31:0] wr_data = 0;
  logic [PVW-1:0] rd_data;
  logic [PVW-1:0] ref_m [2][PIX];
  int checks = 0, failures = 0;

  imem #(.PIX(PIX), .CIN_MAX(CIN_MAX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fill;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      fill = !active;   // the idle bank
      // fill the idle bank while reading the active one
      for (int p = 0; p < PIX; p++) begin
        for (int w = 0; w < WPP; w++) begin
          @(negedge clk);
          if (round > 0 && w == 1) begin
            checks++;
            if (rd_data != ref_m[active][rd_pix]) failures++;
          end
          wr_en = 1; wr_pix = 5'(p); wr_word = 2'(w); wr_data = $urandom;
          ref_m[fill][p][w*32 +: 32] = wr_data;
          rd_en = (w == 0); rd_pix = 5'($urandom_range(PIX - 1, 0));
        end
      end
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      swap = 1;
      @(negedge clk);
      swap = 0;
      checks++;
      if (active != 1'(fill)) failures++;
      for (int p = 0; p < PIX; p++) begin
        rd_en = 1; rd_pix = 5'(p);
        @(negedge clk);
        checks++;
        if (rd_data != ref_m[fill][p]) failures++;
      end
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
