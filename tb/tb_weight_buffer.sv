// tb_weight_buffer: fills every entry of the buffer word by word with random
// data, then reads all entries (one-cycle latency) and checks every byte
// against the documented layout (byte 4c of an entry in bits 7:0 of word c).
module tb_weight_buffer;
  localparam int ROWS = 16, CIN_MAX = 256, DEPTH = CIN_MAX / ROWS;
  localparam int EW = 2 * 9 * ROWS * 8, WPE = EW / 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [$clog2(DEPTH)-1:0] wr_entry, rd_entry;
  logic [$clog2(WPE)-1:0]   wr_word;
  logic [31:0]              wr_data;
  logic [EW-1:0]            rd_data;
  logic [7:0] ref_b [DEPTH][EW/8];
  int checks = 0, failures = 0;

  weight_buffer #(.ROWS(ROWS), .CIN_MAX(CIN_MAX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < DEPTH; e++)
      for (int c = 0; c < WPE; c++) begin
        @(negedge clk);
        wr_en = 1; wr_entry = e[$bits(wr_entry)-1:0]; wr_word = c[$bits(wr_word)-1:0];
        wr_data = $urandom;
        for (int b = 0; b < 4; b++) ref_b[e][4*c+b] = wr_data[8*b +: 8];
      end
    @(negedge clk);
    wr_en = 0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      @(negedge clk);
      rd_en = 1; rd_entry = e[$bits(rd_entry)-1:0];
      @(negedge clk);
      rd_en = 0;
      for (int b = 0; b < EW / 8; b++) begin
        checks++;
        if (rd_data[8*b +: 8] != ref_b[e][b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
