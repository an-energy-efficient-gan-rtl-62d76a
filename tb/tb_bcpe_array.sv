// tb_bcpe_array: random operands into the full 16 x 9 array, back-to-back
// and with gaps; every registered column sum is compared one cycle later
// with sums of plain products, and the correction count with the number of
// negative lower products.
module tb_bcpe_array;
  localparam int ROWS = 16;
  localparam int CSW  = 16 + $clog2(ROWS) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid;
  logic signed [7:0]     act [9][ROWS];
  logic signed [7:0]     w0  [9][ROWS];
  logic signed [7:0]     w1  [9][ROWS];
  logic                  out_valid;
  logic signed [CSW-1:0] cs0 [9];
  logic signed [CSW-1:0] cs1 [9];
  logic [$clog2(9*ROWS+1)-1:0] corr_cnt;
  int checks = 0, failures = 0;

  bcpe_array #(.ROWS(ROWS)) dut (.clk, .rst_n, .in_valid, .act, .w0, .w1,
                                 .out_valid, .cs0, .cs1, .corr_cnt);

  int exp0 [9], exp1 [9], expc;
  logic exp_v = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (act[t, r]) begin act[t][r] = 0; w0[t][r] = 0; w1[t][r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // check the result of the previous cycle's operands
      if (exp_v) begin
        checks++;
        if (!out_valid || corr_cnt != expc) failures++;
        for (int t = 0; t < 9; t++) begin
          checks++;
          if (int'(cs0[t]) != exp0[t] || int'(cs1[t]) != exp1[t]) begin
            failures++;
            if (failures < 5) $display("FAIL t=%0d cs0=%0d exp %0d", t, cs0[t], exp0[t]);
          end
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      in_valid = ($urandom_range(3, 0) != 0);
      expc = 0;
      for (int t = 0; t < 9; t++) begin
        exp0[t] = 0; exp1[t] = 0;
        for (int r = 0; r < ROWS; r++) begin
          act[t][r] = (n % 7 == 0) ? -8'sd128 : 8'($urandom);
          w0[t][r]  = (n % 11 == 0) ? -8'sd128 : 8'($urandom);
          w1[t][r]  = 8'($urandom);
          exp0[t] += int'(act[t][r]) * int'(w0[t][r]);
          exp1[t] += int'(act[t][r]) * int'(w1[t][r]);
          if (int'(act[t][r]) * int'(w1[t][r]) < 0) expc++;
        end
      end
      exp_v = in_valid;
      if (!in_valid) expc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
