// tb_conv_ctrl: starts passes of every length 1..16 and checks the issued
// slice sequence (one slice per cycle, first/last flags), the busy window
// and the ready rule against the queued outputs of the aggregation engine.
module tb_conv_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, pending = 0;
  logic [4:0] cin_groups = 1;
  logic [3:0] piso_cnt = 0, nout = 2;
  logic issue, first, last, issuing, ready;
  logic [3:0] grp;
  int checks = 0, failures = 0;

  conv_ctrl #(.GRP_MAX(16)) dut (.*);

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 16; n++) begin
      @(negedge clk);
      cin_groups = 5'(n);
      expect_(ready, "ready when idle");
      start = 1;
      #1;
      expect_(issue && first && grp == 0 && (last == (n == 1)), "first slice");
      for (int g = 1; g < n; g++) begin
        @(negedge clk);
        start = 0;
        #1;
        expect_(issue && !first && grp == 4'(g) && (last == (g == n - 1)), "slice sequence");
        expect_((issuing == (g != n - 1)) && !ready, "window busy until the last slice");
      end
      @(negedge clk);
      start = 0;
      #1;
      expect_(!issue && !issuing, "idle after pass");
    end
    // ready rule
    @(negedge clk);
    cin_groups = 5'd4; nout = 4'd8;
    piso_cnt = 4'd4; #1 expect_(ready, "ready with 4 queued, 4 slices");
    piso_cnt = 4'd5; #1 expect_(!ready, "stall with 5 queued, 4 slices");
    piso_cnt = 4'd0; pending = 1; #1 expect_(!ready, "stall while a pass ends");
    cin_groups = 5'd10; #1 expect_(ready, "ready: 10 slices cover 8 + 2");
    cin_groups = 5'd16; nout = 4'd2; pending = 0; piso_cnt = 4'd2; #1 expect_(ready, "conv ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
