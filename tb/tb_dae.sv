// tb_dae: drives random column sums through passes of random length in both
// modes and with random layer settings, and compares the serial outputs
// (value, kernel, phase, tag, order) with a reference model that sums the
// taps per output phase and applies bias, Q8.8 batch norm, ReLU and the
// rounding descale with saturation. Checks that one value leaves per cycle
// right after a pass ends.
module tb_dae;
  import gan_pkg::*;
  localparam int CSW = 21, TAG_W = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tconv = 0, relu_en = 0;
  logic [5:0] descale_sh = 0;
  logic signed [15:0] bias [2], bn_mul [2];
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [TAG_W-1:0] in_tag = 0;
  logic signed [CSW-1:0] cs0 [9], cs1 [9];
  logic out_valid, out_och;
  logic [1:0] out_phase;
  logic [TAG_W-1:0] out_tag;
  logic signed [7:0] out_data;
  logic [3:0] piso_cnt;
  int checks = 0, failures = 0;

  dae #(.CSW(CSW), .TAG_W(TAG_W)) dut (.*);

  typedef struct { int val; bit och; int ph; int tag; } exp_t;
  exp_t q [$];

  function automatic int post(longint acc, int b, int m, bit relu, int sh);
    longint v = (acc + b) * m;
    v = v >>> 8;
    if (relu && v < 0) v = 0;
    if (sh > 0) v = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return int'(v);
  endfunction

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = q.pop_front();
      if (int'(out_data) != e.val || out_och != e.och || int'(out_phase) != e.ph ||
          int'(out_tag) != e.tag) begin
        failures++;
        if (failures < 10)
          $display("FAIL got %0d och%0d ph%0d exp %0d och%0d ph%0d", out_data, out_och,
                   out_phase, e.val, e.och, e.ph);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc [2][4];
    int ng, t0;
    foreach (cs0[t]) begin cs0[t] = 0; cs1[t] = 0; end
    bias = '{0, 0}; bn_mul = '{256, 256};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 120; p++) begin
      @(negedge clk);
      tconv      = p[0];
      relu_en    = $urandom_range(1, 0);
      descale_sh = 6'($urandom_range(12, 0));
      bias[0] = 16'($urandom); bias[1] = 16'($urandom);
      bn_mul[0] = 16'($urandom_range(600, 0) - 300);
      bn_mul[1] = (p % 5 == 0) ? 16'sd256 : 16'($urandom_range(600, 0) - 300);
      ng = $urandom_range(16, 1);
      foreach (acc[k, ph]) acc[k][ph] = 0;
      for (int g = 0; g < ng; g++) begin
        in_valid = 1; in_first = (g == 0); in_last = (g == ng - 1);
        in_tag = 20'($urandom);
        for (int t = 0; t < 9; t++) begin
          int ph;
          ph = tconv ? int'(tconv_phase(t)) : 0;
          cs0[t] = CSW'($urandom_range(600000, 0) - 300000);
          cs1[t] = CSW'($urandom_range(600000, 0) - 300000);
          acc[0][ph] += cs0[t];
          acc[1][ph] += cs1[t];
        end
        @(negedge clk);
      end
      in_valid = 0; in_first = 0; in_last = 0;
      for (int k = 0; k < 2; k++)
        for (int ph = 0; ph < (tconv ? 4 : 1); ph++)
          q.push_back('{post(acc[k][ph], bias[k], bn_mul[k], relu_en, descale_sh),
                        1'(k), ph, int'(in_tag)});
      // the outputs must follow at one per cycle, starting two cycles after the pass
      t0 = tconv ? 8 : 2;
      for (int i = 0; i < t0; i++) begin
        @(negedge clk);
        checks++;
        if (!out_valid) failures++;
      end
      @(negedge clk);
      checks++;
      if (out_valid || q.size() != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
