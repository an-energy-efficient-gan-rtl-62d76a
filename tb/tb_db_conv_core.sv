// tb_db_conv_core: a core with 4 PE rows and 16 input channels. Loads random
// kernels and parameters through the write ports, presents random 3x3
// windows and runs convolution and transposed-convolution passes with 1..4
// channel slices, starting each pass as soon as the core is ready. Every
// output is compared with a reference computed straight from the window and
// the kernels (sum over taps and channels, per output phase in TConv mode,
// then bias, batch norm, ReLU and descale). Also checks the pass latency
// (first result slices + 3 cycles after start) and that short TConv passes
// make the core stall while its serial output drains.
module tb_db_conv_core;
  import gan_pkg::*;
  localparam int ROWS = 4, CIN_MAX = 16, PVW = CIN_MAX * 8, TAG_W = 20;
  localparam int WPE = 9 * ROWS / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  conv_mode_e mode = MODE_CONV_S1;
  logic [4:0] cin_groups = 4;
  logic relu_en = 0;
  logic [5:0] descale_sh = 4;
  logic [PVW-1:0] window [9];
  logic start = 0, ready, win_busy, idle;
  logic [TAG_W-1:0] tag = 0;
  logic wb_we = 0, prm_we = 0, prm_och = 0;
  logic [1:0] wb_entry = 0;
  logic [$clog2(WPE)-1:0] wb_word = 0;
  logic [31:0] wb_data = 0, prm_data = 0;
  logic out_valid, out_och;
  logic [1:0] out_phase;
  logic [TAG_W-1:0] out_tag;
  logic signed [7:0] out_data;
  logic [7:0] corr_cnt;
  int checks = 0, failures = 0, stalls = 0, corrections = 0;

  db_conv_core #(.ROWS(ROWS), .CIN_MAX(CIN_MAX), .TAG_W(TAG_W)) dut (.*);

  logic signed [7:0] wk [2][9][CIN_MAX];   // kernel k, tap t, channel c
  int bias [2], bnm [2];

  typedef struct { int val; bit och; int ph; int tag; } exp_t;
  exp_t q [$];
  int t_start [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int post(longint acc, int b, int m, bit relu, int sh);
    longint v = (acc + b) * m;
    v = v >>> 8;
    if (relu && v < 0) v = 0;
    if (sh > 0) v = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return int'(v);
  endfunction

  always @(negedge clk) if (rst_n) begin
    corrections += corr_cnt;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if (int'(out_data) != e.val || out_och != e.och || int'(out_phase) != e.ph ||
            int'(out_tag) != e.tag) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d exp %0d (och %0d ph %0d) t=%0t g=%0d", out_data, e.val, e.och, e.ph, $time, cin_groups);
        end
        if (e.och == 0 && e.ph == 0) begin
          int ts;
          ts = t_start.pop_front();
          checks++;
          if (cyc - ts != int'(cin_groups) + 3) begin
            failures++;
            $display("FAIL latency %0d", cyc - ts);
          end
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_kernels();
    for (int e = 0; e < CIN_MAX / ROWS; e++)
      for (int w = 0; w < WPE; w++) begin
        @(negedge clk);
        wb_we = 1; wb_entry = 2'(e); wb_word = ($bits(wb_word))'(w);
        for (int b = 0; b < 4; b++) begin
          int idx, k, t, r;
          idx = 4 * w + b;                 // byte index in the entry
          k = idx / (9 * ROWS); t = (idx / ROWS) % 9; r = idx % ROWS;
          wb_data[8*b +: 8] = wk[k][t][e * ROWS + r];
        end
      end
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      wb_we = 0; prm_we = 1; prm_och = 1'(k);
      prm_data = {16'(bnm[k]), 16'(bias[k])};
    end
    @(negedge clk);
    prm_we = 0;
  endtask

  initial begin
    foreach (window[t]) window[t] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int layer = 0; layer < 6; layer++) begin
      while (!idle) @(negedge clk);
      mode = (layer % 2) ? MODE_TCONV : MODE_CONV_S1;
      cin_groups = 5'((layer < 2) ? 4 : (layer < 4) ? 1 : 3);
      relu_en = layer[1];
      descale_sh = 6'($urandom_range(8, 2));
      foreach (wk[k, t, c]) wk[k][t][c] = 8'($urandom);
      bias[0] = $urandom_range(2000, 0) - 1000; bias[1] = $urandom_range(2000, 0) - 1000;
      bnm[0] = $urandom_range(400, 100); bnm[1] = $urandom_range(400, 0) - 200;
      load_kernels();
      for (int p = 0; p < 12; p++) begin
        longint acc [2][4];
        logic [PVW-1:0] nw [9];
        // new window once the previous pass has released it; like the ASR
        // shift it takes effect at a clock edge, after the core sampled it
        while (win_busy) @(negedge clk);
        foreach (nw[t]) for (int i = 0; i < PVW / 32; i++) nw[t][32*i +: 32] = $urandom;
        @(posedge clk);
        foreach (window[t]) window[t] <= nw[t];
        @(negedge clk);
        foreach (acc[k, ph]) acc[k][ph] = 0;
        for (int k = 0; k < 2; k++)
          for (int t = 0; t < 9; t++)
            for (int c = 0; c < int'(cin_groups) * ROWS; c++) begin
              int ph;
              ph = (mode == MODE_TCONV) ? int'(tconv_phase(t)) : 0;
              acc[k][ph] += longint'($signed(nw[t][8*c +: 8])) * longint'(wk[k][t][c]);
            end
        tag = 20'($urandom);
        for (int k = 0; k < 2; k++)
          for (int ph = 0; ph < ((mode == MODE_TCONV) ? 4 : 1); ph++)
            q.push_back('{post(acc[k][ph], bias[k], bnm[k], relu_en, int'(descale_sh)), 1'(k), ph, int'(tag)});
        #1;
        while (!ready) begin
          if (!win_busy) stalls++;
          @(negedge clk);
          #1;
        end
        start = 1;
        t_start.push_back(cyc);
        @(negedge clk);
        start = 0;
      end
    end
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0 || stalls == 0 || corrections == 0) begin
      failures++;
      $display("FAIL left %0d stalls %0d corrections %0d", q.size(), stalls, corrections);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
