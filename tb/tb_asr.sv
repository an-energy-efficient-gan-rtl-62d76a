// tb_asr: feeds random pixel vectors through the prefetch, hold and window
// registers in all three modes and compares the window after every shift
// with a reference model of the documented shift rules, including the row
// upscaling of transposed-conv prefetch.
module tb_asr;
  import gan_pkg::*;
  localparam int CIN_MAX = 16, PVW = CIN_MAX * 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  conv_mode_e mode = MODE_CONV_S1;
  logic pre_we = 0, hold_we = 0, shift = 0;
  logic [1:0] pre_idx = 0;
  logic [PVW-1:0] pre_data = 0;
  logic [PVW-1:0] window [9];
  logic [PVW-1:0] m_pre [3], m_hold [3], m_win [3][3];
  int checks = 0, failures = 0;
  int n_shift [3] = '{0, 0, 0};

  asr #(.CIN_MAX(CIN_MAX)) dut (.*);

  function automatic logic [PVW-1:0] rnd();
    logic [PVW-1:0] v;
    for (int i = 0; i < PVW / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_pre[u]) begin m_pre[u] = 0; m_hold[u] = 0; for (int v = 0; v < 3; v++) m_win[u][v] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int op;
      op = $urandom_range(3, 0);
      @(negedge clk);
      pre_we = 0; hold_we = 0; shift = 0;
      if (n % 200 == 0) mode = conv_mode_e'(n / 200);
      if (op <= 1) begin
        pre_we = 1; pre_idx = 2'($urandom_range(2, 0)); pre_data = rnd();
        m_pre[pre_idx] = pre_data;
        if (mode == MODE_TCONV && pre_idx == 0) m_pre[1] = pre_data;
      end else if (op == 2) begin
        hold_we = 1;
        m_hold = m_pre;
      end else begin
        shift = 1;
        n_shift[mode]++;
        for (int u = 0; u < 3; u++) begin
          case (mode)
            MODE_CONV_S1: begin m_win[u][0] = m_win[u][1]; m_win[u][1] = m_win[u][2]; end
            MODE_CONV_S2: begin m_win[u][0] = m_win[u][2]; m_win[u][1] = m_hold[u]; end
            default:      begin m_win[u][0] = m_win[u][2]; m_win[u][1] = m_win[u][2]; end
          endcase
          m_win[u][2] = m_pre[u];
        end
      end
      @(posedge clk);
      #1;
      for (int t = 0; t < 9; t++) begin
        checks++;
        if (window[t] != m_win[t / 3][t % 3]) begin
          failures++;
          if (failures < 5) $display("FAIL mode %0d tap %0d", mode, t);
        end
      end
    end
    checks++;
    if (n_shift[0] == 0 || n_shift[1] == 0 || n_shift[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
