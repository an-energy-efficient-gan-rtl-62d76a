// asr: activation shared register.
//
// A shift-register structure that builds the 3x3 activation window all
// DB-Conv cores share. Every register holds one pixel vector: the
// activations of all CIN_MAX input channels at one (row, column). There are
// three prefetch registers (one column of the window, rows 0..2), three hold
// registers and nine window registers (win[u][v], row u, column v; tap
// t = 3*u + v on the output).
//
// Operations, requested by the top controller:
//  pre_we  : write one prefetch register from IMEM. In transposed-conv mode
//            a write to row 0 also writes row 1: the input is upscaled by two
//            in the row direction while it is prefetched.
//  hold_we : copy the prefetch column into the hold column (stride 2).
//  shift   : move the window, by mode:
//            stride 1   col0 <- col1, col1 <- col2, col2 <- prefetch
//            stride 2   col0 <- col2, col1 <- hold, col2 <- prefetch
//            tconv      col0 <- col2, col1 <- col2, col2 <- prefetch
//            (the last is a stride-2 slide over the column-upscaled input).
// Prefetching the next column(s) overlaps with the cores' pass over the
// current window; the shift waits until the cores release the window.
// The register counts and the prefetch/hold/propagate scheme follow the
// source design; the exact shift encoding is this design's.
module asr
  import gan_pkg::*;
#(
  parameter int unsigned CIN_MAX = 256,
  localparam int unsigned PVW = CIN_MAX * 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  conv_mode_e     mode,
  input  logic           pre_we,
  input  logic [1:0]     pre_idx,
  input  logic [PVW-1:0] pre_data,
  input  logic           hold_we,
  input  logic           shift,
  output logic [PVW-1:0] window [9]
);
  logic [PVW-1:0] pre  [3];
  logic [PVW-1:0] hold [3];
  logic [PVW-1:0] win  [3][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < 3; u++) begin
        pre[u]  <= '0;
        hold[u] <= '0;
        for (int v = 0; v < 3; v++) win[u][v] <= '0;
      end
    end else begin
      if (pre_we) begin
        pre[pre_idx] <= pre_data;
        if (mode == MODE_TCONV && pre_idx == 2'd0) pre[1] <= pre_data;
      end
      if (hold_we)
        for (int u = 0; u < 3; u++) hold[u] <= pre[u];
      if (shift) begin
        for (int u = 0; u < 3; u++) begin
          unique case (mode)
            MODE_CONV_S2: begin
              win[u][0] <= win[u][2];
              win[u][1] <= hold[u];
            end
            MODE_TCONV: begin
              win[u][0] <= win[u][2];
              win[u][1] <= win[u][2];
            end
            default: begin
              win[u][0] <= win[u][1];
              win[u][1] <= win[u][2];
            end
          endcase
          win[u][2] <= pre[u];
        end
      end
    end
  end

  always_comb
    for (int t = 0; t < 9; t++) window[t] = win[t / 3][t % 3];

  assert property (@(posedge clk) disable iff (!rst_n) !(pre_we && pre_idx == 2'd3))
    else $error("asr: prefetch index out of range");
endmodule
