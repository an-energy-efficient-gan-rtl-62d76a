// db_conv_core: dual-mode bit-combined convolution core (DB-Conv core).
//
// One core computes two output channels (kernel 0 and kernel 1) of a 3x3
// convolution or transposed convolution for one window position per pass.
// It reads the 3x3 activation window broadcast by the activation shared
// register, ROWS input channels per cycle, multiplies them in the ROWS x 9
// bit-combined PE array with both kernels from its weight buffer, and sums
// the results in the dual-mode aggregation engine, which also applies bias,
// batch norm, ReLU and descaling and emits FXP8 results one per cycle.
//
// Pipeline: slice issue and window sampling (stage 0), weight read and
// multiply with registered column sums (stage 1), accumulation (stage 2),
// serial post processing (one more cycle). A pass over a 256-channel input
// with 16 PE rows issues for 16 cycles, as in the source design; the
// pipeline depth is this design's choice.
//
// Interface: window is the 3x3 window, tap t = 3*u + v, each tap a pixel
// vector of CIN_MAX channels, channel c in bits 8c+7:8c. start/tag begin a
// pass (only when ready); win_busy means the window must not change. Weight
// and parameter words arrive from the external-memory bus; a parameter word
// is {bn_mul[15:0], bias[15:0]} of one kernel.
module db_conv_core
  import gan_pkg::*;
#(
  parameter int unsigned ROWS    = 16,
  parameter int unsigned CIN_MAX = 256,
  parameter int unsigned TAG_W   = 20,
  localparam int unsigned TAPS   = 9,
  localparam int unsigned PVW    = CIN_MAX * 8,
  localparam int unsigned GRP_MAX = CIN_MAX / ROWS,
  localparam int unsigned GW     = (GRP_MAX > 1) ? $clog2(GRP_MAX) : 1,
  localparam int unsigned CW     = $clog2(2 * 9 * ROWS * 8 / 32),
  localparam int unsigned CSW    = 16 + $clog2(ROWS) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // layer settings
  input  conv_mode_e         mode,
  input  logic [4:0]         cin_groups,
  input  logic               relu_en,
  input  logic [5:0]         descale_sh,
  // activation window from the ASR
  input  logic [PVW-1:0]     window [TAPS],
  // pass control
  input  logic               start,
  input  logic [TAG_W-1:0]   tag,
  output logic               ready,
  output logic               win_busy,
  output logic               idle,
  // weight buffer write
  input  logic               wb_we,
  input  logic [GW-1:0]      wb_entry,
  input  logic [CW-1:0]      wb_word,
  input  logic [31:0]        wb_data,
  // parameter write
  input  logic               prm_we,
  input  logic               prm_och,
  input  logic [31:0]        prm_data,
  // results
  output logic               out_valid,
  output logic               out_och,
  output logic [1:0]         out_phase,
  output logic [TAG_W-1:0]   out_tag,
  output logic signed [7:0]  out_data,
  output logic [7:0]         corr_cnt
);
  logic tconv;
  assign tconv = (mode == MODE_TCONV);

  // parameters of the two kernels
  logic signed [15:0] bias   [2];
  logic signed [15:0] bn_mul [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias   <= '{default: '0};
      bn_mul <= '{default: 16'sd256};
    end else if (prm_we) begin
      bias[prm_och]   <= prm_data[15:0];
      bn_mul[prm_och] <= prm_data[31:16];
    end
  end

  // stage 0: slice issue
  logic          issue, first, last, issuing;
  logic [GW-1:0] grp;
  logic [3:0]    piso_cnt;
  logic          pending;
  logic [TAG_W-1:0] tag_r;

  conv_ctrl #(.GRP_MAX(GRP_MAX)) u_ctrl (
    .clk, .rst_n, .start, .cin_groups, .piso_cnt, .pending,
    .nout(tconv ? 4'd8 : 4'd2),
    .issue, .grp, .first, .last, .issuing, .ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                tag_r <= '0;
    else if (start && ready)   tag_r <= tag;
  end

  // stage 1 registers
  logic                s1_v, s1_first, s1_last;
  logic [TAG_W-1:0]    s1_tag;
  logic signed [7:0]   act_s1 [TAPS][ROWS];
  logic [2*9*ROWS*8-1:0] wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_tag <= '0;
      for (int t = 0; t < TAPS; t++)
        for (int r = 0; r < ROWS; r++) act_s1[t][r] <= '0;
    end else begin
      s1_v     <= issue;
      s1_first <= first;
      s1_last  <= last;
      s1_tag   <= (start && ready) ? tag : tag_r;
      if (issue)
        for (int t = 0; t < TAPS; t++)
          for (int r = 0; r < ROWS; r++)
            act_s1[t][r] <= window[t][(32'(grp) * ROWS + r) * 8 +: 8];
    end
  end

  weight_buffer #(.ROWS(ROWS), .CIN_MAX(CIN_MAX)) u_wb (
    .clk, .wr_en(wb_we), .wr_entry(wb_entry), .wr_word(wb_word), .wr_data(wb_data),
    .rd_en(issue), .rd_entry(grp), .rd_data(wdata));

  logic signed [7:0] w0 [TAPS][ROWS];
  logic signed [7:0] w1 [TAPS][ROWS];
  always_comb
    for (int t = 0; t < TAPS; t++)
      for (int r = 0; r < ROWS; r++) begin
        w0[t][r] = wdata[((0 * TAPS + t) * ROWS + r) * 8 +: 8];
        w1[t][r] = wdata[((1 * TAPS + t) * ROWS + r) * 8 +: 8];
      end

  // stage 2: column sums
  logic                  s2_v, s2_first, s2_last;
  logic [TAG_W-1:0]      s2_tag;
  logic signed [CSW-1:0] cs0 [TAPS];
  logic signed [CSW-1:0] cs1 [TAPS];
  logic [$clog2(TAPS*ROWS+1)-1:0] ccnt;

  bcpe_array #(.ROWS(ROWS)) u_array (
    .clk, .rst_n, .in_valid(s1_v), .act(act_s1), .w0, .w1,
    .out_valid(s2_v), .cs0, .cs1, .corr_cnt(ccnt));
  assign corr_cnt = 8'(ccnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_first <= 1'b0; s2_last <= 1'b0; s2_tag <= '0;
    end else begin
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_tag   <= s1_tag;
    end
  end

  assign pending  = (s1_v && s1_last) || (s2_v && s2_last);
  assign win_busy = issuing;
  assign idle     = !issue && !s1_v && !s2_v && (piso_cnt == 0) && !out_valid;

  dae #(.CSW(CSW), .TAG_W(TAG_W)) u_dae (
    .clk, .rst_n, .tconv, .relu_en, .descale_sh, .bias, .bn_mul,
    .in_valid(s2_v), .in_first(s2_first), .in_last(s2_last), .in_tag(s2_tag),
    .cs0, .cs1,
    .out_valid, .out_och, .out_phase, .out_tag, .out_data, .piso_cnt);
endmodule
