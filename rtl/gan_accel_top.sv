// gan_accel_top: energy-efficient GAN inference accelerator for image-to-image
// translation.
//
// NCORES dual-mode bit-combined convolution cores share one 3x3 activation
// window built by the activation shared register (ASR) from the
// double-buffered input memory (IMEM). Each core computes two output
// channels, with two FXP8 multiplications per multiplier, so one window pass
// produces 2*NCORES output channels of one output pixel (convolution) or of
// four output pixels (transposed convolution, data-remapped). Results are
// descaled to FXP8 in the cores and written to the output memory (OMEM).
// A top controller sequences a layer; all memories reach external memory
// through one 32-bit AXI master.
//
// Interface: configure cfg (gan_pkg::layer_cfg_t), pulse start, wait for
// done. The AXI master uses single-beat read and write transactions. perf
// counts controller events.
//
// Default sizes follow the source design where it gives them (8 cores,
// 16 x 9 PE arrays, 256 input channels, 16-cycle pass); the memory depths
// (1024 pixels per IMEM bank and in OMEM) are this design's choice. A
// layer (or a tile of it, prepared by the host) must fit: input pixels
// <= IPIX, output pixels <= OPIX, input channels <= CIN_MAX.
module gan_accel_top
  import gan_pkg::*;
#(
  parameter int unsigned NCORES   = 8,
  parameter int unsigned ROWS     = 16,
  parameter int unsigned CIN_MAX  = 256,
  parameter int unsigned COUT_MAX = 256,
  parameter int unsigned IPIX     = 1024,
  parameter int unsigned OPIX     = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  layer_cfg_t  cfg,
  output logic        done,
  output logic        busy,
  output perf_t       perf,
  // AXI master
  output logic [31:0] m_araddr,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rvalid,
  output logic        m_rready,
  output logic [31:0] m_awaddr,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready
);
  localparam int unsigned TAG_W = 20;
  localparam int unsigned PVW   = CIN_MAX * 8;
  localparam int unsigned IPAW  = $clog2(IPIX);
  localparam int unsigned OPAW  = $clog2(OPIX);
  localparam int unsigned CAW   = $clog2(COUT_MAX);
  localparam int unsigned CRW   = (NCORES > 1) ? $clog2(NCORES) : 1;
  localparam int unsigned GRP_MAX = CIN_MAX / ROWS;
  localparam int unsigned GW    = (GRP_MAX > 1) ? $clog2(GRP_MAX) : 1;
  localparam int unsigned WCW   = $clog2(2 * 9 * ROWS * 8 / 32);

  layer_cfg_t cfg_r;

  // controller <-> datapath
  logic             imem_swap, imem_rd_en, imem_active;
  logic [IPAW-1:0]  imem_rd_pix;
  logic [PVW-1:0]   imem_rd_data;
  logic             pre_we, pre_zero, hold_we, shift;
  logic [1:0]       pre_idx;
  logic [PVW-1:0]   window [9];
  logic             core_start;
  logic [TAG_W-1:0] core_tag;
  logic [OPAW-1:0]  omem_pix;
  logic [CAW-1:0]   omem_base;

  // DMA
  logic        dma_start, dma_dir, dma_busy, dma_done;
  logic [31:0] dma_addr;
  logic [15:0] dma_rows;
  logic [7:0]  dma_cols;
  dma_tgt_e    dma_tgt;
  logic [CRW-1:0] dma_core;
  logic        d_wr_en, d_rd_en;
  logic [15:0] d_row;
  logic [7:0]  d_col;
  logic [31:0] d_wr_data, d_rd_data;

  // cores
  logic [NCORES-1:0] c_ready, c_win_busy, c_idle, c_out_valid, c_out_och;
  logic [1:0]        c_out_phase [NCORES];
  logic [TAG_W-1:0]  c_out_tag   [NCORES];
  logic [7:0]        c_out_data  [NCORES];
  logic [7:0]        c_corr      [NCORES];
  logic [15:0]       corr_sum;

  always_comb begin
    corr_sum = '0;
    for (int i = 0; i < NCORES; i++) corr_sum += 16'(c_corr[i]);
  end

  top_ctrl #(.NCORES(NCORES), .ROWS(ROWS), .CIN_MAX(CIN_MAX), .COUT_MAX(COUT_MAX),
             .IPIX(IPIX), .OPIX(OPIX), .TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .done, .busy, .cfg_r,
    .imem_swap, .imem_rd_en, .imem_rd_pix,
    .asr_pre_we(pre_we), .asr_pre_idx(pre_idx), .asr_pre_zero(pre_zero),
    .asr_hold_we(hold_we), .asr_shift(shift),
    .core_start, .core_tag,
    .cores_ready(&c_ready), .cores_win_busy(|c_win_busy), .cores_idle(&c_idle),
    .res_valid(c_out_valid[0]), .res_phase(c_out_phase[0]), .res_tag(c_out_tag[0]),
    .res_corr(corr_sum),
    .omem_pix, .omem_base,
    .dma_start, .dma_dir, .dma_addr, .dma_rows, .dma_cols, .dma_tgt, .dma_core,
    .dma_busy, .dma_done, .perf);

  imem #(.PIX(IPIX), .CIN_MAX(CIN_MAX)) u_imem (
    .clk, .rst_n, .swap(imem_swap), .active(imem_active),
    .wr_en(d_wr_en && dma_tgt == TGT_IMEM), .wr_pix(IPAW'(d_row)),
    .wr_word(($clog2(CIN_MAX / 4))'(d_col)), .wr_data(d_wr_data),
    .rd_en(imem_rd_en), .rd_pix(imem_rd_pix), .rd_data(imem_rd_data));

  asr #(.CIN_MAX(CIN_MAX)) u_asr (
    .clk, .rst_n, .mode(cfg_r.mode),
    .pre_we, .pre_idx, .pre_data(pre_zero ? '0 : imem_rd_data),
    .hold_we, .shift, .window);

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    db_conv_core #(.ROWS(ROWS), .CIN_MAX(CIN_MAX), .TAG_W(TAG_W)) u_core (
      .clk, .rst_n,
      .mode(cfg_r.mode), .cin_groups(cfg_r.cin_groups),
      .relu_en(cfg_r.relu_en), .descale_sh(cfg_r.descale_sh),
      .window,
      .start(core_start), .tag(core_tag),
      .ready(c_ready[i]), .win_busy(c_win_busy[i]), .idle(c_idle[i]),
      .wb_we(d_wr_en && dma_tgt == TGT_WB && 32'(dma_core) == i),
      .wb_entry(GW'(d_row)), .wb_word(WCW'(d_col)), .wb_data(d_wr_data),
      .prm_we(d_wr_en && dma_tgt == TGT_PRM && 32'(d_col[7:1]) == i),
      .prm_och(d_col[0]), .prm_data(d_wr_data),
      .out_valid(c_out_valid[i]), .out_och(c_out_och[i]), .out_phase(c_out_phase[i]),
      .out_tag(c_out_tag[i]), .out_data(c_out_data[i]), .corr_cnt(c_corr[i]));
  end

  omem #(.PIX(OPIX), .COUT_MAX(COUT_MAX), .NCORES(NCORES)) u_omem (
    .clk, .wr_en(c_out_valid), .wr_pix(omem_pix), .wr_base(omem_base),
    .wr_och(c_out_och[0]), .wr_data(c_out_data),
    .rd_en(d_rd_en && dma_tgt == TGT_OMEM), .rd_pix(OPAW'(d_row)),
    .rd_word(($clog2(COUT_MAX / 4))'(d_col)), .rd_data(d_rd_data));

  axi_dma u_dma (
    .clk, .rst_n, .start(dma_start), .dir(dma_dir), .ext_addr(dma_addr),
    .rows(dma_rows), .cols(dma_cols), .busy(dma_busy), .done(dma_done),
    .wr_en(d_wr_en), .rd_en(d_rd_en), .row(d_row), .col(d_col),
    .wr_data(d_wr_data), .rd_data(d_rd_data),
    .araddr(m_araddr), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));

  // The cores work in lockstep, so their results arrive together.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (c_out_valid == '0) || (c_out_valid == '1))
    else $error("gan_accel_top: cores out of lockstep");
endmodule
