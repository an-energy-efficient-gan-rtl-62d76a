// top_ctrl: top controller of the accelerator.
//
// Runs one layer per start pulse:
//  1. input  : unless the map was prefetched, load it from external memory
//              into the idle IMEM bank; then swap the banks.
//  2. for every group of 2*NCORES output channels:
//     a. load each core's two kernels into its weight buffer and the bias /
//        batch-norm words of all cores;
//     b. scan the output: for every output row, fill the ASR window, then for
//        every window position prefetch the next column(s) from IMEM while
//        the cores compute the current one, shift the window when the cores
//        release it and start them on the new position;
//     c. wait until all results are in OMEM.
//  3. store OMEM to external memory; pulse done.
// If prefetch_next is set, the next layer's input is loaded into the idle
// IMEM bank while the first group is computed, so the next layer can start
// without loading (load_input = 0).
//
// Window feeding per output row r and window position k (the column fetch
// F(x) reads rows r-1..r+1 of input column x for stride 1, rows 2r-1..2r+1
// for stride 2, and rows r, r+1 for transposed conv, where the ASR repeats
// row r; pixels outside the map are fetched as zeros, which is the padding):
//   stride 1 : F(-1) SHIFT F(0) SHIFT, then per k: F(k+1) SHIFT START
//   stride 2 : F(-1) SHIFT,            then per k: F(2k) HOLD F(2k+1) SHIFT START
//   tconv    : F(0) SHIFT,             then per k: F(k+1) SHIFT START
// In transposed-conv mode a window pass yields the four outputs
// (2r + a, 2k + b), a, b in {0, 1}.
//
// The sequence of operations follows the source design's description of
// the ASR and double-buffered IMEM; the FSM, the external memory layout and
// the rule that a layer must fit the on-chip memories are this design's.
// External layout (32-bit words, channel 4w in bits 7:0 of word w):
//   input  : pixel-major, cin_groups*ROWS/4 words per pixel
//   weights: per (group g, core c) a block of cin_groups entries of
//            9*ROWS/2 words (see weight_buffer), blocks in order g*NCORES+c
//   params : per group 2*NCORES words, word 2c+k for core c kernel k
//   output : pixel-major, cout_groups*2*NCORES/4 words per pixel
module top_ctrl
  import gan_pkg::*;
#(
  parameter int unsigned NCORES   = 8,
  parameter int unsigned ROWS     = 16,
  parameter int unsigned CIN_MAX  = 256,
  parameter int unsigned COUT_MAX = 256,
  parameter int unsigned IPIX     = 1024,
  parameter int unsigned OPIX     = 1024,
  parameter int unsigned TAG_W    = 20,
  localparam int unsigned IPAW = $clog2(IPIX),
  localparam int unsigned OPAW = $clog2(OPIX),
  localparam int unsigned CAW  = $clog2(COUT_MAX),
  localparam int unsigned CRW  = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  layer_cfg_t       cfg,
  output logic             done,
  output logic             busy,
  output layer_cfg_t       cfg_r,        // latched configuration, to the datapath
  // IMEM
  output logic             imem_swap,
  output logic             imem_rd_en,
  output logic [IPAW-1:0]  imem_rd_pix,
  // ASR
  output logic             asr_pre_we,
  output logic [1:0]       asr_pre_idx,
  output logic             asr_pre_zero,  // write zeros instead of IMEM data
  output logic             asr_hold_we,
  output logic             asr_shift,
  // cores
  output logic             core_start,
  output logic [TAG_W-1:0] core_tag,
  input  logic             cores_ready,    // all cores ready
  input  logic             cores_win_busy, // some core still reads the window
  input  logic             cores_idle,     // all cores finished
  input  logic             res_valid,      // results of core 0 (all in lockstep)
  input  logic [1:0]       res_phase,
  input  logic [TAG_W-1:0] res_tag,
  input  logic [15:0]      res_corr,       // corrections this cycle, all cores
  // OMEM write address
  output logic [OPAW-1:0]  omem_pix,
  output logic [CAW-1:0]   omem_base,
  // DMA
  output logic             dma_start,
  output logic             dma_dir,
  output logic [31:0]      dma_addr,
  output logic [15:0]      dma_rows,
  output logic [7:0]       dma_cols,
  output dma_tgt_e         dma_tgt,
  output logic [CRW-1:0]   dma_core,
  input  logic             dma_busy,
  input  logic             dma_done,
  // monitoring
  output perf_t            perf
);
  localparam int unsigned WPE = 9 * ROWS / 2;   // words per weight-buffer entry

  typedef enum logic [3:0] {
    C_IDLE, C_LIN, C_LIN_W, C_SWAP, C_LW, C_LW_W, C_LP, C_LP_W,
    C_ROW, C_FETCH, C_FLUSH, C_HOLD, C_SHIFT, C_START, C_DRAIN, C_ST
  } cstate_e;

  cstate_e st;
  logic        st_wait;           // C_ST: store job launched
  logic [4:0]  g;                 // output-channel group
  logic [CRW:0] c;                // core being loaded
  logic [9:0]  r, k;              // window row / position
  logic [9:0]  npr, npc;          // window rows / positions
  logic [10:0] ow, oh;            // output width / height
  logic signed [11:0] fcol;       // input column being fetched
  logic [1:0]  fi;                // row within the fetched column
  logic [1:0]  pre_left;
  logic        in_pre, half;
  logic        pf_pending, pf_running;

  conv_mode_e mode;
  assign mode = cfg_r.mode;

  // fetch address
  logic signed [11:0] frow;
  logic [1:0]         fidx, nf;
  logic               fzero;
  always_comb begin
    unique case (mode)
      MODE_CONV_S2: begin frow = $signed({1'b0, r, 1'b0}) - 12'sd1 + 12'(fi); fidx = fi; end
      MODE_TCONV:   begin frow = $signed({2'b0, r}) + 12'(fi); fidx = (fi == 0) ? 2'd0 : 2'd2; end
      default:      begin frow = $signed({2'b0, r}) - 12'sd1 + 12'(fi); fidx = fi; end
    endcase
    nf    = (mode == MODE_TCONV) ? 2'd2 : 2'd3;
    fzero = (frow < 0) || (frow >= $signed({2'b0, cfg_r.in_h})) ||
            (fcol < 0) || (fcol >= $signed({2'b0, cfg_r.in_w}));
  end

  logic fetch;
  assign fetch       = (st == C_FETCH);
  assign imem_rd_en  = fetch && !fzero;
  assign imem_rd_pix = IPAW'(32'(frow[10:0]) * 32'(cfg_r.in_w) + 32'(fcol[10:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asr_pre_we <= 1'b0; asr_pre_idx <= '0; asr_pre_zero <= 1'b0;
    end else begin
      asr_pre_we   <= fetch;
      asr_pre_idx  <= fidx;
      asr_pre_zero <= fzero;
    end
  end

  assign asr_hold_we = (st == C_HOLD);
  assign asr_shift   = (st == C_SHIFT) && !cores_win_busy;
  assign core_start  = (st == C_START) && cores_ready;
  assign core_tag    = TAG_W'({r, k});
  assign imem_swap   = (st == C_SWAP);
  assign busy        = (st != C_IDLE);

  // DMA job launch
  logic pf_go, main_go;
  always_comb begin
    pf_go = pf_pending && !dma_busy &&
            (st inside {C_ROW, C_FETCH, C_FLUSH, C_HOLD, C_SHIFT, C_START, C_DRAIN, C_ST});
    main_go = 1'b0;
    if (!dma_busy && !pf_go)
      unique case (st)
        C_LIN, C_LW, C_LP: main_go = 1'b1;
        C_ST:              main_go = !st_wait && !pf_pending && !pf_running;
        default:           main_go = 1'b0;
      endcase
  end

  // OMEM address of the results leaving the cores
  logic [9:0] tr, tk;
  assign {tr, tk} = 20'(res_tag);
  always_comb begin
    if (mode == MODE_TCONV)
      omem_pix = OPAW'((32'(tr) * 2 + 32'(res_phase[1])) * 32'(ow) + 32'(tk) * 2 + 32'(res_phase[0]));
    else
      omem_pix = OPAW'(32'(tr) * 32'(ow) + 32'(tk));
    omem_base = CAW'(32'(g) * 2 * NCORES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; st_wait <= 1'b0; cfg_r <= '0; g <= '0; c <= '0; r <= '0; k <= '0;
      npr <= '0; npc <= '0; ow <= '0; oh <= '0; fcol <= '0; fi <= '0;
      pre_left <= '0; in_pre <= 1'b0; half <= 1'b0;
      pf_pending <= 1'b0; pf_running <= 1'b0; done <= 1'b0;
      dma_start <= 1'b0; dma_dir <= 1'b0; dma_addr <= '0; dma_rows <= '0; dma_cols <= '0;
      dma_tgt <= TGT_IMEM; dma_core <= '0;
      perf <= '0;
    end else begin
      done      <= 1'b0;
      dma_start <= 1'b0;

      // counters
      if (core_start) perf.passes <= perf.passes + 1;
      if (st == C_SHIFT && cores_win_busy) perf.shift_wait <= perf.shift_wait + 1;
      if (st == C_START && !cores_ready && !cores_win_busy) perf.core_stall <= perf.core_stall + 1;
      if (fetch && fzero) perf.pad_fetches <= perf.pad_fetches + 1;
      if (imem_swap) perf.bank_swaps <= perf.bank_swaps + 1;
      perf.corrections <= perf.corrections + 32'(res_corr);
      if (res_valid) assert (tr < npr && tk < npc) else $error("top_ctrl: result tag out of range");

      // prefetch of the next layer's input
      if (pf_go) begin
        dma_start  <= 1'b1; dma_dir <= 1'b0; dma_tgt <= TGT_IMEM;
        dma_addr   <= cfg_r.next_in_addr;
        dma_rows   <= cfg_r.next_pixels;
        dma_cols   <= 8'(cfg_r.next_words);
        pf_pending <= 1'b0;
        pf_running <= 1'b1;
      end
      if (pf_running && dma_done) pf_running <= 1'b0;

      unique case (st)
        C_IDLE: if (start) begin
          cfg_r      <= cfg;
          g          <= '0;
          pf_pending <= cfg.prefetch_next;
          unique case (cfg.mode)
            MODE_CONV_S2: begin
              npr <= (cfg.in_h + 10'd1) >> 1; npc <= (cfg.in_w + 10'd1) >> 1;
              oh  <= 11'((cfg.in_h + 10'd1) >> 1); ow <= 11'((cfg.in_w + 10'd1) >> 1);
            end
            MODE_TCONV: begin
              npr <= cfg.in_h; npc <= cfg.in_w;
              oh  <= {cfg.in_h, 1'b0}; ow <= {cfg.in_w, 1'b0};
            end
            default: begin
              npr <= cfg.in_h; npc <= cfg.in_w;
              oh  <= 11'(cfg.in_h); ow <= 11'(cfg.in_w);
            end
          endcase
          st <= cfg.load_input ? C_LIN : C_SWAP;
        end
        C_LIN: if (main_go) begin
          dma_start <= 1'b1; dma_dir <= 1'b0; dma_tgt <= TGT_IMEM;
          dma_addr  <= cfg_r.in_addr;
          dma_rows  <= 16'(32'(cfg_r.in_h) * 32'(cfg_r.in_w));
          dma_cols  <= 8'(32'(cfg_r.cin_groups) * ROWS / 4);
          st <= C_LIN_W;
        end
        C_LIN_W: if (dma_done) st <= C_SWAP;
        C_SWAP: begin
          c  <= '0;
          st <= C_LW;
        end
        C_LW: if (main_go) begin
          dma_start <= 1'b1; dma_dir <= 1'b0; dma_tgt <= TGT_WB;
          dma_core  <= CRW'(c);
          dma_addr  <= cfg_r.w_addr +
                       (32'(g) * NCORES + 32'(c)) * 32'(cfg_r.cin_groups) * WPE * 4;
          dma_rows  <= 16'(cfg_r.cin_groups);
          dma_cols  <= 8'(WPE);
          st <= C_LW_W;
        end
        C_LW_W: if (dma_done) begin
          c  <= c + 1'b1;
          st <= (32'(c) == NCORES - 1) ? C_LP : C_LW;
        end
        C_LP: if (main_go) begin
          dma_start <= 1'b1; dma_dir <= 1'b0; dma_tgt <= TGT_PRM;
          dma_addr  <= cfg_r.p_addr + 32'(g) * 2 * NCORES * 4;
          dma_rows  <= 16'd1;
          dma_cols  <= 8'(2 * NCORES);
          st <= C_LP_W;
        end
        C_LP_W: if (dma_done) begin
          r  <= '0;
          st <= C_ROW;
        end
        C_ROW: begin
          pre_left <= (mode == MODE_CONV_S1) ? 2'd2 : 2'd1;
          in_pre   <= 1'b1;
          fcol     <= (mode == MODE_TCONV) ? 12'sd0 : -12'sd1;
          k        <= '0;
          half     <= 1'b0;
          fi       <= '0;
          st       <= C_FETCH;
        end
        C_FETCH: begin
          if (fi == nf - 2'd1) begin
            fi <= '0;
            st <= C_FLUSH;
          end else begin
            fi <= fi + 2'd1;
          end
        end
        C_FLUSH: st <= (!in_pre && mode == MODE_CONV_S2 && !half) ? C_HOLD : C_SHIFT;
        C_HOLD: begin
          half <= 1'b1;
          fcol <= fcol + 12'sd1;
          st   <= C_FETCH;
        end
        C_SHIFT: if (!cores_win_busy) begin
          fcol <= fcol + 12'sd1;
          half <= 1'b0;
          if (in_pre) begin
            pre_left <= pre_left - 2'd1;
            if (pre_left == 2'd1) in_pre <= 1'b0;
            st <= C_FETCH;
          end else begin
            st <= C_START;
          end
        end
        C_START: if (cores_ready) begin
          if (k + 10'd1 < npc) begin
            k  <= k + 10'd1;
            st <= C_FETCH;
          end else if (r + 10'd1 < npr) begin
            r  <= r + 10'd1;
            st <= C_ROW;
          end else begin
            st <= C_DRAIN;
          end
        end
        C_DRAIN: if (cores_idle) begin
          if (g + 5'd1 < cfg_r.cout_groups) begin
            g  <= g + 5'd1;
            c  <= '0;
            st <= C_LW;
          end else begin
            st_wait <= 1'b0;
            st      <= C_ST;
          end
        end
        C_ST: begin
          if (main_go) begin
            dma_start <= 1'b1; dma_dir <= 1'b1; dma_tgt <= TGT_OMEM;
            dma_addr  <= cfg_r.out_addr;
            dma_rows  <= 16'(32'(oh) * 32'(ow));
            dma_cols  <= 8'(32'(cfg_r.cout_groups) * 2 * NCORES / 4);
            st_wait   <= 1'b1;
          end else if (st_wait && !pf_running && dma_done) begin
            st_wait <= 1'b0;
            done    <= 1'b1;
            st      <= C_IDLE;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(asr_shift && asr_pre_we))
    else $error("top_ctrl: window shift while a prefetch lands");
endmodule
