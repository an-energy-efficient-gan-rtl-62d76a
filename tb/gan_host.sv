// gan_host: simulation-only host and external memory for the accelerator
// testbenches.
//
// Holds the AXI memory model, places random input maps, kernels and bias /
// batch-norm words in it in the accelerator's external layout, runs a list
// of layers (SMALL = 1: the reduced-size list, SMALL = 0: the default-size
// list, RESIDUAL = 1: generator-sized layers, see tb_gan_workloads), and
// checks every output word the accelerator stores against a
// reference convolution computed here from the same data. It also checks
// that consecutive window passes within an output row start exactly one
// pass length apart, and counts how often each mechanism of the design
// occurred: a failure is counted for any that never did. Prints the
// TB_RESULT line and ends the simulation.
module gan_host
  import gan_pkg::*;
#(
  parameter int unsigned NCORES   = 8,
  parameter int unsigned ROWS     = 16,
  parameter int unsigned CIN_MAX  = 256,
  parameter bit          SMALL    = 0,
  parameter int unsigned MAX_WAIT = 1,
  parameter bit          RESIDUAL = 0
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        start,
  output layer_cfg_t  cfg,
  input  logic        done,
  input  perf_t       perf,
  // window-pass monitor
  input  logic        mon_start,
  input  logic [19:0] mon_tag,
  // AXI slave
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  localparam int WPE = 9 * ROWS / 2;
  // external memory regions (word addresses); the generator-sized layers
  // need room for a 32 x 32 x 256 map and 256 x 256 x 9 weights
  localparam int IN_A   = 0;
  localparam int NEXT_A = RESIDUAL ? 65536 : 16384;
  localparam int W_A    = RESIDUAL ? 131072 : 32768;
  localparam int P_A    = RESIDUAL ? 278528 : 57344;
  localparam int OUT_A  = RESIDUAL ? 279552 : 58368;
  localparam int WORDS  = RESIDUAL ? 524288 : 65536;

  axi_mem_model #(.WORDS(WORDS), .MAX_WAIT(MAX_WAIT)) u_mem (.clk, .rst_n, .*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Window-pass spacing within an output row. A pass takes cin_groups
  // cycles. Preparing the next window takes 6 cycles for stride 1 (three
  // fetches, a flush, a shift), 11 for stride 2 and 5 for transposed conv,
  // and a pass may only end once the previous pass's 2 (Conv) or 8 (TConv)
  // serial outputs can drain. When cin_groups covers both, passes must start
  // exactly cin_groups apart; otherwise never closer than that.
  int last_start = -1, last_row = -1, cur_groups = 1, cur_need = 1, spaced = 0;
  always @(posedge clk) if (rst_n && mon_start) begin
    if (int'(mon_tag[19:10]) == last_row) begin
      checks++;
      if ((cur_groups >= cur_need) ? (cyc - last_start != cur_groups)
                                   : (cyc - last_start < cur_groups)) begin
        failures++;
        if (failures < 10) $display("FAIL pass spacing %0d, expected %0d", cyc - last_start, cur_groups);
      end else spaced++;
    end
    last_row   = int'(mon_tag[19:10]);
    last_start = cyc;
  end

  // current input map, channel-last: x[(y*W + x)*CIN_MAX + c]
  byte cur_in [];
  byte next_in [];
  int  n_s1 = 0, n_s2 = 0, n_tc = 0, n_prefetched = 0;

  function automatic int post(longint acc, int b, int m, bit relu, int sh);
    longint v = (acc + longint'(b)) * longint'(m);
    v = v >>> 8;
    if (relu && v < 0) v = 0;
    if (sh > 0) v = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return int'(v);
  endfunction

  // write a map into external memory, pixel-major, nw words per pixel
  task automatic put_map(input int base, input int pixels, input int nch, ref byte m []);
    for (int p = 0; p < pixels; p++)
      for (int w = 0; w < nch / 4; w++)
        u_mem.mem[base + p * (nch / 4) + w] =
          {m[p*CIN_MAX + 4*w + 3], m[p*CIN_MAX + 4*w + 2], m[p*CIN_MAX + 4*w + 1], m[p*CIN_MAX + 4*w]};
  endtask

  task automatic rand_map(input int pixels, input int nch, ref byte m []);
    m = new[pixels * CIN_MAX];
    foreach (m[i]) m[i] = 0;
    for (int p = 0; p < pixels; p++)
      for (int c = 0; c < nch; c++) m[p*CIN_MAX + c] = byte'($urandom_range(255, 0));
  endtask

  task automatic run_layer(input conv_mode_e mode, input int H, input int W, input int cg,
                           input int og, input bit relu, input int sh, input bit load,
                           input bit pf, input int nH, input int nW, input int ncg);
    int nch = cg * ROWS, noch = og * 2 * NCORES;
    int OH, OW, t0, cycles;
    byte wk [];          // wk[(o*9 + t)*CIN_MAX + c]
    int bias [], bnm [];
    n_s1 += (mode == MODE_CONV_S1); n_s2 += (mode == MODE_CONV_S2); n_tc += (mode == MODE_TCONV);
    if (load) begin
      rand_map(H * W, nch, cur_in);
      put_map(IN_A, H * W, nch, cur_in);
    end else begin
      cur_in = next_in;
      n_prefetched++;
    end
    if (pf) begin
      rand_map(nH * nW, ncg * ROWS, next_in);
      put_map(NEXT_A, nH * nW, ncg * ROWS, next_in);
    end
    // kernels and parameters
    wk = new[noch * 9 * CIN_MAX];
    bias = new[noch]; bnm = new[noch];
    foreach (wk[i]) wk[i] = byte'($urandom_range(255, 0));
    for (int o = 0; o < noch; o++) begin
      bias[o] = $urandom_range(4000, 0) - 2000;
      bnm[o]  = (o % 3 == 2) ? -($urandom_range(300, 50)) : $urandom_range(400, 50);
    end
    for (int g = 0; g < og; g++)
      for (int cr = 0; cr < NCORES; cr++)
        for (int e = 0; e < cg; e++)
          for (int w = 0; w < WPE; w++) begin
            logic [31:0] word;
            for (int b = 0; b < 4; b++) begin
              int idx, k, t, r;
              idx = 4 * w + b; k = idx / (9 * ROWS); t = (idx / ROWS) % 9; r = idx % ROWS;
              word[8*b +: 8] = wk[((g*2*NCORES + 2*cr + k) * 9 + t) * CIN_MAX + e*ROWS + r];
            end
            u_mem.mem[W_A + ((g * NCORES + cr) * cg + e) * WPE + w] = word;
          end
    for (int o = 0; o < noch; o++) u_mem.mem[P_A + o] = {16'(bnm[o]), 16'(bias[o])};
    // configure and run
    cfg = '0;
    cfg.mode = mode; cfg.in_h = 10'(H); cfg.in_w = 10'(W);
    cfg.cin_groups = 5'(cg); cfg.cout_groups = 5'(og);
    cfg.descale_sh = 6'(sh); cfg.relu_en = relu;
    cfg.load_input = load; cfg.prefetch_next = pf;
    cfg.next_pixels = 16'(nH * nW); cfg.next_words = 7'(ncg * ROWS / 4);
    cfg.in_addr = IN_A * 4; cfg.next_in_addr = NEXT_A * 4; cfg.w_addr = W_A * 4;
    cfg.p_addr = P_A * 4; cfg.out_addr = OUT_A * 4;
    cur_groups = cg;
    case (mode)
      MODE_CONV_S2: cur_need = 11;
      MODE_TCONV:   cur_need = 10;
      default:      cur_need = 6;
    endcase
    last_row = -1;
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    // reference
    case (mode)
      MODE_CONV_S2: begin OH = (H + 1) / 2; OW = (W + 1) / 2; end
      MODE_TCONV:   begin OH = 2 * H; OW = 2 * W; end
      default:      begin OH = H; OW = W; end
    endcase
    for (int oy = 0; oy < OH; oy++)
      for (int ox = 0; ox < OW; ox++)
        for (int o = 0; o < noch; o++) begin
          longint acc = 0;
          int got, exp_v;
          for (int u = 0; u < 3; u++)
            for (int v = 0; v < 3; v++) begin
              int iy, ix;
              bit ok;
              if (mode == MODE_TCONV) begin
                // zero-inserted input z(2i, 2j) = x(i, j), padding 1
                int zy = oy + u - 1, zx = ox + v - 1;
                ok = (zy >= 0) && (zx >= 0) && (zy % 2 == 0) && (zx % 2 == 0);
                iy = zy / 2; ix = zx / 2;
              end else begin
                int s = (mode == MODE_CONV_S2) ? 2 : 1;
                iy = s * oy + u - 1; ix = s * ox + v - 1;
                ok = 1;
              end
              ok = ok && iy >= 0 && ix >= 0 && iy < H && ix < W;
              if (ok)
                for (int c = 0; c < nch; c++)
                  acc += longint'(cur_in[(iy * W + ix) * CIN_MAX + c]) *
                         longint'(wk[(o * 9 + 3 * u + v) * CIN_MAX + c]);
            end
          exp_v = post(acc, bias[o], bnm[o], relu, sh);
          got = int'($signed(8'(u_mem.mem[OUT_A + (oy * OW + ox) * (noch / 4) + o / 4] >> (8 * (o % 4)))));
          checks++;
          if (got != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode %0d out (%0d,%0d) ch %0d: got %0d exp %0d", mode, oy, ox, o, got, exp_v);
          end
        end
    $display("layer mode %0d %0dx%0d cin %0d cout %0d: %0d cycles, %0d passes", mode, H, W, nch,
             noch, cycles, perf.passes);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-28s : %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (RESIDUAL) begin
      // one residual-block layer: 3x3, 256 -> 256 channels, 32 x 32
      run_layer(MODE_CONV_S1, 32, 32, CIN_MAX / ROWS, 256 / (2 * NCORES), 1, 10, 1, 0, 0, 0, 0);
      // a 16-row band of a down-sampling layer: stride 2, 64 -> 128
      // channels, 64 columns
      run_layer(MODE_CONV_S2, 16, 64, 64 / ROWS, 128 / (2 * NCORES), 1, 9, 1, 0, 0, 0, 0);
      // an 8-row band of an up-sampling layer: TConv, 256 -> 128
      // channels, 32 columns in, 16 x 64 out
      run_layer(MODE_TCONV, 8, 32, CIN_MAX / ROWS, 128 / (2 * NCORES), 1, 10, 1, 0, 0, 0, 0);
      need("stride-1 convolution layer", n_s1);
      need("stride-2 convolution layer", n_s2);
      need("transposed convolution layer", n_tc);
      need("IMEM bank swaps", int'(perf.bank_swaps));
      need("passes at full rate", spaced);
      need("padding fetches", int'(perf.pad_fetches));
      need("ASR ready, core busy", int'(perf.shift_wait));
      need("overflow corrections", int'(perf.corrections));
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (SMALL) begin
      run_layer(MODE_CONV_S1, 5, 6, CIN_MAX / ROWS, 2, 1, 8, 1, 1, 6, 7, 2);
      run_layer(MODE_CONV_S2, 6, 7, 2, 1, 0, 6, 0, 0, 0, 0, 0);
      run_layer(MODE_TCONV,   3, 4, 1, 2, 0, 5, 1, 0, 0, 0, 0);
      run_layer(MODE_TCONV,   4, 3, CIN_MAX / ROWS, 1, 1, 9, 1, 0, 0, 0, 0);
    end else begin
      run_layer(MODE_CONV_S1, 3, 4, CIN_MAX / ROWS, 1, 1, 10, 1, 1, 3, 3, CIN_MAX / ROWS);
      run_layer(MODE_CONV_S2, 3, 3, CIN_MAX / ROWS, 1, 0, 10, 0, 0, 0, 0, 0);
      run_layer(MODE_TCONV,   2, 3, CIN_MAX / ROWS, 1, 0, 10, 1, 0, 0, 0, 0);
    end
    need("stride-1 convolution layer", n_s1);
    need("stride-2 convolution layer", n_s2);
    need("transposed convolution layer", n_tc);
    need("passes at full rate", spaced);
    need("prefetched input used", n_prefetched);
    need("IMEM bank swaps", int'(perf.bank_swaps));
    need("padding fetches", int'(perf.pad_fetches));
    need("ASR ready, core busy", int'(perf.shift_wait));
    need("overflow corrections", int'(perf.corrections));
    if (SMALL) need("core stall (output drain)", int'(perf.core_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
