// gan_pkg: types and constants shared by the GAN accelerator.
//
// The accelerator runs one convolution layer at a time. A layer is described
// by layer_cfg_t, which the host presents on the top's configuration port
// together with a start pulse. Three layer types are supported, matching the
// generator of an image-to-image GAN: 3x3 convolution with stride 1, 3x3
// convolution with stride 2, and 3x3 transposed convolution with stride 2
// (computed with the data-remapping scheme, four outputs per pass). All
// layers use padding 1. Field widths are this design's choice.
package gan_pkg;

  typedef enum logic [1:0] {
    MODE_CONV_S1 = 2'd0,   // 3x3 conv, stride 1, output H x W
    MODE_CONV_S2 = 2'd1,   // 3x3 conv, stride 2, output ceil(H/2) x ceil(W/2)
    MODE_TCONV   = 2'd2    // 3x3 transposed conv, stride 2, output 2H x 2W
  } conv_mode_e;

  // Targets of an external-memory transfer.
  typedef enum logic [1:0] {
    TGT_IMEM = 2'd0,       // input feature map into the idle IMEM bank
    TGT_WB   = 2'd1,       // weight kernels into one core's weight buffer
    TGT_PRM  = 2'd2,       // bias / batch-norm words into the cores
    TGT_OMEM = 2'd3        // output feature map from OMEM to external memory
  } dma_tgt_e;

  typedef struct packed {
    conv_mode_e  mode;
    logic [9:0]  in_h;           // input feature-map height
    logic [9:0]  in_w;           // input feature-map width
    logic [4:0]  cin_groups;     // input channels / PE rows (1 .. CIN_MAX/PE rows)
    logic [4:0]  cout_groups;    // output channels / (2 * cores)
    logic [5:0]  descale_sh;     // right shift to the next layer's fractional length
    logic        relu_en;        // apply ReLU
    logic        load_input;     // fetch the input map (else use the prefetched bank)
    logic        prefetch_next;  // load the next layer's input while computing
    logic [15:0] next_pixels;    // pixels of the next layer's input
    logic [6:0]  next_words;     // 32-bit words per pixel of the next input
    logic [31:0] in_addr;        // byte address of the input map
    logic [31:0] next_in_addr;   // byte address of the next layer's input map
    logic [31:0] w_addr;         // byte address of the weight kernels
    logic [31:0] p_addr;         // byte address of the bias / batch-norm words
    logic [31:0] out_addr;       // byte address for the output map
  } layer_cfg_t;

  // Event counters of the top controller, for performance monitoring.
  typedef struct packed {
    logic [31:0] passes;       // window passes started (all cores together)
    logic [31:0] shift_wait;   // cycles the next window was ready but a core still read the old one
    logic [31:0] core_stall;   // cycles a core could not start because its serial output was full
    logic [31:0] pad_fetches;  // prefetches of a padding pixel (zero, no IMEM read)
    logic [31:0] bank_swaps;   // IMEM double-buffer swaps
    logic [31:0] corrections;  // overflow-estimator corrections in all PEs
  } perf_t;

  // Batch-norm multiplier is a signed Q8.8 number.
  localparam int unsigned BN_FRAC = 8;

  // Transposed-convolution output phase served by 3x3 tap t = 3*u + v when the
  // activation window holds rows {i, i, i+1} and columns {j, j, j+1}:
  // bit 1 = output row is odd (u != 1), bit 0 = output column is odd (v != 1).
  function automatic logic [1:0] tconv_phase(input int unsigned t);
    return {(t / 3) != 1, (t % 3) != 1};
  endfunction

endpackage
