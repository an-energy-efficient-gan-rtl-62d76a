// dae: dual-mode aggregation engine of a DB-Conv core.
//
// Takes the nine per-tap column sums of both kernels from the PE array each
// cycle and accumulates them over the input-channel slices of one pass
// (first/last mark the slices). The accumulation path depends on the mode:
//  - convolution: all nine taps add into one accumulator per kernel, giving
//    one output activation per kernel;
//  - transposed convolution: the taps are split into four groups by the
//    output phase they serve (see gan_pkg::tconv_phase), giving four output
//    activations per kernel at once.
// At the last slice the finished sums (2 or 8) are loaded in parallel into a
// parallel-in serial-out register and leave it one per cycle, kernel 0 first,
// phase 0..3 within a kernel. On the way out each value gets the post
// processing of the layer: bias add (bias is in accumulator units), batch
// norm as a signed Q8.8 multiply, optional ReLU, and a rounding right shift
// by descale_sh to the next layer's fractional length, saturated to FXP8.
//
// The two accumulation paths, the PISO and the list of post operations
// follow the source design. Post-processing one value at a time behind the
// PISO (one multiplier per core), the Q8.8 batch-norm format and the
// rounding are this design's choices.
//
// Timing: out_* is registered, one cycle after a value leaves the PISO. The
// PISO must be empty (or emptying this cycle) when a pass ends; the core
// controller guarantees that and an assertion checks it. piso_cnt tells the
// controller how many values are still queued.
module dae
  import gan_pkg::*;
#(
  parameter int unsigned CSW   = 21,
  parameter int unsigned ACC_W = 32,
  parameter int unsigned TAG_W = 20,
  localparam int unsigned TAPS = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // layer settings, stable during a layer
  input  logic                  tconv,
  input  logic                  relu_en,
  input  logic [5:0]            descale_sh,
  input  logic signed [15:0]    bias   [2],
  input  logic signed [15:0]    bn_mul [2],
  // column sums from the PE array
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [TAG_W-1:0]      in_tag,
  input  logic signed [CSW-1:0] cs0 [TAPS],
  input  logic signed [CSW-1:0] cs1 [TAPS],
  // serial FXP8 output
  output logic                  out_valid,
  output logic                  out_och,     // kernel 0 or 1
  output logic [1:0]            out_phase,   // TConv output phase (0 for Conv)
  output logic [TAG_W-1:0]      out_tag,
  output logic signed [7:0]     out_data,
  output logic [3:0]            piso_cnt
);
  logic signed [ACC_W-1:0] acc  [2][4];
  logic signed [ACC_W-1:0] part [2][4];
  logic signed [ACC_W-1:0] fin  [2][4];

  // Split the column sums into the accumulation paths of the mode.
  logic [1:0] ph;
  always_comb begin
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < 4; p++) part[k][p] = '0;
    for (int t = 0; t < TAPS; t++) begin
      ph = tconv ? tconv_phase(t) : 2'd0;
      part[0][ph] += ACC_W'(cs0[t]);
      part[1][ph] += ACC_W'(cs1[t]);
    end
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < 4; p++)
        fin[k][p] = (in_first ? '0 : acc[k][p]) + part[k][p];
  end

  // PISO: slot 0 is the head.
  logic signed [ACC_W-1:0] piso     [8];
  logic                    piso_och [8];
  logic [1:0]              piso_ph  [8];
  logic [TAG_W-1:0]        piso_tag;
  logic                    shift_out;

  assign shift_out = (piso_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      piso_cnt <= '0;
      piso_tag <= '0;
      for (int k = 0; k < 2; k++)
        for (int p = 0; p < 4; p++) acc[k][p] <= '0;
      for (int i = 0; i < 8; i++) begin
        piso[i]     <= '0;
        piso_och[i] <= 1'b0;
        piso_ph[i]  <= '0;
      end
    end else begin
      if (in_valid) acc <= fin;
      if (in_valid && in_last) begin
        piso_tag <= in_tag;
        if (tconv) begin
          for (int i = 0; i < 8; i++) begin
            piso[i]     <= fin[i / 4][i % 4];
            piso_och[i] <= 1'((i / 4));
            piso_ph[i]  <= 2'(i % 4);
          end
          piso_cnt <= 4'd8;
        end else begin
          for (int i = 0; i < 8; i++) begin
            piso[i]     <= (i < 2) ? fin[i][0] : '0;
            piso_och[i] <= 1'(i);
            piso_ph[i]  <= 2'd0;
          end
          piso_cnt <= 4'd2;
        end
      end else if (shift_out) begin
        for (int i = 0; i < 7; i++) begin
          piso[i]     <= piso[i+1];
          piso_och[i] <= piso_och[i+1];
          piso_ph[i]  <= piso_ph[i+1];
        end
        piso_cnt <= piso_cnt - 4'd1;
      end
    end
  end

  // Post processing of the PISO head.
  logic signed [ACC_W:0]      biased;
  logic signed [ACC_W+16:0]   scaled;
  logic signed [ACC_W+16:0]   rounded;
  logic signed [7:0]          sat;

  always_comb begin
    biased = (ACC_W+1)'(piso[0]) + (ACC_W+1)'(bias[piso_och[0]]);
    scaled = ((ACC_W+17)'(biased) * (ACC_W+17)'(bn_mul[piso_och[0]])) >>> BN_FRAC;
    if (relu_en && scaled < 0) scaled = '0;
    if (descale_sh == 0)
      rounded = scaled;
    else
      rounded = (scaled + signed'((ACC_W+17)'(1) << (descale_sh - 6'd1))) >>> descale_sh;
    if (rounded > 127)       sat = 8'sd127;
    else if (rounded < -128) sat = -8'sd128;
    else                     sat = rounded[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_och   <= 1'b0;
      out_phase <= '0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= shift_out;
      out_och   <= piso_och[0];
      out_phase <= piso_ph[0];
      out_tag   <= piso_tag;
      out_data  <= sat;
    end
  end

  // A pass may only end when the PISO has room for its results.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_last) |-> (piso_cnt <= 4'd1))
    else $error("dae: PISO overrun");
endmodule
