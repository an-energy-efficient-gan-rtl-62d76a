// bcpe_array: the bit-combined PE array of one DB-Conv core.
//
// ROWS x 9 BCPEs. Row r works on input channel r of the current channel
// slice, column t on tap t (t = 3*u + v) of the 3x3 window. Every PE
// multiplies its activation by the matching weight of both kernels held in
// the weight buffer, so the array computes ROWS*9*2 products per cycle. The
// products of each column are summed over the rows (accumulation along the
// input-channel direction) and registered; which columns are then added
// together is decided by the aggregation engine, because it differs between
// convolution and transposed convolution. The 16 x 9 shape follows the source
// design; the adder tree per column is this design's choice.
//
// Timing: column sums appear one cycle after the operands (out_valid follows
// in_valid by one cycle). corr_cnt counts the overflow-estimator corrections
// of that cycle.
module bcpe_array #(
  parameter int unsigned ROWS = 16,
  localparam int unsigned TAPS = 9,
  localparam int unsigned CSW  = 16 + $clog2(ROWS) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [7:0]      act [TAPS][ROWS],
  input  logic signed [7:0]      w0  [TAPS][ROWS],
  input  logic signed [7:0]      w1  [TAPS][ROWS],
  output logic                   out_valid,
  output logic signed [CSW-1:0]  cs0 [TAPS],
  output logic signed [CSW-1:0]  cs1 [TAPS],
  output logic [$clog2(TAPS*ROWS+1)-1:0] corr_cnt
);
  logic signed [15:0] p0 [TAPS][ROWS];
  logic signed [15:0] p1 [TAPS][ROWS];
  logic               cr [TAPS][ROWS];

  for (genvar t = 0; t < TAPS; t++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      bcpe u_pe (.a(act[t][r]), .w0(w0[t][r]), .w1(w1[t][r]),
                 .p0(p0[t][r]), .p1(p1[t][r]), .corr(cr[t][r]));
    end
  end

  logic signed [CSW-1:0] s0 [TAPS];
  logic signed [CSW-1:0] s1 [TAPS];
  logic [$clog2(TAPS*ROWS+1)-1:0] nc;

  always_comb begin
    nc = '0;
    for (int t = 0; t < TAPS; t++) begin
      s0[t] = '0;
      s1[t] = '0;
      for (int r = 0; r < ROWS; r++) begin
        s0[t] += CSW'(p0[t][r]);
        s1[t] += CSW'(p1[t][r]);
        nc    += ($bits(nc))'(cr[t][r]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      corr_cnt  <= '0;
      for (int t = 0; t < TAPS; t++) begin
        cs0[t] <= '0;
        cs1[t] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      corr_cnt  <= in_valid ? nc : '0;
      if (in_valid) begin
        cs0 <= s0;
        cs1 <= s1;
      end
    end
  end
endmodule
