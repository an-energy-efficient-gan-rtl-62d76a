// weight_buffer: per-core store for the two weight kernels a DB-Conv core
// works on (kernel 0 and kernel 1, i.e. two output channels).
//
// Entry e holds the weights of input-channel slice e: for both kernels, all
// 9 taps of ROWS input channels, 2*9*ROWS bytes. Byte b of an entry is
// kernel k, tap t, row r with b = (k*9 + t)*ROWS + r. The entry is written as
// 32-bit words from the external-memory bus (byte 4*c of the entry is bits
// 7:0 of word c) and read as a whole, one entry per cycle, with one cycle of
// latency as a block RAM would. Depth CIN_MAX/ROWS covers a 256-channel
// kernel. Holding two kernels follows the source design; the layout and the
// word-wide write port are this design's choices.
module weight_buffer #(
  parameter int unsigned ROWS    = 16,
  parameter int unsigned CIN_MAX = 256,
  localparam int unsigned DEPTH = CIN_MAX / ROWS,
  localparam int unsigned EW    = 2 * 9 * ROWS * 8,
  localparam int unsigned WPE   = EW / 32,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(WPE)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_entry,
  input  logic [CW-1:0] wr_word,
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_entry,
  output logic [EW-1:0] rd_data
);
  logic [EW-1:0] mem [DEPTH];

  initial begin
    assert (EW % 32 == 0) else $error("weight_buffer: ROWS must be even");
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_entry][wr_word*32 +: 32] <= wr_data;
    if (rd_en) rd_data <= mem[rd_entry];
  end
endmodule
