// omem: output memory.
//
// Holds the finished FXP8 output map of a layer, PIX pixel vectors of
// COUT_MAX channels. Because partial sums never leave the cores, only
// descaled 8-bit results are stored here. All NCORES cores deliver one
// result per cycle in lockstep, for the same pixel and kernel index: core c
// writes channel base + 2c + och. The map is read back as 32-bit words
// (four channels, channel 4w in bits 7:0) for the transfer to external
// memory, with one cycle of latency. Sizes and port shapes are this design's
// choices.
module omem #(
  parameter int unsigned PIX      = 1024,
  parameter int unsigned COUT_MAX = 256,
  parameter int unsigned NCORES   = 8,
  localparam int unsigned PVW = COUT_MAX * 8,
  localparam int unsigned PAW = $clog2(PIX),
  localparam int unsigned CAW = $clog2(COUT_MAX),
  localparam int unsigned WAW = $clog2(COUT_MAX / 4)
) (
  input  logic              clk,
  input  logic [NCORES-1:0] wr_en,
  input  logic [PAW-1:0]    wr_pix,
  input  logic [CAW-1:0]    wr_base,
  input  logic              wr_och,
  input  logic [7:0]        wr_data [NCORES],
  input  logic              rd_en,
  input  logic [PAW-1:0]    rd_pix,
  input  logic [WAW-1:0]    rd_word,
  output logic [31:0]       rd_data
);
  logic [PVW-1:0] mem [PIX];

  always_ff @(posedge clk) begin
    for (int c = 0; c < NCORES; c++)
      if (wr_en[c])
        mem[wr_pix][(32'(wr_base) + 2 * c + 32'(wr_och)) * 8 +: 8] <= wr_data[c];
    if (rd_en) rd_data <= mem[rd_pix][rd_word*32 +: 32];
  end
endmodule
