// imem: double-buffered input memory.
//
// Two banks of PIX pixel vectors (CIN_MAX channels x 8 bits each). At any
// time one bank is active: the ASR prefetch reads whole pixel vectors from
// it, one per cycle with one cycle of latency. The other bank is filled from
// external memory, one 32-bit word (four channels, channel 4w in bits 7:0)
// at a time, so loading the next input map hides behind computation. swap
// exchanges the roles of the banks. Double buffering follows the source
// design; the sizes and port shapes are this design's choices.
module imem #(
  parameter int unsigned PIX     = 1024,
  parameter int unsigned CIN_MAX = 256,
  localparam int unsigned PVW = CIN_MAX * 8,
  localparam int unsigned PAW = $clog2(PIX),
  localparam int unsigned WAW = $clog2(CIN_MAX / 4)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           swap,
  output logic           active,     // bank read by the ASR
  // fill port (idle bank)
  input  logic           wr_en,
  input  logic [PAW-1:0] wr_pix,
  input  logic [WAW-1:0] wr_word,
  input  logic [31:0]    wr_data,
  // read port (active bank)
  input  logic           rd_en,
  input  logic [PAW-1:0] rd_pix,
  output logic [PVW-1:0] rd_data
);
  logic [PVW-1:0] bank0 [PIX];
  logic [PVW-1:0] bank1 [PIX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    active <= 1'b0;
    else if (swap) active <= !active;
  end

  always_ff @(posedge clk) begin
    if (wr_en && active)  bank0[wr_pix][wr_word*32 +: 32] <= wr_data;
    if (wr_en && !active) bank1[wr_pix][wr_word*32 +: 32] <= wr_data;
    if (rd_en) rd_data <= active ? bank1[rd_pix] : bank0[rd_pix];
  end
endmodule
