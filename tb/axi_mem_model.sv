// axi_mem_model: behavioural model of the external memory behind the
// accelerator's 32-bit AXI bus, for simulation only.
//
// Word-addressed array of WORDS 32-bit words (byte address / 4). Serves one
// single-beat read or write at a time. Ready and response delays are random
// (0..MAX_WAIT cycles) so that handshakes are exercised; the seed is fixed by
// the simulator. Testbenches reach the array through hierarchical
// references (mem).
module axi_mem_model #(
  parameter int unsigned WORDS    = 65536,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
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
  logic [31:0] mem [WORDS];
  int unsigned reads, writes;

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  initial begin
    arready = 0; rvalid = 0; rdata = 0; awready = 0; wready = 0; bvalid = 0;
    reads = 0; writes = 0;
  end

  // read channel
  initial begin
    logic [31:0] a;
    forever begin
      @(posedge clk);
      if (rst_n && arvalid) begin
        repeat ($urandom_range(MAX_WAIT, 0)) @(posedge clk);
        arready <= 1;
        a = araddr;
        @(posedge clk);
        arready <= 0;
        repeat ($urandom_range(MAX_WAIT, 0)) @(posedge clk);
        rdata  <= mem[(a >> 2) % WORDS];
        rvalid <= 1;
        reads++;
        do @(posedge clk); while (!rready);
        rvalid <= 0;
      end
    end
  end

  // write channel (address and data accepted together)
  initial begin
    logic [31:0] a, d;
    forever begin
      @(posedge clk);
      if (rst_n && awvalid && wvalid) begin
        repeat ($urandom_range(MAX_WAIT, 0)) @(posedge clk);
        awready <= 1;
        wready  <= 1;
        a = awaddr;
        d = wdata;
        @(posedge clk);
        awready <= 0;
        wready  <= 0;
        for (int b = 0; b < 4; b++)
          if (wstrb[b]) mem[(a >> 2) % WORDS][b*8 +: 8] = d[b*8 +: 8];
        writes++;
        repeat ($urandom_range(MAX_WAIT, 0)) @(posedge clk);
        bvalid <= 1;
        do @(posedge clk); while (!bready);
        bvalid <= 0;
      end
    end
  end
endmodule
