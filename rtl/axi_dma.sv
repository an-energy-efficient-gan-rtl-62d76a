// axi_dma: moves data between external memory and the on-chip memories over
// a 32-bit AXI bus (the accelerator is the master).
//
// A job copies rows x cols 32-bit words between a contiguous external
// region starting at ext_addr (word (row, col) at ext_addr + 4*(row*cols +
// col)) and an on-chip target addressed by (row, col). dir = 0 reads
// external memory and writes the target; dir = 1 reads the target (one
// cycle of latency) and writes external memory. Which memory is the target
// is decided outside, by whoever started the job.
//
// The source design only says that memories and controller reach external
// memory through a 32-bit AXI bus. This master uses single-beat transfers
// with one transaction outstanding (the AXI4-Lite subset of the channels),
// which is simple and correct but reaches at most a third of the bus's
// bandwidth; burst support is left out. Handshake rules are asserted.
module axi_dma (
  input  logic        clk,
  input  logic        rst_n,
  // job
  input  logic        start,
  input  logic        dir,
  input  logic [31:0] ext_addr,
  input  logic [15:0] rows,
  input  logic [7:0]  cols,
  output logic        busy,
  output logic        done,
  // on-chip side
  output logic        wr_en,     // write (row, col) with wr_data this cycle
  output logic        rd_en,     // read (row, col); data expected next cycle
  output logic [15:0] row,
  output logic [7:0]  col,
  output logic [31:0] wr_data,
  input  logic [31:0] rd_data,
  // AXI master
  output logic [31:0] araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready,
  output logic [31:0] awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready
);
  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_CRD, S_CAP, S_W, S_B} state_e;
  state_e      st;
  logic        dir_r;
  logic [15:0] nrows;
  logic [7:0]  ncols;
  logic [31:0] addr;
  logic        aw_done, w_done;
  logic        last_word;

  assign last_word = (row == nrows - 16'd1) && (col == ncols - 8'd1);
  assign busy      = (st != S_IDLE);
  assign rready    = (st == S_R);
  assign bready    = (st == S_B);
  assign araddr    = addr;
  assign awaddr    = addr;
  assign wstrb     = 4'hf;
  assign arvalid   = (st == S_AR);
  assign awvalid   = (st == S_W) && !aw_done;
  assign wvalid    = (st == S_W) && !w_done;
  assign rd_en     = (st == S_CRD);
  assign wr_en     = (st == S_R) && rvalid;
  assign wr_data   = rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; dir_r <= 1'b0; nrows <= '0; ncols <= '0; addr <= '0;
      row <= '0; col <= '0; aw_done <= 1'b0; w_done <= 1'b0;
      wdata <= '0; done <= 1'b0;
    end else begin
      done  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          dir_r <= dir; nrows <= rows; ncols <= cols; addr <= ext_addr;
          row <= '0; col <= '0;
          st <= dir ? S_CRD : S_AR;
        end
        S_AR: if (arready) st <= S_R;
        S_CRD: st <= S_CAP;
        S_CAP: begin
          wdata   <= rd_data;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          st      <= S_W;
        end
        S_W: begin
          if (!w_done && wvalid && wready)    w_done  <= 1'b1;
          if (!aw_done && awvalid && awready) aw_done <= 1'b1;
          if ((w_done || wready) && (aw_done || awready)) st <= S_B;
        end
        default: ;
      endcase
      // step to the next word
      if ((st == S_R && rvalid) || (st == S_B && dir_r && bvalid)) begin
        if (last_word) begin
          st   <= S_IDLE;
          done <= 1'b1;
        end else begin
          st   <= dir_r ? S_CRD : S_AR;
          addr <= addr + 32'd4;
          if (col == ncols - 8'd1) begin
            col <= '0;
            row <= row + 16'd1;
          end else begin
            col <= col + 8'd1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) arvalid && !arready |=> arvalid && $stable(araddr))
    else $error("axi_dma: AR dropped before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) awvalid && !awready |=> awvalid && $stable(awaddr))
    else $error("axi_dma: AW dropped before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) wvalid && !wready |=> wvalid && $stable(wdata))
    else $error("axi_dma: W dropped before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("axi_dma: job started while busy");
endmodule
