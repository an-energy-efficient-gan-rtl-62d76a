// tb_gan_accel_top: end-to-end test of the accelerator at reduced size
// (2 cores, 4 PE rows, 32 input channels). Runs a stride-1 convolution that
// prefetches the next input, a stride-2 convolution on that prefetched
// input, and two transposed convolutions (one with a single channel slice,
// which makes the cores stall on their serial outputs), all through the AXI
// bus with random handshake delays, and checks every stored output.
module tb_gan_accel_top;
  import gan_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, done, busy;
  layer_cfg_t cfg;
  perf_t perf;
  logic [31:0] araddr, rdata, awaddr, wdata;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  logic [1:0] rresp, bresp;
  logic [3:0] wstrb;

  gan_accel_top #(.NCORES(2), .ROWS(4), .CIN_MAX(32), .COUT_MAX(16), .IPIX(64), .OPIX(256)) dut (
    .clk, .rst_n, .start, .cfg, .done, .busy, .perf,
    .m_araddr(araddr), .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata),
    .m_rresp(rresp), .m_rvalid(rvalid), .m_rready(rready), .m_awaddr(awaddr),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb),
    .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp), .m_bvalid(bvalid),
    .m_bready(bready));

  gan_host #(.NCORES(2), .ROWS(4), .CIN_MAX(32), .SMALL(1), .MAX_WAIT(2)) host (
    .clk, .rst_n, .start, .cfg, .done, .perf,
    .mon_start(dut.u_ctrl.core_start), .mon_tag(dut.u_ctrl.core_tag), .*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end
endmodule
