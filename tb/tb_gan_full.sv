// tb_gan_full: end-to-end test of the accelerator at its default size
// (8 cores, 16 x 9 PE arrays, 256 input channels, 16 output channels per
// group). Runs a stride-1 convolution with 256 input channels that prefetches
// the next input, a stride-2 convolution on the prefetched input and a
// transposed convolution, through the AXI bus, checks every stored output,
// and checks that window passes within a row start every 16 cycles.
module tb_gan_full;
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

  gan_accel_top dut (
    .clk, .rst_n, .start, .cfg, .done, .busy, .perf,
    .m_araddr(araddr), .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata),
    .m_rresp(rresp), .m_rvalid(rvalid), .m_rready(rready), .m_awaddr(awaddr),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb),
    .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp), .m_bvalid(bvalid),
    .m_bready(bready));

  gan_host #(.SMALL(0), .MAX_WAIT(1)) host (
    .clk, .rst_n, .start, .cfg, .done, .perf,
    .mon_start(dut.u_ctrl.core_start), .mon_tag(dut.u_ctrl.core_tag), .*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end
endmodule
