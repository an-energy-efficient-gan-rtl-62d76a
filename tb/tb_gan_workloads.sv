// tb_gan_workloads: layers of the image-translation generator's shapes on
// the default-size accelerator, loaded and stored over the AXI bus:
//   1. a complete residual-block layer, 3x3 stride-1 convolution from 256
//      to 256 channels on a 32 x 32 map, with ReLU;
//   2. a 16 x 64 band of a stride-2 down-sampling layer, 64 -> 128 channels;
//   3. an 8 x 32 band of an up-sampling transposed convolution, 256 -> 128
//      channels, 16 x 64 outputs.
// Every stored output is checked against a reference convolution, and
// passes within a row must start exactly 16 cycles apart in layers with
// 256 input channels.
module tb_gan_workloads;
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

  gan_host #(.SMALL(0), .MAX_WAIT(1), .RESIDUAL(1)) host (
    .clk, .rst_n, .start, .cfg, .done, .perf,
    .mon_start(dut.u_ctrl.core_start), .mon_tag(dut.u_ctrl.core_tag), .*);

  initial begin
    repeat (8000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end
endmodule
