// tb_bcpe: exhaustive check of the bit-combined PE over every activation and
// lower weight, with a random upper weight each time, plus corner cases. Both
// products are compared with plain signed multiplication; the correction bit
// with the sign of the lower product.
module tb_bcpe;
  logic signed [7:0]  a, w0, w1;
  logic signed [15:0] p0, p1;
  logic               corr;
  int checks = 0, failures = 0;

  bcpe dut (.a, .w0, .w1, .p0, .p1, .corr);

  task automatic check_one(input int av, input int w0v, input int w1v);
    a = 8'(av); w0 = 8'(w0v); w1 = 8'(w1v);
    #1;
    checks++;
    if (int'(p0) != av * w0v || int'(p1) != av * w1v || corr != (av * w1v < 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d w0=%0d w1=%0d p0=%0d p1=%0d corr=%0b", av, w0v, w1v, p0, p1, corr);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = -128; av < 128; av++)
      for (int w1v = -128; w1v < 128; w1v++)
        check_one(av, int'($signed(8'($urandom))), w1v);
    check_one(-128, -128, -128);
    check_one(-128, 127, 127);
    check_one(127, -128, -128);
    check_one(0, -128, -1);
    check_one(-1, 0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
