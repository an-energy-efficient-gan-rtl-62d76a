// bcpe: bit-combined processing element.
//
// Two signed 8-bit weights W0 and W1 are packed into one operand
// (W0 * 2^17 + W1, the job of the DSP pre-adder) and multiplied by one signed
// 8-bit activation A in a single multiplier. The 34-bit product holds
// A*W0 * 2^17 + A*W1: the low 16 bits are A*W1, the bits from 17 up are A*W0,
// except that a negative A*W1 borrows one from the upper field. The overflow
// estimator predicts that borrow from the signs of A and W1 and adds the
// correction bit back, so both products come out exact.
//
// The packing, the 17-bit offset and the sign-based estimator follow the
// source design. Its estimator is described as looking only at the two sign
// bits; this one also checks that neither operand is zero, because a zero
// product has no borrow even when the sign bits differ.
//
// The packed operand is 26 bits wide, not 25: W0 = -128 together with a
// negative W1 gives -2^24 - |W1|, which a 25-bit signed field cannot hold.
// A 26-bit multiplier input, as the DSP offers, carries it exactly.
//
// Purely combinational; the enclosing array registers the column sums, as
// the DSP output register would.
module bcpe (
  input  logic signed [7:0]  a,      // activation
  input  logic signed [7:0]  w0,     // weight of kernel 0 (upper field)
  input  logic signed [7:0]  w1,     // weight of kernel 1 (lower field)
  output logic signed [15:0] p0,     // a * w0
  output logic signed [15:0] p1,     // a * w1
  output logic               corr    // correction bit inserted
);
  logic signed [25:0] wpack;
  logic signed [33:0] prod;

  always_comb begin
    wpack = 26'($signed({w0, 17'b0})) + 26'(w1);
    prod  = 34'(wpack) * 34'(a);
    corr  = (a[7] ^ w1[7]) & (|a) & (|w1);
    p1    = prod[15:0];
    p0    = prod[32:17] + 16'(corr);  // bits 33 and 16 only repeat signs
  end
endmodule
