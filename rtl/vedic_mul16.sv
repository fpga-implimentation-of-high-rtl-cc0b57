// vedic_mul16: 16x16-bit unsigned Vedic multiplier.
//
// The next level of the same hierarchy: four 8x8 Vedic multipliers form the
// vertical and crosswise products of the 8-bit halves and three ripple-carry
// adders (24, 16 and 24 bits) combine them, p[7:0] = q0[7:0]. The filter
// needs it only for its sum subfilters, whose pre-added operands (up to
// 10 bits) no longer fit the 8x8 multiplier; the upper operand bits are
// then zero. Purely combinational.
//   a, b : 16-bit unsigned operands    p : 32-bit product
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;
  logic [23:0] s1;
  logic [15:0] s2;
  logic [23:0] s3;
  logic        co1, co2, co3;

  vedic_mul8 u_m0 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_mul8 u_m1 (.a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic_mul8 u_m2 (.a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic_mul8 u_m3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  rc_adder #(.W(24)) u_add1 (.a({q3, 8'h00}), .b({8'h00, q2}), .ci(1'b0), .s(s1), .co(co1));
  rc_adder #(.W(16)) u_add2 (.a(q1), .b({8'h00, q0[15:8]}), .ci(1'b0), .s(s2), .co(co2));
  rc_adder #(.W(24)) u_add3 (.a(s1), .b({8'h00, s2}), .ci(1'b0), .s(s3), .co(co3));

  assign p = {s3, q0[7:0]};
endmodule
