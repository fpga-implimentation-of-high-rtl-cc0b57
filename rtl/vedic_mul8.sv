// vedic_mul8: 8x8-bit unsigned Vedic multiplier, the multiplier of the FIR
// filter.
//
// Built exactly like the 4x4 module one level up: a = {AH, AL} and
// b = {BH, BL} are split into 4-bit halves, four 4x4 Vedic multipliers form
//   q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH
// concurrently, and three ripple-carry adders combine them:
//   adder 1 : {q3, 0000} + {0000, q2}      (12 bits)
//   adder 2 : q1 + {0000, q0[7:4]}         (8 bits)
//   adder 3 : adder 1 + adder 2            -> p[15:4]
// with p[3:0] = q0[3:0]. The widths of the three adders are this design's
// scaling of the 4x4 arrangement; the carries out are always zero.
// Purely combinational.
//   a, b : 8-bit unsigned operands     p : 16-bit product
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0]  q0, q1, q2, q3;
  logic [11:0] s1;
  logic [7:0]  s2;
  logic [11:0] s3;
  logic        co1, co2, co3;

  vedic_mul4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4 u_m1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  rc_adder #(.W(12)) u_add1 (.a({q3, 4'b0000}), .b({4'b0000, q2}), .ci(1'b0), .s(s1), .co(co1));
  rc_adder #(.W(8))  u_add2 (.a(q1), .b({4'b0000, q0[7:4]}), .ci(1'b0), .s(s2), .co(co2));
  rc_adder #(.W(12)) u_add3 (.a(s1), .b({4'b0000, s2}), .ci(1'b0), .s(s3), .co(co3));

  assign p = {s3, q0[3:0]};
endmodule
