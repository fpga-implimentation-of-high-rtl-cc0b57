// vedic_mul4: 4x4-bit unsigned Vedic multiplier.
//
// The operands are split into halves, a = {aH, aL} and b = {bH, bL}, and
// four 2x2 Vedic multipliers form the vertical and crosswise products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH
// all at once. Three ripple-carry adders then combine them:
//   adder 1 : {q3, 00} + {00, q2}          (6 bits)
//   adder 2 : q1 + {00, q0[3:2]}           (4 bits)
//   adder 3 : adder 1 + adder 2            -> p[7:2]
// and p[1:0] = q0[1:0] passes straight through. The adder arrangement and
// the bit fields follow the published block diagram of the 4x4 module; the
// carries out of the adders are always zero for these operand ranges.
// Purely combinational.
//   a, b : 4-bit unsigned operands     p : 8-bit product
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [5:0] s1;
  logic [3:0] s2;
  logic [5:0] s3;
  logic       co1, co2, co3;

  vedic_mul2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rc_adder #(.W(6)) u_add1 (.a({q3, 2'b00}), .b({2'b00, q2}), .ci(1'b0), .s(s1), .co(co1));
  rc_adder #(.W(4)) u_add2 (.a(q1), .b({2'b00, q0[3:2]}), .ci(1'b0), .s(s2), .co(co2));
  rc_adder #(.W(6)) u_add3 (.a(s1), .b({2'b00, s2}), .ci(1'b0), .s(s3), .co(co3));

  assign p = {s3, q0[1:0]};
endmodule
