// vedic_mul2: 2x2-bit unsigned Vedic ("vertically and crosswise") multiplier.
//
// Four AND gates form the bit products. The vertical product a0b0 is the
// LSB. The two crosswise products a0b1 and a1b0 go into a half adder whose
// sum is bit 1; its carry is added to the vertical product a1b1 in a second
// half adder, giving bit 2 (sum) and bit 3 (carry). This is the structure
// of the 2x2 module as described, without any change. Purely combinational.
//   a, b : 2-bit unsigned operands     p : 4-bit product
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a0b1, a1b0, a1b1;
  logic c1;

  assign a0b0 = a[0] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b0 = a[1] & b[0];
  assign a1b1 = a[1] & b[1];

  assign p[0] = a0b0;
  half_adder u_ha1 (.a(a0b1), .b(a1b0), .s(p[1]), .c(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
