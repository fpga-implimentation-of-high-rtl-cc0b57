// half_adder: one-bit half adder, s = a ^ b, c = a & b.
// Purely combinational; the building cell of the 2x2 Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
