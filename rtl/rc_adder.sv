// rc_adder: W-bit unsigned ripple-carry adder.
//
// A chain of W full adders; the carry out of bit i feeds bit i+1, so the
// delay grows linearly with W. This is the adder the Vedic multipliers use
// to sum their partial products. Purely combinational.
//   a, b : W-bit addends      ci : carry in
//   s    : W-bit sum          co : carry out of the top bit
module rc_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
