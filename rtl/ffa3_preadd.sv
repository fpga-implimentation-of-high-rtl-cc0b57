// ffa3_preadd: pre-addition stage of the three-parallel fast FIR algorithm.
//
// From three polyphase values a0, a1, a2 it forms the three sums the FFA
// feeds to its sum subfilters:
//   s01 = a0 + a1,  s12 = a1 + a2,  s012 = a0 + a1 + a2.
// The filter uses it twice over: once on the input block X0, X1, X2 and,
// per tap, on the coefficients h(3j), h(3j+1), h(3j+2) to build the
// coefficients of the subfilters H0+H1, H1+H2 and H0+H1+H2. Sums are
// widened so that nothing overflows. Purely combinational.
module ffa3_preadd #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a0,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  output logic [W:0]   s01,
  output logic [W:0]   s12,
  output logic [W+1:0] s012
);
  always_comb begin
    s01  = {1'b0, a0} + {1'b0, a1};
    s12  = {1'b0, a1} + {1'b0, a2};
    s012 = {1'b0, s01} + {2'b00, a2};
  end
endmodule
