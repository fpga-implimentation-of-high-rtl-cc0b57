// ffa3_postadd: post-addition stage of the three-parallel fast FIR algorithm.
//
// Takes the six subfilter outputs of one block,
//   p0 = H0X0, p1 = H1X1, p2 = H2X2,
//   p01 = (H0+H1)(X0+X1), p12 = (H1+H2)(X1+X2), p012 = (H0+H1+H2)(X0+X1+X2),
// and forms the three filter outputs with two block delays D (z^-3 at the
// sample rate):
//   a  = p0 - D(p2)
//   b  = p12 - p1
//   c  = p01 - p1
//   Y0 = a + D(b)
//   Y1 = c - a
//   Y2 = p012 - c - b
// which is the 3x3 FFA: Y0 = H0X0 + D(H1X2 + H2X1), Y1 = H0X1 + H1X0 +
// D(H2X2), Y2 = H0X2 + H1X1 + H2X0. The two D registers sit where the
// published three-parallel structure puts them: on the H2 branch and after
// the (H1+H2) subtractor.
//
// Timing: both D registers and the output registers load when in_valid is
// high; out_valid follows in_valid one clock later (latency one clock, one
// block per clock). Intermediate values are two's complement SW+2 bits wide;
// the outputs are truncated to YW bits, which the caller sizes to hold the
// true, non-negative filter output. Reset is asynchronous, active low.
module ffa3_postadd #(
  parameter int unsigned SW = 22,  // width of the subfilter outputs
  parameter int unsigned YW = 21   // width of the filter outputs
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] p0,
  input  logic [SW-1:0] p1,
  input  logic [SW-1:0] p2,
  input  logic [SW-1:0] p01,
  input  logic [SW-1:0] p12,
  input  logic [SW-1:0] p012,
  output logic          out_valid,
  output logic [YW-1:0] y0,
  output logic [YW-1:0] y1,
  output logic [YW-1:0] y2
);
  localparam int unsigned IW = SW + 2;
  typedef logic signed [IW-1:0] acc_t;

  acc_t d_p2;   // D on the H2 branch
  acc_t d_b;    // D after the (H1+H2) subtractor
  acc_t a, b, c, s0, s1, s2;

  always_comb begin
    a  = acc_t'(p0)  - d_p2;
    b  = acc_t'(p12) - acc_t'(p1);
    c  = acc_t'(p01) - acc_t'(p1);
    s0 = a + d_b;
    s1 = c - a;
    s2 = acc_t'(p012) - c - b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_p2      <= '0;
      d_b       <= '0;
      y0        <= '0;
      y1        <= '0;
      y2        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d_p2 <= acc_t'(p2);
        d_b  <= b;
        y0   <= s0[YW-1:0];
        y1   <= s1[YW-1:0];
        y2   <= s2[YW-1:0];
      end
    end
  end
endmodule
