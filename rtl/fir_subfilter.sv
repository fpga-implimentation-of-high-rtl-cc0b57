// fir_subfilter: one subfilter of the three-parallel FFA FIR filter.
//
// A direct-form FIR filter of M taps that runs at the block rate (one new
// polyphase sample per accepted block):
//   y(k) = sum_{j=0}^{M-1} h[j] * x(k-j).
// Every product comes from a Vedic multiplier: the 8x8 module when both
// operands fit in 8 bits, otherwise the 16x16 module of the same hierarchy
// (the pre-added sum subfilters need 9- and 10-bit operands). The products
// are summed by a plain adder chain, and M-1 registers hold the past inputs.
// Only the use of Vedic multipliers, adders and delay elements is given for
// the subfilters; the direct form and the output register are this design's
// choice.
//
// Timing: when in_valid is high at a clock edge, x is shifted into the delay
// line and the sum that includes it is registered into y; out_valid goes
// high on the same edge. Latency is one clock, throughput one sample per
// clock. h must be held stable while the filter runs. Reset (asynchronous,
// active low) clears the delay line and the output. Operands and result are
// unsigned; the result is full precision.
module fir_subfilter #(
  parameter int unsigned XW = 8,   // input width
  parameter int unsigned HW = 8,   // coefficient width
  parameter int unsigned M  = 8,   // taps
  parameter int unsigned YW = XW + HW + ((M > 1) ? $clog2(M) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [XW-1:0]        x,
  input  logic [M-1:0][HW-1:0] h,
  output logic                 out_valid,
  output logic [YW-1:0]        y
);
  localparam int unsigned OPW = (XW > HW) ? XW : HW;
  localparam int unsigned MW  = (OPW <= 8) ? 8 : 16;  // multiplier width

  // Tap inputs: tap 0 is the current sample, tap j the sample j blocks ago.
  logic [M-1:0][XW-1:0]   tap;
  logic [M-1:0][2*MW-1:0] prod;
  logic [YW-1:0]          acc;

  assign tap[0] = x;
  if (M > 1) begin : g_dly
    logic [M-2:0][XW-1:0] dly;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dly <= '0;
      end else if (in_valid) begin
        dly[0] <= x;
        for (int i = 1; i < int'(M) - 1; i++) dly[i] <= dly[i-1];
      end
    end
    for (genvar j = 1; j < M; j++) begin : g_tap
      assign tap[j] = dly[j-1];
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_mul
    logic [MW-1:0] ma, mb;
    assign ma = MW'(tap[j]);
    assign mb = MW'(h[j]);
    if (MW == 8) begin : g_m8
      vedic_mul8  u_mul (.a(ma), .b(mb), .p(prod[j]));
    end else begin : g_m16
      vedic_mul16 u_mul (.a(ma), .b(mb), .p(prod[j]));
    end
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j < M; j++) acc += YW'(prod[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= acc;
    end
  end
endmodule
