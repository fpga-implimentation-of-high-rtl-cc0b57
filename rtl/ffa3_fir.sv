// ffa3_fir: three-parallel FIR filter built on the 3x3 fast FIR algorithm
// (FFA), with Vedic multipliers in every subfilter.
//
// Each clock the filter takes a block of three consecutive input samples,
// x[0] = x(3k), x[1] = x(3k+1), x[2] = x(3k+2), and delivers three outputs
// y[0] = y(3k), y[1] = y(3k+1), y[2] = y(3k+2) of the TAPS-tap filter
//   y(n) = sum_{i=0}^{TAPS-1} coef[i] * x(n-i).
// Instead of the nine length-TAPS/3 subfilters of a plain polyphase
// three-parallel filter it uses six: H0, H1, H2 (the polyphase components
// h(3j), h(3j+1), h(3j+2)) and the sum filters H0+H1, H1+H2, H0+H1+H2.
// That is 2*TAPS multipliers instead of 3*TAPS.
//
//   ffa3_preadd   x:    X0+X1, X1+X2, X0+X1+X2
//   ffa3_preadd   coef: per tap, h(3j)+h(3j+1), h(3j+1)+h(3j+2), all three
//   fir_subfilter x6:   the six subfilters (Vedic multipliers + adders)
//   ffa3_postadd:       subtractors, adders and the two block delays D
//
// The six-subfilter structure, the pre- and post-additions and the places of
// the two block delays are those of the published three-parallel FFA; the
// handshake, the two register stages, unsigned arithmetic, the 24-tap
// default and the 16x16 multipliers of the sum subfilters are this design's
// own choices.
//
// Samples and coefficients are unsigned. A linear-phase filter just loads
// symmetric coefficients; the structure does not depend on it. coef is read
// combinationally and must be held stable while data flows.
//
// Timing: one block per clock when in_valid is high; in_valid may drop at
// any time and the filter then simply waits (the delay lines and D
// registers advance only on accepted blocks). Outputs of the block accepted
// at edge t appear with out_valid at edge t+2 (subfilter register, then
// post-adder register). Reset is asynchronous, active low, and clears all
// filter state, so the filter starts from zero history.
module ffa3_fir
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = fir_pkg::DEF_DATA_W,
  parameter int unsigned COEF_W = fir_pkg::DEF_COEF_W,
  parameter int unsigned TAPS   = fir_pkg::DEF_TAPS,
  parameter int unsigned Y_W    = DATA_W + COEF_W + $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [L-1:0][DATA_W-1:0] x,
  input  logic [TAPS-1:0][COEF_W-1:0] coef,
  output logic                     out_valid,
  output logic [L-1:0][Y_W-1:0]    y
);
  localparam int unsigned M    = TAPS / L;                       // subfilter length
  localparam int unsigned MLOG = (M > 1) ? $clog2(M) : 0;
  localparam int unsigned SW   = DATA_W + COEF_W + 4 + MLOG;     // widest subfilter output

  initial begin
    assert (TAPS % L == 0 && TAPS >= L)
      else $error("TAPS must be a positive multiple of 3");
    assert (DATA_W + 2 <= 16 && COEF_W + 2 <= 16)
      else $error("pre-added operands must fit the 16x16 Vedic multiplier");
  end

  // ---- pre-addition: input block ----------------------------------------
  logic [DATA_W:0]   x01, x12;
  logic [DATA_W+1:0] x012;

  ffa3_preadd #(.W(DATA_W)) u_pre_x (
    .a0(x[0]), .a1(x[1]), .a2(x[2]), .s01(x01), .s12(x12), .s012(x012)
  );

  // ---- pre-addition: coefficients, tap by tap -----------------------------
  logic [M-1:0][COEF_W-1:0] h0, h1, h2;
  logic [M-1:0][COEF_W:0]   h01, h12;
  logic [M-1:0][COEF_W+1:0] h012;

  for (genvar j = 0; j < M; j++) begin : g_coef
    assign h0[j] = coef[L*j];
    assign h1[j] = coef[L*j+1];
    assign h2[j] = coef[L*j+2];
    ffa3_preadd #(.W(COEF_W)) u_pre_h (
      .a0(h0[j]), .a1(h1[j]), .a2(h2[j]),
      .s01(h01[j]), .s12(h12[j]), .s012(h012[j])
    );
  end

  // ---- the six subfilters -------------------------------------------------
  localparam int unsigned W0   = DATA_W + COEF_W + MLOG;
  localparam int unsigned W01  = DATA_W + COEF_W + 2 + MLOG;
  localparam int unsigned W012 = DATA_W + COEF_W + 4 + MLOG;

  logic [W0-1:0]   f0, f1, f2;
  logic [W01-1:0]  f01, f12;
  logic [W012-1:0] f012;
  logic [5:0]      fv;

  fir_subfilter #(.XW(DATA_W), .HW(COEF_W), .M(M), .YW(W0)) u_h0 (
    .clk, .rst_n, .in_valid, .x(x[0]), .h(h0), .out_valid(fv[0]), .y(f0));
  fir_subfilter #(.XW(DATA_W), .HW(COEF_W), .M(M), .YW(W0)) u_h1 (
    .clk, .rst_n, .in_valid, .x(x[1]), .h(h1), .out_valid(fv[1]), .y(f1));
  fir_subfilter #(.XW(DATA_W), .HW(COEF_W), .M(M), .YW(W0)) u_h2 (
    .clk, .rst_n, .in_valid, .x(x[2]), .h(h2), .out_valid(fv[2]), .y(f2));
  fir_subfilter #(.XW(DATA_W+1), .HW(COEF_W+1), .M(M), .YW(W01)) u_h01 (
    .clk, .rst_n, .in_valid, .x(x01), .h(h01), .out_valid(fv[3]), .y(f01));
  fir_subfilter #(.XW(DATA_W+1), .HW(COEF_W+1), .M(M), .YW(W01)) u_h12 (
    .clk, .rst_n, .in_valid, .x(x12), .h(h12), .out_valid(fv[4]), .y(f12));
  fir_subfilter #(.XW(DATA_W+2), .HW(COEF_W+2), .M(M), .YW(W012)) u_h012 (
    .clk, .rst_n, .in_valid, .x(x012), .h(h012), .out_valid(fv[5]), .y(f012));

  // ---- post-addition with the two block delays ---------------------------
  ffa3_postadd #(.SW(SW), .YW(Y_W)) u_post (
    .clk, .rst_n,
    .in_valid (fv[0]),
    .p0       (SW'(f0)),
    .p1       (SW'(f1)),
    .p2       (SW'(f2)),
    .p01      (SW'(f01)),
    .p12      (SW'(f12)),
    .p012     (SW'(f012)),
    .out_valid(out_valid),
    .y0       (y[0]),
    .y1       (y[1]),
    .y2       (y[2])
  );

  // All six subfilters share in_valid and reset, so their valids always agree.
  a_valids_agree: assert property (@(posedge clk) (&fv || ~|fv))
    else $error("subfilter valids disagree");
endmodule
