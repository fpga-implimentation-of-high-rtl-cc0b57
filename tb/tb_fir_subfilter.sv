// tb_fir_subfilter: self-check of one FFA subfilter.
//
// Two instances run side by side: an 8-tap filter on 8-bit operands (8x8
// Vedic multipliers) and a 4-tap filter on 10-bit operands (16x16 Vedic
// multipliers, as in the H0+H1+H2 subfilter). Random samples arrive with
// random gaps in in_valid; a reference convolution over the accepted
// samples gives the expected output, which must appear with out_valid
// exactly one clock after the sample is accepted.
module tb_fir_subfilter;
  localparam int MA = 8, XA = 8, HA = 8;
  localparam int MB = 4, XB = 10, HB = 10;
  localparam int YA = XA + HA + $clog2(MA);
  localparam int YB = XB + HB + $clog2(MB);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [XA-1:0] xa = '0;
  logic [XB-1:0] xb = '0;
  logic [MA-1:0][HA-1:0] ha;
  logic [MB-1:0][HB-1:0] hb;
  logic va, vb;
  logic [YA-1:0] ya;
  logic [YB-1:0] yb;
  int checks = 0, failures = 0;

  fir_subfilter #(.XW(XA), .HW(HA), .M(MA)) dut_a (
    .clk, .rst_n, .in_valid, .x(xa), .h(ha), .out_valid(va), .y(ya));
  fir_subfilter #(.XW(XB), .HW(HB), .M(MB)) dut_b (
    .clk, .rst_n, .in_valid, .x(xb), .h(hb), .out_valid(vb), .y(yb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist_a[MA], hist_b[MB];
  longint exp_a, exp_b;
  logic   exp_v;

  task automatic check_out();
    checks++;
    if (va !== exp_v || vb !== exp_v) begin
      failures++;
      $display("FAIL valid: va=%0b vb=%0b expected %0b", va, vb, exp_v);
    end
    if (exp_v) begin
      checks++;
      if (longint'(ya) != exp_a || longint'(yb) != exp_b) begin
        failures++;
        $display("FAIL y: a=%0d (exp %0d) b=%0d (exp %0d)", ya, exp_a, yb, exp_b);
      end
    end
  endtask

  initial begin
    for (int j = 0; j < MA; j++) ha[j] = HA'($urandom);
    for (int j = 0; j < MB; j++) hb[j] = HB'($urandom);
    ha[0] = '1;  // an all-ones tap exercises the carry chains
    hb[0] = '1;
    foreach (hist_a[j]) hist_a[j] = 0;
    foreach (hist_b[j]) hist_b[j] = 0;
    exp_v = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 4) != 0;
      xa = (n % 50 == 7) ? '1 : XA'($urandom);
      xb = (n % 50 == 7) ? '1 : XB'($urandom);
      exp_v = in_valid;
      if (in_valid) begin
        for (int j = MA - 1; j > 0; j--) hist_a[j] = hist_a[j-1];
        for (int j = MB - 1; j > 0; j--) hist_b[j] = hist_b[j-1];
        hist_a[0] = longint'(xa);
        hist_b[0] = longint'(xb);
        exp_a = 0;
        exp_b = 0;
        for (int j = 0; j < MA; j++) exp_a += hist_a[j] * longint'(ha[j]);
        for (int j = 0; j < MB; j++) exp_b += hist_b[j] * longint'(hb[j]);
      end
    end
    @(negedge clk);
    check_out();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
