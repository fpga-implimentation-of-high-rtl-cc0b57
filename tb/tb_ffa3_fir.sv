// tb_ffa3_fir: end-to-end self-check of the three-parallel FFA FIR filter at
// its default size (24 taps, 8-bit samples and coefficients).
//
// The reference is the plain sample-by-sample convolution
// y(n) = sum_i coef[i] x(n-i) over the accepted input stream, with zero
// history after reset. Blocks of three samples are offered with random gaps
// in in_valid; every output block must appear with out_valid exactly two
// clocks after its input block was accepted, and nowhere else.
//
// Three runs, each after a reset:
//   1. random symmetric (linear-phase) coefficients, random samples;
//   2. all coefficients and samples at their maximum, the worst case for
//      the width of every adder, multiplier and the output;
//   3. a single impulse in each of the three lanes, so that the outputs
//      trace the impulse response through every lane and both block delays.
// Counted and required at least once: stalls (a cycle with in_valid low
// while running), use of each block delay D with a non-zero value, a reset
// in the middle of a stream, and a full-scale output.
module tb_ffa3_fir;
  localparam int TAPS = 24;
  localparam int DW = 8, CW = 8;
  localparam int YW = DW + CW + $clog2(TAPS);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [2:0][DW-1:0]    x = '0;
  logic [TAPS-1:0][CW-1:0] coef = '0;
  logic out_valid;
  logic [2:0][YW-1:0] y;
  int checks = 0, failures = 0;

  ffa3_fir dut (.clk, .rst_n, .in_valid, .x, .coef, .out_valid, .y);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint hist[$];                 // accepted samples, newest first
  typedef struct { int due; longint v[3]; } exp_t;
  exp_t   expq[$];

  int n_stall = 0, n_d_h2 = 0, n_d_b = 0, n_mid_reset = 0, n_full_scale = 0;

  // Mechanism monitors: the block delays hold a non-zero value when a block
  // is accepted into the post-adder.
  always @(posedge clk) begin
    if (rst_n && dut.u_post.in_valid) begin
      if (dut.u_post.d_p2 != 0) n_d_h2++;
      if (dut.u_post.d_b  != 0) n_d_b++;
    end
  end

  function automatic longint ref_y(int back);
    // y at the sample that is 'back' samples older than the newest one
    longint acc = 0;
    for (int i = 0; i < TAPS; i++)
      if (back + i < hist.size()) acc += longint'(coef[i]) * hist[back + i];
    return acc;
  endfunction

  task automatic check_out();
    checks++;
    if (expq.size() > 0 && expq[0].due == cycle) begin
      exp_t e = expq.pop_front();
      if (!out_valid) begin
        failures++;
        $display("FAIL cycle %0d: out_valid low, block expected", cycle);
      end else begin
        for (int l = 0; l < 3; l++) begin
          checks++;
          if (longint'(y[l]) != e.v[l]) begin
            failures++;
            $display("FAIL cycle %0d lane %0d: got %0d expected %0d", cycle, l, y[l], e.v[l]);
          end
          if (e.v[l] == longint'(TAPS) * 255 * 255) n_full_scale++;
        end
      end
    end else if (out_valid) begin
      failures++;
      $display("FAIL cycle %0d: out_valid high with no block due", cycle);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    hist.delete();
    expq.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // One clock of stimulus: offer a block (or a gap), then check outputs.
  // mode 0: random samples, 1: all ones, 2: impulse in lane imp_lane at block 0
  task automatic step(int mode, int blk, int imp_lane, bit allow_gap);
    @(negedge clk);
    check_out();
    in_valid = allow_gap ? (($urandom % 5) != 0) : 1'b1;
    for (int l = 0; l < 3; l++) begin
      case (mode)
        0: x[l] = DW'($urandom);
        1: x[l] = '1;
        default: x[l] = (blk == 0 && l == imp_lane) ? DW'(1) : '0;
      endcase
    end
    if (!in_valid) begin
      n_stall++;
    end else begin
      exp_t e;
      for (int l = 0; l < 3; l++) hist.push_front(longint'(x[l]));
      e.due = cycle + 2;
      for (int l = 0; l < 3; l++) e.v[l] = ref_y(2 - l);
      expq.push_back(e);
    end
  endtask

  task automatic drain();
    repeat (4) begin
      @(negedge clk);
      check_out();
      in_valid = 1'b0;
    end
  endtask

  initial begin
    // run 1: random linear-phase (symmetric) coefficients
    for (int i = 0; i < TAPS / 2; i++) begin
      coef[i] = CW'($urandom);
      coef[TAPS-1-i] = coef[i];
    end
    do_reset();
    for (int b = 0; b < 300; b++) step(0, b, 0, 1'b1);
    // reset in the middle of the stream, then run 2: full scale
    n_mid_reset++;
    coef = '1;
    do_reset();
    for (int b = 0; b < 40; b++) step(1, b, 0, b > 20);
    drain();
    // run 3: impulse responses through each lane
    for (int i = 0; i < TAPS; i++) coef[i] = CW'(i + 1);
    for (int l = 0; l < 3; l++) begin
      do_reset();
      for (int b = 0; b < TAPS / 3 + 2; b++) step(2, b, l, 1'b0);
      drain();
    end

    $display("mechanisms: stalls=%0d d_h2=%0d d_b=%0d mid_reset=%0d full_scale=%0d",
             n_stall, n_d_h2, n_d_b, n_mid_reset, n_full_scale);
    checks++; if (n_stall == 0)      begin failures++; $display("FAIL no stall");          end
    checks++; if (n_d_h2 == 0)       begin failures++; $display("FAIL D(H2) never used");  end
    checks++; if (n_d_b == 0)        begin failures++; $display("FAIL D(b) never used");   end
    checks++; if (n_mid_reset == 0)  begin failures++; $display("FAIL no mid reset");      end
    checks++; if (n_full_scale == 0) begin failures++; $display("FAIL no full scale");     end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
