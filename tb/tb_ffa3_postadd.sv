// tb_ffa3_postadd: self-check of the FFA post-adder.
//
// Each block draws nine random cross terms t[i][j] (standing for Hi*Xj) and
// applies the six subfilter outputs they imply, with random gaps in
// in_valid. The reference is the plain polyphase form of the three-parallel
// filter, Y0 = t00 + z^-3(t12 + t21), Y1 = t01 + t10 + z^-3 t22,
// Y2 = t02 + t11 + t20, so it shares none of the FFA's subtractions. Outputs
// must match one clock after each accepted block.
module tb_ffa3_postadd;
  localparam int SW = 22, YW = 21;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [SW-1:0] p0 = '0, p1 = '0, p2 = '0, p01 = '0, p12 = '0, p012 = '0;
  logic out_valid;
  logic [YW-1:0] y0, y1, y2;
  int checks = 0, failures = 0;

  ffa3_postadd #(.SW(SW), .YW(YW)) dut (.clk, .rst_n, .in_valid,
    .p0, .p1, .p2, .p01, .p12, .p012, .out_valid, .y0, .y1, .y2);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint prev_t22 = 0, prev_t12_t21 = 0;
  longint t[3][3];
  longint e0, e1, e2;
  logic   exp_v = 1'b0;
  longint mask = (longint'(1) << YW) - 1;

  task automatic check_out();
    checks++;
    if (out_valid !== exp_v) begin
      failures++;
      $display("FAIL valid %0b expected %0b", out_valid, exp_v);
    end
    if (exp_v) begin
      checks++;
      if (longint'(y0) != (e0 & mask) || longint'(y1) != (e1 & mask) ||
          longint'(y2) != (e2 & mask)) begin
        failures++;
        $display("FAIL y=%0d %0d %0d exp %0d %0d %0d", y0, y1, y2,
                 e0 & mask, e1 & mask, e2 & mask);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 3) != 0;
      // Nine random cross terms t[i][j] stand for Hi*Xj of one block.
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) t[i][j] = longint'($urandom % (1 << 18));
      p0   = SW'(t[0][0]);
      p1   = SW'(t[1][1]);
      p2   = SW'(t[2][2]);
      p01  = SW'(t[0][0] + t[0][1] + t[1][0] + t[1][1]);
      p12  = SW'(t[1][1] + t[1][2] + t[2][1] + t[2][2]);
      p012 = SW'(t[0][0] + t[0][1] + t[0][2] + t[1][0] + t[1][1] + t[1][2] +
                 t[2][0] + t[2][1] + t[2][2]);
      exp_v = in_valid;
      if (in_valid) begin
        // Polyphase form of the three-parallel filter, z^-3 = previous block.
        e0 = t[0][0] + prev_t12_t21;
        e1 = t[0][1] + t[1][0] + prev_t22;
        e2 = t[0][2] + t[1][1] + t[2][0];
        prev_t12_t21 = t[1][2] + t[2][1];
        prev_t22     = t[2][2];
      end
    end
    @(negedge clk);
    check_out();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
