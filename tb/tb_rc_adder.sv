// tb_rc_adder: self-check of the ripple-carry adder.
// The 4-bit adder is tried exhaustively (all a, b and carry-in), a 12-bit one
// with random operands; sum and carry out are compared with integer sums.
module tb_rc_adder;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [11:0] a12, b12, s12;
  logic        ci12, co12;
  int checks = 0, failures = 0;

  rc_adder dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rc_adder #(.W(12)) dut12 (.a(a12), .b(b12), .ci(ci12), .s(s12), .co(co12));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a12 = '0; b12 = '0; ci12 = 1'b0;
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < 16; k++) begin
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(k); ci4 = 1'(c);
          #1;
          checks++;
          if (int'({co4, s4}) != i + k + c) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d", i, k, c, {co4, s4});
          end
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
      #1;
      checks++;
      if (int'({co12, s12}) != int'(a12) + int'(b12) + int'(ci12)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d: got %0d", a12, b12, ci12, {co12, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
