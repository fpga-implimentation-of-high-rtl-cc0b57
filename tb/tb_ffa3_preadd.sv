// tb_ffa3_preadd: self-check of the FFA pre-adder.
// Random 8-bit triples, plus the all-ones corner, are applied and the three
// sums are compared with integer sums.
module tb_ffa3_preadd;
  logic [7:0] a0, a1, a2;
  logic [8:0] s01, s12;
  logic [9:0] s012;
  int checks = 0, failures = 0;

  ffa3_preadd #(.W(8)) dut (.a0, .a1, .a2, .s01, .s12, .s012);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      if (n == 0) begin
        a0 = 8'hff; a1 = 8'hff; a2 = 8'hff;
      end else begin
        a0 = 8'($urandom); a1 = 8'($urandom); a2 = 8'($urandom);
      end
      #1;
      checks++;
      if (int'(s01) != int'(a0) + int'(a1) || int'(s12) != int'(a1) + int'(a2) ||
          int'(s012) != int'(a0) + int'(a1) + int'(a2)) begin
        failures++;
        $display("FAIL %0d %0d %0d -> %0d %0d %0d", a0, a1, a2, s01, s12, s012);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
