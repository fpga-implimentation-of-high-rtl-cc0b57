// tb_vedic_mul4: exhaustive self-check of the 4x4 Vedic multiplier.
// All 256 operand pairs, among them 1111 x 1111 = 11100001 (15*15 = 225),
// are compared with the integer product.
module tb_vedic_mul4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4 dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1111;
    b = 4'b1111;
    #1;
    checks++;
    if (p != 8'd225) begin
      failures++;
      $display("FAIL 1111*1111: got %0d", p);
    end
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < 16; k++) begin
        a = 4'(i);
        b = 4'(k);
        #1;
        checks++;
        if (int'(p) != i * k) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, k, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
