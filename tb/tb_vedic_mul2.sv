// tb_vedic_mul2: exhaustive self-check of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied and the 4-bit product is compared with
// the integer product.
module tb_vedic_mul2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul2 dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 4; k++) begin
        a = 2'(i);
        b = 2'(k);
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
