// tb_vedic_mul16: self-check of the 16x16 Vedic multiplier used by the sum
// subfilters. Corner operands (0, 1, all ones, single high bits) and 20000
// random pairs are compared with the integer product.
module tb_vedic_mul16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul16 dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [15:0] ta, logic [15:0] tb);
    a = ta;
    b = tb;
    #1;
    checks++;
    if (longint'(p) != longint'(ta) * longint'(tb)) begin
      failures++;
      $display("FAIL %0d*%0d: got %0d", ta, tb, p);
    end
  endtask

  initial begin
    static logic [15:0] corner[6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h00ff, 16'h03ff};
    foreach (corner[i]) foreach (corner[k]) try(corner[i], corner[k]);
    for (int n = 0; n < 20000; n++) try(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
