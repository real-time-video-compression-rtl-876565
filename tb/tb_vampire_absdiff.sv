// tb_vampire_absdiff: exhaustive check of the one's-complement absolute
// difference against |c - i| and c > i for all 8-bit operand pairs.
module tb_vampire_absdiff;
  logic [7:0] c, i, d;
  logic       gt;
  int checks = 0, failures = 0;

  vampire_absdiff #(.W(8)) dut (.c(c), .i(i), .gt(gt), .d(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int exp_d;
        c = 8'(a); i = 8'(b);
        #1;
        exp_d = (a > b) ? a - b : b - a;
        checks++;
        if (int'(d) != exp_d || gt != (a > b)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d i=%0d d=%0d gt=%0b", a, b, d, gt);
        end
      end
    // Table I example with 3-bit values scaled to 8 bits: |3 - 5| = 2.
    c = 8'd3; i = 8'd5; #1;
    checks++;
    if (d != 8'd2 || gt) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
