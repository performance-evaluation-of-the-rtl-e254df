// tb_vedic_mult_small: exhaustive check of the multiplier at reduced sizes.
// The same column structure is elaborated for N = 4 and N = 8, and every
// operand pair (256 and 65536 pairs) is applied to both; each product is
// compared with a * b computed by the testbench.
module tb_vedic_mult_small;
  logic [3:0]  a4, b4;
  logic [7:0]  r4;
  logic [7:0]  a8, b8;
  logic [15:0] r8;
  int          checks = 0, failures = 0;

  vedic_mult_16x16 #(.N(4)) dut4 (.a(a4), .b(b4), .r(r4));
  vedic_mult_16x16 #(.N(8)) dut8 (.a(a8), .b(b8), .r(r8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (int'(r8) != int'(a8) * int'(b8)) begin
        failures++;
        $display("FAIL N=8 %0d * %0d -> %0d", a8, b8, r8);
      end
      if (v < 256) begin
        checks++;
        if (int'(r4) != int'(a4) * int'(b4)) begin
          failures++;
          $display("FAIL N=4 %0d * %0d -> %0d", a4, b4, r4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
