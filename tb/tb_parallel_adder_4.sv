// tb_parallel_adder_4: exhaustive self-check of the 4-bit ripple adder.
// All 256 operand pairs are applied; {co, s} is compared with a + b.
module tb_parallel_adder_4;
  logic [3:0] a, b, s;
  logic       co;
  int         checks = 0, failures = 0;

  parallel_adder_4 #(.W(4)) dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if ({co, s} != 5'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL %0d + %0d -> %0d", a, b, {co, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
