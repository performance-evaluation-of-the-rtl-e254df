// tb_compressor_7_4: self-check of the 7-input compressor (a ones counter).
// Every one of the 2^7 input words is applied (no published simulation
// exists for this block).
// Each result is compared with the number of ones in the input, counted by
// the testbench with $countones.
module tb_compressor_7_4;
  logic [6:0] x;
  logic [3:0] o;
  int          checks = 0, failures = 0;

  compressor_7_4 dut (.x(x), .o(o));

  task automatic check(input logic [6:0] v, input int expected);
    x = v;
    #1;
    checks++;
    if (int'(o) != expected) begin
      failures++;
      $display("FAIL x=%0d -> %0d, expected %0d", v, o, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++)
      check(7'(v), $countones(7'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
