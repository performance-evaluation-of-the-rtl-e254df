// tb_compressor_15_4: self-check of the 15-input compressor (a ones counter).
// First the input/result pairs shown in the published simulation of this
// compressor
// (i = 2048, 1000, 3777, 4096, 8192, 11111) are applied, then every one of the
// 2^15 input words.
// Each result is compared with the number of ones in the input, counted by
// the testbench with $countones.
module tb_compressor_15_4;
  logic [14:0] x;
  logic [3:0] o;
  int          checks = 0, failures = 0;

  compressor_15_4 dut (.x(x), .o(o));

  task automatic check(input logic [14:0] v, input int expected);
    x = v;
    #1;
    checks++;
    if (int'(o) != expected) begin
      failures++;
      $display("FAIL x=%0d -> %0d, expected %0d", v, o, expected);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(15'd2048, 1);
    check(15'd1000, 6);
    check(15'd3777, 6);
    check(15'd4096, 1);
    check(15'd8192, 1);
    check(15'd11111, 9);
    for (int v = 0; v < (1 << 15); v++)
      check(15'(v), $countones(15'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
