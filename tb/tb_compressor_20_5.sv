// tb_compressor_20_5: self-check of the 20-input compressor (a ones counter).
// First the input/result pairs shown in the published simulation of this
// compressor
// (i = 4, 111111, 52626, 72882, 100000, 189191) are applied, then every one of the
// 2^20 input words.
// Each result is compared with the number of ones in the input, counted by
// the testbench with $countones.
module tb_compressor_20_5;
  logic [19:0] x;
  logic [4:0] o;
  int          checks = 0, failures = 0;

  compressor_20_5 dut (.x(x), .o(o));

  task automatic check(input logic [19:0] v, input int expected);
    x = v;
    #1;
    checks++;
    if (int'(o) != expected) begin
      failures++;
      $display("FAIL x=%0d -> %0d, expected %0d", v, o, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(20'd4, 1);
    check(20'd111111, 8);
    check(20'd52626, 8);
    check(20'd72882, 8);
    check(20'd100000, 6);
    check(20'd189191, 9);
    for (int v = 0; v < (1 << 20); v++)
      check(20'(v), $countones(20'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
