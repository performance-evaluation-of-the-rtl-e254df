// tb_compressor_10_4: self-check of the 10-input compressor (a ones counter).
// First the input/result pairs shown in the published simulation of this
// compressor
// (i = 3, 25, 5, 63, 15, 1023, 1000) are applied, then every one of the
// 2^10 input words.
// Each result is compared with the number of ones in the input, counted by
// the testbench with $countones.
module tb_compressor_10_4;
  logic [9:0] x;
  logic [3:0] o;
  int          checks = 0, failures = 0;

  compressor_10_4 dut (.x(x), .o(o));

  task automatic check(input logic [9:0] v, input int expected);
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
    check(10'd3, 2);
    check(10'd25, 3);
    check(10'd5, 2);
    check(10'd63, 6);
    check(10'd15, 4);
    check(10'd1023, 10);
    check(10'd1000, 6);
    for (int v = 0; v < (1 << 10); v++)
      check(10'(v), $countones(10'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
