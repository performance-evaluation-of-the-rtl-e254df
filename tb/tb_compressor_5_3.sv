// tb_compressor_5_3: self-check of the five-input compressor in both forms.
// Two instances are checked side by side: the multiplexer-based form used by
// the multiplier (MUX_BASED = 1) and the full/half-adder form (MUX_BASED = 0).
// First the input/result pairs of the published simulation (i = 7, 25, 31,
// 21, 19, 9 giving 3, 3, 5, 3, 3, 2) are applied, then all 32 input words.
// Each result is compared with the number of ones in the input.
module tb_compressor_5_3;
  logic [4:0] x;
  logic [2:0] o_mux, o_add;
  int         checks = 0, failures = 0;

  compressor_5_3 #(.MUX_BASED(1'b1)) dut_mux (.x(x), .o(o_mux));
  compressor_5_3 #(.MUX_BASED(1'b0)) dut_add (.x(x), .o(o_add));

  task automatic check(input logic [4:0] v, input int expected);
    x = v;
    #1;
    checks += 2;
    if (int'(o_mux) != expected) begin
      failures++;
      $display("FAIL mux x=%05b -> %0d, expected %0d", v, o_mux, expected);
    end
    if (int'(o_add) != expected) begin
      failures++;
      $display("FAIL adder x=%05b -> %0d, expected %0d", v, o_add, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(5'd7, 3);
    check(5'd25, 3);
    check(5'd31, 5);
    check(5'd21, 3);
    check(5'd19, 3);
    check(5'd9, 2);
    for (int v = 0; v < 32; v++)
      check(5'(v), $countones(5'(v)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
