// tb_partial_product_gen: self-check of the partial-product matrix, N = 16.
// Corner operands and random ones are applied; every pp[i][j] is compared
// with bit i of a AND bit j of b, and the weighted sum of all products is
// compared with a * b.
module tb_partial_product_gen;
  localparam int N = 16;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int                  checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  task automatic check(input logic [N-1:0] va, input logic [N-1:0] vb);
    longint unsigned acc = 0;
    a = va;
    b = vb;
    #1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i][j] != (va[i] && vb[j])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%0b", va, vb, i, j, pp[i][j]);
        end
        if (pp[i][j]) acc += longint'(1) << (i + j);
      end
    checks++;
    if (acc != longint'(va) * longint'(vb)) begin
      failures++;
      $display("FAIL a=%h b=%h weighted sum %0d", va, vb, acc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check(16'h8000, 16'h0001);
    check(16'h0001, 16'h8000);
    for (int k = 0; k < 500; k++)
      check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
