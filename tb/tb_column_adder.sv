// tb_column_adder: self-check of the column counter at every size 1..20.
// One instance per input count NIN = 1..20 (so every compressor choice:
// wire, half adder, full adder, 5-3, 7-4, 10-4, 15-4, 20-5) sees the low
// NIN bits of the same stimulus. Stimuli: all zeros, all ones, every single
// one-hot word, then random words. Each count is compared with the number
// of ones in that instance's input.
module tb_column_adder;
  localparam int MAXN = 20;
  logic [MAXN-1:0] stim;
  int              got [1:MAXN];
  int              checks = 0, failures = 0;

  for (genvar n = 1; n <= MAXN; n++) begin : g_n
    localparam int W = vedic_pkg::count_width(n);
    logic [W-1:0] sum;
    column_adder #(.NIN(n)) dut (.x(stim[n-1:0]), .sum(sum));
    assign got[n] = int'(sum);
  end

  task automatic apply(input logic [MAXN-1:0] v);
    stim = v;
    #1;
    for (int n = 1; n <= MAXN; n++) begin
      int expected = $countones(v & ((MAXN'(1) << n) - 1'b1));
      checks++;
      if (got[n] != expected) begin
        failures++;
        $display("FAIL NIN=%0d x=%h -> %0d, expected %0d", n, v, got[n], expected);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < MAXN; i++) apply(MAXN'(1) << i);
    for (int k = 0; k < 20000; k++) apply(MAXN'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
