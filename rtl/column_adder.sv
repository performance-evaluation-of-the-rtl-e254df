// column_adder: counts the ones in one column of the multiplier.
//
// Interface: x[NIN-1:0] are bits of equal weight (crosswise products and
// incoming carries); sum is their number, clog2(NIN+1) bits wide. Bit 0 of
// sum is the column's result bit, bit j a carry into the column j places to
// the left.
//
// The column is given to the smallest counter that holds it:
//   1 input: wire, 2: half adder, 3: full adder, 4-5: 5-3 compressor,
//   6-7: 7-4, 8-10: 10-4, 11-15: 15-4, 16-20: 20-5.
// Spare compressor inputs are tied to 0, and result bits above the width of
// sum are always 0 for NIN inputs and are dropped (an assertion checks the
// one case where a compressor bit is dropped, the 7-4 on seven inputs).
// The compressors are the published ones; the rule that picks one per
// column is this design's own.
// NIN above 20 is an elaboration error. Purely combinational.
module column_adder #(
  parameter int unsigned NIN = 19,
  localparam int unsigned W  = vedic_pkg::count_width(NIN)
) (
  input  logic [NIN-1:0] x,
  output logic [W-1:0]   sum
);
  if (NIN == 0 || NIN > vedic_pkg::MAX_COL_INPUTS) begin : g_bad
    $error("column_adder: NIN=%0d outside 1..%0d", NIN, vedic_pkg::MAX_COL_INPUTS);
  end else if (NIN == 1) begin : g_wire
    assign sum = x;
  end else if (NIN == 2) begin : g_ha
    half_adder u_ha (.a(x[0]), .b(x[1]), .s(sum[0]), .co(sum[1]));
  end else if (NIN == 3) begin : g_fa
    full_adder u_fa (.a(x[0]), .b(x[1]), .ci(x[2]), .s(sum[0]), .co(sum[1]));
  end else if (NIN <= 5) begin : g_c53
    logic [4:0] xin;
    logic [2:0] o;
    assign xin = 5'(x);
    compressor_5_3 u_c (.x(xin), .o(o));
    assign sum = o[W-1:0];
  end else if (NIN <= 7) begin : g_c74
    logic [6:0] xin;
    logic [3:0] o;
    assign xin = 7'(x);
    compressor_7_4 u_c (.x(xin), .o(o));
    assign sum = o[W-1:0];
    // Seven inputs count to at most 7: the top bit of the 7-4 stays 0.
    always_comb assert (o[3] == 1'b0);
  end else if (NIN <= 10) begin : g_c104
    logic [9:0] xin;
    logic [3:0] o;
    assign xin = 10'(x);
    compressor_10_4 u_c (.x(xin), .o(o));
    assign sum = o[W-1:0];
  end else if (NIN <= 15) begin : g_c154
    logic [14:0] xin;
    logic [3:0]  o;
    assign xin = 15'(x);
    compressor_15_4 u_c (.x(xin), .o(o));
    assign sum = o[W-1:0];
  end else begin : g_c205
    logic [19:0] xin;
    logic [4:0]  o;
    assign xin = 20'(x);
    compressor_20_5 u_c (.x(xin), .o(o));
    assign sum = o[W-1:0];
  end
endmodule
