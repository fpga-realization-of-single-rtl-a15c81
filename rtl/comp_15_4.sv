// comp_15_4: 15:4 compressor.
//
// Counts the ones among fifteen inputs of equal weight and gives the count
// (0..15) as a 4-bit binary number y (weights 8, 4, 2, 1).
//
// Built from six comp_5_3 in two levels. Level 1: three 5:3 compressors count
// the inputs in groups of five, each giving a weight-1, weight-2 and weight-4
// bit. Level 2 adds these per weight, from the lowest up:
//   w1 : the three weight-1 bits              -> y[0], carry to w2
//   w2 : the three weight-2 bits + that carry -> y[1], carries to w4 and w8
//   w4 : the three weight-4 bits + the carry  -> y[2], carry to w8
// The two weight-8 bits are ORed into y[3]: both set would mean a count of at
// least 16. Outputs of the level-2 compressors that can never be set are
// left unused.
//
// Interface: x[14:0], y[3:0]. Timing: purely combinational.
// The counting function follows the design description; this structure is
// this implementation's own.
module comp_15_4 (
  input  logic [14:0] x,
  output logic [3:0]  y
);

  logic [2:0] g0, g1, g2;   // level-1 group counts
  logic [2:0] a, b, c;      // level-2 sums for weights 1, 2, 4
  logic [1:0] unused_hi;

  comp_5_3 u_g0 (.x(x[4:0]),   .y(g0));
  comp_5_3 u_g1 (.x(x[9:5]),   .y(g1));
  comp_5_3 u_g2 (.x(x[14:10]), .y(g2));

  comp_5_3 u_w1 (.x({2'b00, g2[0], g1[0], g0[0]}), .y(a));
  comp_5_3 u_w2 (.x({1'b0, a[1], g2[1], g1[1], g0[1]}), .y(b));
  comp_5_3 u_w4 (.x({1'b0, b[1], g2[2], g1[2], g0[2]}), .y(c));

  always_comb begin
    unused_hi = {a[2], c[2]};
    y = {b[2] | c[1], c[0], b[0], a[0]};
  end

  // A count of 16 or more is impossible, so the two weight-8 bits that are
  // ORed into y[3] are never set together, and the unused outputs stay 0.
  always_comb begin
    assert final (!(b[2] && c[1])) else $error("comp_15_4: two weight-8 bits set");
    assert final (unused_hi == 2'b00) else $error("comp_15_4: unused output set");
  end

endmodule
