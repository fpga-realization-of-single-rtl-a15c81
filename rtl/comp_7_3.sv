// comp_7_3: 7:3 compressor.
//
// Counts the ones among seven inputs of equal weight and gives the count
// (0..7) as a 3-bit binary number y = {Out3, Out2, Out1} (weights 4, 2, 1).
//
// Built from smaller compressors: a comp_5_3 counts inputs 0..4; a comp_4_3
// adds inputs 5 and 6 to the 5:3's weight-1 output. The two weight-2 bits are
// combined by a half adder, and its carry is ORed with the 5:3's weight-4 bit
// (both cannot be set, as the total never exceeds 7).
//
// Interface: x[6:0], y[2:0]. Timing: purely combinational.
// The counting function follows the design description; building it from a
// 5:3 and a 4:3 is this implementation's own choice.
module comp_7_3 (
  input  logic [6:0] x,
  output logic [2:0] y
);

  logic [2:0] p;        // count of x[4:0]
  logic [2:0] q;        // count of x[6:5] and p[0]; q[2] is always 0
  logic       unused_q2;
  logic       c2;

  comp_5_3 u_c53 (.x(x[4:0]), .y(p));
  comp_4_3 u_c43 (.x({1'b0, p[0], x[6:5]}), .y(q));

  always_comb begin
    unused_q2 = q[2];
    c2 = p[1] & q[1];
    y  = {p[2] | c2, p[1] ^ q[1], q[0]};
  end

  // A count above 7 is impossible: the two weight-4 bits merged by the OR
  // are never set together, and the 4:3's weight-4 output stays 0.
  always_comb begin
    assert final (!(p[2] && c2)) else $error("comp_7_3: two weight-4 bits set");
    assert final (!unused_q2) else $error("comp_7_3: unused output set");
  end

endmodule
