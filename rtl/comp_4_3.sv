// comp_4_3: 4:3 compressor.
//
// Counts the ones among four inputs of equal weight and gives the count
// (0..4) as a 3-bit binary number y = {Out3, Out2, Out1} (weights 4, 2, 1).
//
// Inside, the inputs are taken in two pairs. Each pair gives a sum and a
// carry; the two sums give Out1 and a third carry. Of the three weight-2
// carries, the third can only be set when the other two are clear, so Out3
// is the AND of the pair carries and Out2 is the rest.
//
// Interface: x[3:0], y[2:0]. Timing: purely combinational.
// The counting function follows the design description; the internal gate
// structure is this implementation's own.
module comp_4_3 (
  input  logic [3:0] x,
  output logic [2:0] y
);

  logic s01, c01, s23, c23, c_s;

  always_comb begin
    s01 = x[0] ^ x[1];
    c01 = x[0] & x[1];
    s23 = x[2] ^ x[3];
    c23 = x[2] & x[3];
    c_s = s01 & s23;
    y   = {c01 & c23, (c01 ^ c23) | c_s, s01 ^ s23};
  end

  // The carry of the two pair sums excludes both pair carries.
  always_comb begin
    assert final (!(c_s && (c01 || c23))) else $error("comp_4_3: carry overlap");
  end

endmodule
