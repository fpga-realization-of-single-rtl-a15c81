// comp_5_3: 5:3 compressor.
//
// Counts the ones among five inputs of equal weight and gives the count
// (0..5) as a 3-bit binary number y = {Out3, Out2, Out1}, with weights 4, 2
// and 1. In a column-compression tree Out1 stays in the input's column, Out2
// goes one column left and Out3 two columns left.
//
// Inside, two sum/majority stages reduce the five weight-1 inputs to one
// weight-1 bit and two weight-2 bits; those two are then combined into Out2
// and Out3.
//
// Interface: x[4:0], y[2:0]. Timing: purely combinational.
// The counting function follows the design description; the internal gate
// structure is this implementation's own.
module comp_5_3 (
  input  logic [4:0] x,
  output logic [2:0] y
);

  logic s1, c1, s2, c2;

  always_comb begin
    s1 = x[0] ^ x[1] ^ x[2];
    c1 = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    s2 = s1 ^ x[3] ^ x[4];
    c2 = (s1 & x[3]) | (s1 & x[4]) | (x[3] & x[4]);
    y  = {c1 & c2, c1 ^ c2, s2};
  end

endmodule
