// pp_row_gen: one partial product row (Row#n calculation).
//
// The row is digit * b for a Booth digit in {-2,-1,0,+1,+2}, built without a
// multiplier or adder:
//   1. F2 selects 2b (b shifted left by one) or b, sign-extended to 34 bits;
//   2. every bit is XORed with F-bar, which inverts the row for a negative
//      digit (one's complement; the missing +1 is supplied by ROW#-1);
//   3. the row is forced to zero when F1 is low (digit 0).
// A 34-bit row holds every value of +-2b for a 33-bit b, and the inverted
// value -digit*b - 1 as well.
//
// Interface: b (33 bits), ctl (booth_ctl_t), row (34 bits, two's complement).
// Timing: purely combinational, three gate levels.
// The select/XOR/gate structure follows the design description; the row width
// is this implementation's own choice.
module pp_row_gen
  import booth_pkg::*;
(
  input  logic [EXT_W-1:0] b,
  input  booth_ctl_t       ctl,
  output logic [ROW_W-1:0] row
);

  logic [ROW_W-1:0] mag;

  always_comb begin
    mag = ctl.two ? {b, 1'b0} : {b[EXT_W-1], b};
    row = (mag ^ {ROW_W{ctl.neg}}) & {ROW_W{ctl.one}};
  end

endmodule
