// booth_encoder: radix-4 Booth recoding of one F-block.
//
// An F-block is three adjacent multiplier bits {a(2i+1), a(2i), a(2i-1)}. Its
// digit value is f = -2*a(2i+1) + a(2i) + a(2i-1), one of -2..+2. Instead of
// the value, the unit outputs the three controls the row generator needs:
//   neg (F-bar) = digit is negative: a(2i+1) set and not both lower bits set
//                 (111 encodes 0, not -0)
//   one (F1)    = digit is non-zero: the three bits are not all equal
//   two (F2)    = digit is +-2: 011 or 100
// Interface: fblk[2:0] = {a(2i+1), a(2i), a(2i-1)}, ctl (booth_ctl_t).
// Timing: purely combinational, two gate levels.
// The truth table follows the design description; the gate equations are
// this implementation's own reading of it.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  fblk,
  output booth_ctl_t  ctl
);

  logic hi, mid, lo;

  always_comb begin
    {hi, mid, lo} = fblk;
    ctl.neg = hi & ~(mid & lo);
    ctl.one = (hi ^ mid) | (mid ^ lo);
    ctl.two = (hi ^ mid) & ~(mid ^ lo);
  end

  // A digit of magnitude 2 or a negative digit is always non-zero.
  always_comb begin
    assert final (!(ctl.two || ctl.neg) || ctl.one) else $error("booth_encoder: bad controls");
  end

endmodule
