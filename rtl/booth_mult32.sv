// booth_mult32: single-cycle 32x32-bit radix-4 Booth multiplier for signed
// and unsigned operands, with a compressor-based partial product adder.
//
// Data flow (all combinational, no clock):
//   1. bit_extender33 (x2): each operand becomes a 33-bit two's complement
//      value, sign- or zero-extended according to its *_s_u input.
//   2. fblock_former: the 33-bit multiplier is cut into 17 overlapping 3-bit
//      F-blocks and each is Booth-recoded into F-bar / F1 / F2.
//   3. pp_generator: each digit selects 0, +-b or +-2b of the multiplicand as
//      one 34-bit row (negation by inversion), plus the correction row ROW#-1
//      that adds the missing +1 of every negative row.
//   4. pp_adder: a three-stage tree of 15:4, 4:3, 7:3 and 5:3 compressors
//      sums the 18 rows into the 64-bit product.
//
// Interface: mplier, mplicand (32 bits each), mplier_s_u, mplicand_s_u
// (1 = signed, 0 = unsigned), prod (64 bits). prod is the exact product of
// the two operands as their modes define them, in 64-bit two's complement.
// Timing: combinational; prod settles within the same cycle as the inputs.
// The ports, the units and their order follow the design description; the
// stage arrangement of the compressor tree is this implementation's own.
module booth_mult32
  import booth_pkg::*;
(
  input  logic [MULT_W-1:0] mplier,
  input  logic              mplier_s_u,
  input  logic [MULT_W-1:0] mplicand,
  input  logic              mplicand_s_u,
  output logic [PROD_W-1:0] prod
);

  logic [EXT_W-1:0]  a_ext;   // extended multiplier (Booth recoded)
  logic [EXT_W-1:0]  b_ext;   // extended multiplicand
  booth_ctl_t        ctl    [NDIG];
  logic [ROW_W-1:0]  rows   [NDIG];
  logic [PROD_W-1:0] row_m1;

  bit_extender33 u_ext_a (.din(mplier),   .s_u(mplier_s_u),   .dout(a_ext));
  bit_extender33 u_ext_b (.din(mplicand), .s_u(mplicand_s_u), .dout(b_ext));

  fblock_former u_fblk (.a(a_ext), .ctl(ctl));

  pp_generator u_ppg (.b(b_ext), .ctl(ctl), .rows(rows), .row_m1(row_m1));

  pp_adder u_add (.rows(rows), .row_m1(row_m1), .prod(prod));

endmodule
