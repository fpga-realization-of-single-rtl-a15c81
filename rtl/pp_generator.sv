// pp_generator: the partial product generation unit.
//
// One pp_row_gen per Booth digit gives the 17 rows ROW#0, ROW#2, ..., ROW#32
// (rows[k] has weight 4^k). A negative digit leaves its row bit-inverted, so
// the unit also builds the correction row ROW#-1, which has a 1 at bit 2k
// (the LSB position of row k) for every negative digit k. The sum of all
// rows, each shifted by 2k and sign-extended, plus ROW#-1 is the product.
//
// Interface: b (33-bit extended multiplicand), ctl[NDIG] (digit controls),
// rows[NDIG] (34 bits each), row_m1 (64 bits).
// Timing: purely combinational.
// The rows and ROW#-1 follow the design description; the 64-bit layout of
// ROW#-1 is this implementation's own choice.
module pp_generator
  import booth_pkg::*;
(
  input  logic [EXT_W-1:0]  b,
  input  booth_ctl_t        ctl    [NDIG],
  output logic [ROW_W-1:0]  rows   [NDIG],
  output logic [PROD_W-1:0] row_m1
);

  for (genvar k = 0; k < NDIG; k++) begin : g_row
    pp_row_gen u_row (
      .b   (b),
      .ctl (ctl[k]),
      .row (rows[k])
    );
  end

  always_comb begin
    row_m1 = '0;
    for (int k = 0; k < NDIG; k++) begin
      row_m1[2*k] = ctl[k].neg;
    end
  end

endmodule
