// fblock_former: pre-processing (F-block formation) and Booth recoding of the
// multiplier.
//
// The 33-bit extended multiplier a[32:0] gets a 0 appended below its LSB and a
// second copy of a[32] above its MSB, giving 35 bits {a32, a32..a0, 0}. These
// are cut into 17 overlapping groups of three, the MSB of one group being the
// LSB of the next:
//   F0 = {a1, a0, 0}, F2 = {a3, a2, a1}, ..., F30 = {a31, a30, a29},
//   F32 = {a32, a32, a31}.
// Each group goes to a booth_encoder, so ctl[k] holds the controls of digit
// F(2k), whose weight is 4^k.
//
// Interface: a (33 bits), ctl[NDIG] (booth_ctl_t per digit).
// Timing: purely combinational.
// The grouping follows the design description. Placing the 17 encoders in
// this module, rather than in the partial product generator, is this
// implementation's own choice; the hardware is the same.
module fblock_former
  import booth_pkg::*;
(
  input  logic [EXT_W-1:0] a,
  output booth_ctl_t       ctl [NDIG]
);

  // {extra copy of a[32], a[32:0], appended 0}
  logic [2*NDIG:0] a_pre;
  assign a_pre = {a[EXT_W-1], a, 1'b0};

  for (genvar k = 0; k < NDIG; k++) begin : g_digit
    booth_encoder u_enc (
      .fblk (a_pre[2*k +: 3]),
      .ctl  (ctl[k])
    );
  end

endmodule
