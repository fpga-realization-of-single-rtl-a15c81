// bit_extender33: the 33rd-bit extender unit.
//
// A signed datapath can cover the full unsigned 32-bit range only if every
// operand gets one more bit. This unit adds that bit above the MSB: a copy of
// bit 31 when the operand is signed (sign extension) and 0 when it is
// unsigned (zero extension). The 33-bit result is the operand's value in
// two's complement, whichever kind it is.
//
// Interface: din (32 bits), s_u (1 = signed, 0 = unsigned), dout (33 bits).
// Timing: purely combinational.
// The unit and its rule follow the design description.
module bit_extender33
  import booth_pkg::*;
(
  input  logic [MULT_W-1:0] din,
  input  logic              s_u,
  output logic [EXT_W-1:0]  dout
);

  always_comb begin
    dout = {s_u & din[MULT_W-1], din};
  end

endmodule
