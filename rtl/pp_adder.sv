// pp_adder: the partial product addition unit, a compressor tree.
//
// Adds the 17 Booth partial product rows and the correction row ROW#-1 into
// the 64-bit product, using only compressors (counters) and no full adders.
//
// Bit matrix: row k is placed at bit offset 2k and its sign bit is repeated up
// to bit 63; ROW#-1 is already 64 bits wide. Column c then holds up to 18 bits
// of weight 2^c. Everything that would land above bit 63 is dropped, so the
// sum is taken modulo 2^64, which is exact for a 64-bit product.
//
// Three compressor stages, one set of compressors per column c:
//   stage 1: a comp_15_4 on bits 0..14 and a comp_4_3 on bits 15..17 of the
//            column. A count bit of weight 2^j moves j columns to the left
//            (the "diagonal" carries), so each column of the next stage
//            receives at most 4 + 3 = 7 bits.
//   stage 2: a comp_7_3 per column; the next stage receives 3 bits per column.
//   stage 3: a comp_5_3 per column adds its 3 bits, Out2 of column c-1 and
//            Out3 of column c-2. This last row has no row beneath it, so its
//            carries run horizontally along the row like a ripple adder;
//            Out1 is product bit c.
//
// Interface: rows[NDIG] (34 bits, two's complement), row_m1 (64 bits),
// prod (64 bits).
// Timing: purely combinational. The longest path runs through the stage-3
// carry chain.
// Compressors in place of adders, diagonal carries and a horizontal carry
// chain in the last row follow the design description; the sign extension,
// the stage arrangement and the choice of compressor per stage are this
// implementation's own.
module pp_adder
  import booth_pkg::*;
(
  input  logic [ROW_W-1:0]  rows   [NDIG],
  input  logic [PROD_W-1:0] row_m1,
  output logic [PROD_W-1:0] prod
);

  localparam int PAD = 3;   // zero columns below bit 0, for carries from c-1..c-3

  // Stage 0: the bit matrix, one NROWS-bit vector per column.
  logic [NROWS-1:0] col [PROD_W];

  always_comb begin
    for (int c = 0; c < PROD_W; c++) begin
      col[c] = '0;
      for (int k = 0; k < NDIG; k++) begin
        if (c >= 2*k) begin
          col[c][k] = (c - 2*k >= ROW_W) ? rows[k][ROW_W-1] : rows[k][c - 2*k];
        end
      end
      col[c][NROWS-1] = row_m1[c];
    end
  end

  // Compressor outputs, index c+PAD for column c; entries below PAD stay 0.
  logic [3:0] s1a [PROD_W+PAD];   // stage-1 15:4 counts
  logic [2:0] s1b [PROD_W+PAD];   // stage-1 4:3 counts
  logic [2:0] s2  [PROD_W+PAD];   // stage-2 7:3 counts
  logic [2:0] s3  [PROD_W+PAD];   // stage-3 5:3 counts

  for (genvar i = 0; i < PAD; i++) begin : g_pad
    assign s1a[i] = '0;
    assign s1b[i] = '0;
    assign s2[i]  = '0;
    assign s3[i]  = '0;
  end

  for (genvar c = 0; c < PROD_W; c++) begin : g_col
    localparam int I = c + PAD;
    logic [6:0] in2;
    logic [4:0] in3;

    // Stage 1: 18 bits -> one 4-bit and one 3-bit count.
    comp_15_4 u_st1a (.x(col[c][14:0]), .y(s1a[I]));
    comp_4_3  u_st1b (.x({1'b0, col[c][NROWS-1:15]}), .y(s1b[I]));

    // Stage 2: gather the diagonal carries of stage 1 into 7 bits.
    assign in2 = {s1b[I-2][2], s1b[I-1][1], s1b[I][0],
                  s1a[I-3][3], s1a[I-2][2], s1a[I-1][1], s1a[I][0]};
    comp_7_3 u_st2 (.x(in2), .y(s2[I]));

    // Stage 3: 3 bits of the column plus the horizontal carries.
    assign in3 = {s3[I-2][2], s3[I-1][1], s2[I-2][2], s2[I-1][1], s2[I][0]};
    comp_5_3 u_st3 (.x(in3), .y(s3[I]));

    assign prod[c] = s3[I][0];
  end

endmodule
