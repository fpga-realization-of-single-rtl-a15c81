// tb_booth_mult32: end-to-end self-check of the 32x32 Booth multiplier.
//
// Applies the four example products 29*37, 37*(-29), 29*(-37) and
// (-37)*(-29) (all signed, each giving +-1073), corner operands in all four
// signed/unsigned mode pairs, and random operands. The reference product is
// computed with 64-bit integer arithmetic from each operand read as signed
// or unsigned. The multiplier is single-cycle: inputs change on a rising
// clock edge and the product is checked before the next one.
//
// It also counts how often each mechanism of the design is exercised and
// fails if any never is: each of the four operand mode pairs, each Booth
// digit value -2..+2, a negative row (correction row ROW#-1 in use), the
// top digit F32 being non-zero (unsigned multiplier with bit 31 set), and
// the 4:3 compressors of the adder being reached (digits 15 and 16 and
// ROW#-1 all non-zero).
module tb_booth_mult32;
  logic [31:0] mplier, mplicand;
  logic        mplier_s_u, mplicand_s_u;
  logic [63:0] prod;
  int checks = 0, failures = 0;
  logic clk;

  int mode_seen  [4];
  int digit_seen [5];   // index d+2
  int neg_rows = 0, top_digit = 0, upper_rows = 0;

  booth_mult32 dut (
    .mplier(mplier), .mplier_s_u(mplier_s_u),
    .mplicand(mplicand), .mplicand_s_u(mplicand_s_u),
    .prod(prod)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent digit analysis for coverage: radix-4 digits of the 33-bit
  // extended multiplier.
  task automatic note_digits(input logic [31:0] a, input logic s);
    logic [34:0] p;
    int d;
    int nz_hi = 0;
    p = {{2{s & a[31]}}, a, 1'b0};
    for (int k = 0; k < 17; k++) begin
      d = -2 * int'(p[2*k+2]) + int'(p[2*k+1]) + int'(p[2*k]);
      digit_seen[d+2]++;
      if (d < 0) neg_rows++;
      if (k == 16 && d != 0) top_digit++;
      if (k >= 15 && d != 0) nz_hi++;
    end
    if (nz_hi == 2) upper_rows++;
  endtask

  task automatic check(input logic [31:0] a, input logic sa, input logic [31:0] b, input logic sb);
    longint av, bv;
    logic [63:0] want;
    @(posedge clk);
    mplier = a; mplier_s_u = sa;
    mplicand = b; mplicand_s_u = sb;
    @(negedge clk);   // half a cycle later: the product must already be there
    av = sa ? longint'(signed'(a)) : longint'(a);
    bv = sb ? longint'(signed'(b)) : longint'(b);
    want = 64'(av * bv);
    checks++;
    if (prod !== want) begin
      failures++;
      $display("FAIL %h(%s) * %h(%s) = %h, want %h", a, sa ? "s" : "u", b, sb ? "s" : "u", prod, want);
    end
    mode_seen[{sa, sb}]++;
    note_digits(a, sa);
  endtask

  initial begin
    automatic logic [31:0] corners [8] = '{32'h0, 32'h1, 32'h2, 32'h7fff_ffff, 32'h8000_0000,
                                 32'hffff_ffff, 32'haaaa_aaaa, 32'h5555_5555};
    // the example products (signed operands)
    check(32'd29, 1, 32'd37, 1);
    check(32'd37, 1, -32'sd29, 1);
    check(32'd29, 1, -32'sd37, 1);
    check(-32'sd37, 1, -32'sd29, 1);
    for (int m = 0; m < 4; m++)
      foreach (corners[i]) foreach (corners[j])
        check(corners[i], m[1], corners[j], m[0]);
    for (int i = 0; i < 20000; i++)
      check($urandom, 1'($urandom), $urandom, 1'($urandom));

    for (int m = 0; m < 4; m++) begin
      $display("mode mplier_s_u=%0d mplicand_s_u=%0d : %0d products", m[1], m[0], mode_seen[m]);
      if (mode_seen[m] == 0) failures++;
    end
    for (int d = -2; d <= 2; d++) begin
      $display("Booth digit %0d : %0d times", d, digit_seen[d+2]);
      if (digit_seen[d+2] == 0) failures++;
    end
    $display("negative rows (ROW#-1 used): %0d", neg_rows);
    $display("top digit F32 non-zero     : %0d", top_digit);
    $display("rows 15 and 16 both active : %0d", upper_rows);
    if (neg_rows == 0) failures++;
    if (top_digit == 0) failures++;
    if (upper_rows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
