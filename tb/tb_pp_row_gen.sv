// tb_pp_row_gen: self-check of one partial product row.
// For random multiplicands b and each Booth digit d in {-2..2}, the row read
// as a signed 34-bit number plus F-bar must equal d*b: a negative digit gives
// the one's complement, whose +1 is added elsewhere.
module tb_pp_row_gen;
  import booth_pkg::*;
  logic [EXT_W-1:0] b;
  booth_ctl_t       ctl;
  logic [ROW_W-1:0] row;
  int checks = 0, failures = 0;
  logic clk;

  pp_row_gen dut (.b(b), .ctl(ctl), .row(row));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [EXT_W-1:0] v, input int d);
    longint want, got;
    @(posedge clk);
    b = v;
    ctl.neg = (d < 0);
    ctl.one = (d != 0);
    ctl.two = (d == 2 || d == -2);
    #1;
    want = longint'(d) * longint'(signed'(v));
    got = longint'(signed'(row)) + longint'(ctl.neg);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL b=%h d=%0d row=%h", v, d, row);
    end
  endtask

  initial begin
    automatic logic [EXT_W-1:0] corners [5] = '{33'h0, 33'h1, 33'h0_ffff_ffff, 33'h1_8000_0000, 33'h1_ffff_ffff};
    foreach (corners[i]) for (int d = -2; d <= 2; d++) check(corners[i], d);
    for (int i = 0; i < 2000; i++)
      for (int d = -2; d <= 2; d++) check({1'($urandom), 32'($urandom)}, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
