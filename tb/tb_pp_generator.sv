// tb_pp_generator: self-check of the partial product generation unit.
// Random multiplicands and random digit vectors (each digit in {-2..2}) are
// applied. Every row plus its F-bar must equal digit*b, ROW#-1 must hold
// F-bar of row k at bit 2k and nothing else, and the weighted sum of all rows
// and ROW#-1 must equal b times the value of the digit vector (mod 2^64).
module tb_pp_generator;
  import booth_pkg::*;
  logic [EXT_W-1:0]  b;
  booth_ctl_t        ctl    [NDIG];
  logic [ROW_W-1:0]  rows   [NDIG];
  logic [PROD_W-1:0] row_m1;
  int checks = 0, failures = 0;
  logic clk;

  pp_generator dut (.b(b), .ctl(ctl), .rows(rows), .row_m1(row_m1));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int d [NDIG];
    longint bv, want_sum, sum, mult, got;
    logic [PROD_W-1:0] want_m1;
    @(posedge clk);
    b = {1'($urandom), 32'($urandom)};
    for (int k = 0; k < NDIG; k++) begin
      d[k] = int'($urandom_range(4)) - 2;
      ctl[k].neg = (d[k] < 0);
      ctl[k].one = (d[k] != 0);
      ctl[k].two = (d[k] == 2 || d[k] == -2);
    end
    #1;
    bv = longint'(signed'(b));
    want_m1 = '0;
    sum = longint'(row_m1);
    mult = 0;
    for (int k = 0; k < NDIG; k++) begin
      got = longint'(signed'(rows[k])) + longint'(ctl[k].neg);
      checks++;
      if (got != longint'(d[k]) * bv) begin
        failures++;
        $display("FAIL row %0d: d=%0d b=%h row=%h", k, d[k], b, rows[k]);
      end
      want_m1[2*k] = (d[k] < 0);
      sum += longint'(signed'(rows[k])) <<< (2*k);
      mult += longint'(d[k]) <<< (2*k);
    end
    checks++;
    if (row_m1 != want_m1) begin
      failures++;
      $display("FAIL ROW#-1 %h want %h", row_m1, want_m1);
    end
    want_sum = bv * mult;
    checks++;
    if (sum != want_sum) begin
      failures++;
      $display("FAIL weighted sum %h want %h", sum, want_sum);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
