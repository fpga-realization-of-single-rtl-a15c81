// tb_fblock_former: self-check of F-block formation and Booth recoding.
// For each 33-bit input a, every digit k is compared with the arithmetic
// value -2*a(2k+1) + a(2k) + a(2k-1) of its 3-bit group (a(-1) = 0 and
// a(33) = a(32)), and the digits, weighted by 4^k, must add up to a read as
// a signed 33-bit number.
module tb_fblock_former;
  import booth_pkg::*;
  logic [EXT_W-1:0] a;
  booth_ctl_t       ctl [NDIG];
  int checks = 0, failures = 0;
  logic clk;

  fblock_former dut (.a(a), .ctl(ctl));

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

  function automatic logic bit_of(logic [EXT_W-1:0] v, int i);
    if (i < 0) return 1'b0;
    if (i >= EXT_W) return v[EXT_W-1];
    return v[i];
  endfunction

  task automatic check(input logic [EXT_W-1:0] v);
    longint sum, want, d, f;
    @(posedge clk);
    a = v;
    #1;
    sum = 0;
    for (int k = 0; k < NDIG; k++) begin
      f = -2 * longint'(bit_of(v, 2*k+1)) + longint'(bit_of(v, 2*k)) + longint'(bit_of(v, 2*k-1));
      checks++;
      if (ctl[k].neg != (f < 0) || ctl[k].one != (f != 0) || ctl[k].two != (f == 2 || f == -2)) begin
        failures++;
        $display("FAIL a=%h digit %0d: want %0d, got neg=%b one=%b two=%b", v, k, f,
                 ctl[k].neg, ctl[k].one, ctl[k].two);
      end
      d = ctl[k].one ? (ctl[k].two ? 2 : 1) : 0;
      if (ctl[k].neg) d = -d;
      sum += d <<< (2*k);
    end
    want = longint'(signed'(v));
    checks++;
    if (sum != want) begin
      failures++;
      $display("FAIL a=%h digit sum %0d != %0d", v, sum, want);
    end
  endtask

  initial begin
    check('0);
    check('1);
    check({1'b0, {32{1'b1}}});
    check({1'b1, 32'h0});
    check({1'b0, 32'h8000_0000});
    for (int i = 0; i < 2000; i++) check({1'($urandom), 32'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
