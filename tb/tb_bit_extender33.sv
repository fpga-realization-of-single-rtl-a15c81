// tb_bit_extender33: self-check of the 33rd-bit extender.
// Random and corner operands in both modes; the 33-bit output, read as a
// signed number, must equal the operand read as signed (s_u = 1) or as
// unsigned (s_u = 0).
module tb_bit_extender33;
  import booth_pkg::*;
  logic [MULT_W-1:0] din;
  logic              s_u;
  logic [EXT_W-1:0]  dout;
  int checks = 0, failures = 0;
  logic clk;

  bit_extender33 dut (.din(din), .s_u(s_u), .dout(dout));

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

  task automatic check(input logic [31:0] v, input logic mode);
    longint expect_v, got;
    @(posedge clk);
    din = v;
    s_u = mode;
    #1;
    expect_v = mode ? longint'(signed'(v)) : longint'(v);
    got = longint'(signed'(dout));
    checks++;
    if (got != expect_v) begin
      failures++;
      $display("FAIL din=%h s_u=%b dout=%h", v, mode, dout);
    end
  endtask

  initial begin
    automatic logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h8000_0001};
    foreach (corners[i]) begin
      check(corners[i], 1'b0);
      check(corners[i], 1'b1);
    end
    for (int i = 0; i < 2000; i++) check($urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
