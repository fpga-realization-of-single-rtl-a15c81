// tb_booth_encoder: exhaustive self-check of one radix-4 Booth digit encoder.
// For each of the 8 F-block patterns the digit value -2*b2 + b1 + b0 is
// computed arithmetically, and F-bar (negative), F1 (non-zero) and F2
// (magnitude 2) must match it.
module tb_booth_encoder;
  import booth_pkg::*;
  logic [2:0] fblk;
  booth_ctl_t ctl;
  int checks = 0, failures = 0;
  logic clk;

  booth_encoder dut (.fblk(fblk), .ctl(ctl));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f;
    for (int i = 0; i < 8; i++) begin
      @(posedge clk);
      fblk = 3'(i);
      #1;
      f = -2 * int'(fblk[2]) + int'(fblk[1]) + int'(fblk[0]);
      checks++;
      if (ctl.neg != (f < 0) || ctl.one != (f != 0) || ctl.two != (f == 2 || f == -2)) begin
        failures++;
        $display("FAIL fblk=%b f=%0d neg=%b one=%b two=%b", fblk, f, ctl.neg, ctl.one, ctl.two);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
