// tb_comp_15_4: exhaustive self-check of the 15:4 compressor.
// All 32768 input patterns are applied; the output must equal the number of
// ones in the input. Prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_comp_15_4;
  logic [14:0] x;
  logic [3:0] y;
  int checks = 0, failures = 0;
  logic clk;

  comp_15_4 dut (.x(x), .y(y));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (33000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32768; i++) begin
      @(posedge clk);
      x = 15'(i);
      #1;
      checks++;
      if (int'(y) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
