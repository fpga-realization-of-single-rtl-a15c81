// tb_comp_5_3: exhaustive self-check of the 5:3 compressor.
// All 32 input patterns are applied; the output must equal the number of
// ones in the input. Prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_comp_5_3;
  logic [4:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0;
  logic clk;

  comp_5_3 dut (.x(x), .y(y));

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
    for (int i = 0; i < 32; i++) begin
      @(posedge clk);
      x = 5'(i);
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
