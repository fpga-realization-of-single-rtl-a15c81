// tb_pp_adder: self-check of the compressor-tree partial product adder.
// Random 34-bit rows and a random 64-bit ROW#-1 are applied (also all-ones
// and alternating patterns, which fill every column to its full height).
// The reference is the ordinary sum of ROW#-1 and every row sign-extended
// and shifted left by 2k, modulo 2^64.
module tb_pp_adder;
  import booth_pkg::*;
  logic [ROW_W-1:0]  rows [NDIG];
  logic [PROD_W-1:0] row_m1;
  logic [PROD_W-1:0] prod;
  int checks = 0, failures = 0;
  logic clk;

  pp_adder dut (.rows(rows), .row_m1(row_m1), .prod(prod));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: random, 1: all ones, 2: all zeros with random ROW#-1,
  // 3: rows of the largest positive value
  task automatic run_one(input int mode);
    logic [PROD_W-1:0] want;
    @(posedge clk);
    for (int k = 0; k < NDIG; k++) begin
      case (mode)
        1:       rows[k] = '1;
        2:       rows[k] = '0;
        3:       rows[k] = {1'b0, {(ROW_W-1){1'b1}}};
        default: rows[k] = {2'($urandom), 32'($urandom)};
      endcase
    end
    row_m1 = (mode == 1) ? '1 : {32'($urandom), 32'($urandom)};
    #1;
    want = row_m1;
    for (int k = 0; k < NDIG; k++)
      want += PROD_W'(signed'(rows[k])) << (2*k);
    checks++;
    if (prod != want) begin
      failures++;
      $display("FAIL mode %0d prod=%h want=%h", mode, prod, want);
    end
  endtask

  initial begin
    run_one(1);
    run_one(2);
    run_one(3);
    for (int i = 0; i < 5000; i++) run_one(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
