// tb_block_number_test: presents four block-number characters with random
// and equal values against the target, and characters with broken parity or
// non-digit codes, and checks the equal and parity-error results.
module tb_block_number_test;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic clear = 0, strobe = 0, done, equal, parity_err;
  tchar_t ch = 0;
  logic [15:0] target = 0;
  int checks = 0, failures = 0;

  block_number_test dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [15:0] blk;
      int bad;
      bit ndone;
      for (int k = 0; k < 4; k++) target[4*k +: 4] = 4'($urandom_range(9));
      blk = target;
      if ($urandom_range(1)) blk[4*$urandom_range(3) +: 4] = 4'($urandom_range(9));
      bad = (n % 5 == 0) ? $urandom_range(3) : -1;
      clear = 1; @(negedge clk); clear = 0;
      ndone = 0;
      for (int p = 0; p < 4; p++) begin
        ch = code_digit(blk[4*(3-p) +: 4]);
        if (p == bad) ch = (n % 10 == 0) ? ch ^ 8'h80 : CODE_NE;
        strobe = 1; @(negedge clk); strobe = 0;
        if (p < 3) ndone |= done;
      end
      check(done && !ndone, "done once after the fourth digit");
      check(parity_err == (bad >= 0), $sformatf("parity/code error %0d", bad));
      if (bad < 0) check(equal == (blk == target), $sformatf("equal %04h vs %04h", blk, target));
      else         check(!equal, "a bad character never matches");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
