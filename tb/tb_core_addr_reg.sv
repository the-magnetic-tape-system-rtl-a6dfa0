// tb_core_addr_reg: counts the address register through 00..49 and the wrap
// to 00, checks the decimal digits, binary value and `last`, loading, and the
// validity check on loaded values (tens > 4 or a non-decimal digit).
module tb_core_addr_reg;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic clear = 0, load = 0, inc = 0, last, valid;
  bcd_t load_tens = 0, load_units = 0, tens, units;
  logic [5:0] bin;
  int checks = 0, failures = 0;

  core_addr_reg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    for (int a = 0; a < 120; a++) begin
      check(bin == 6'(a % 50), $sformatf("AR = %0d", a % 50));
      check(tens == bcd_t'((a % 50) / 10) && units == bcd_t'(a % 10), "decimal digits");
      check(last == ((a % 50) == 49), "last at 49");
      check(valid, "counted values are valid");
      inc = 1; @(negedge clk); inc = 0;
    end
    load = 1; load_tens = 3; load_units = 7; @(negedge clk); load = 0;
    check(bin == 37 && valid, "load 37");
    load = 1; load_tens = 5; load_units = 0; @(negedge clk); load = 0;
    check(!valid, "50 is not a valid address");
    load = 1; load_tens = 2; load_units = 4'hB; @(negedge clk); load = 0;
    check(!valid, "non-decimal digit is invalid");
    clear = 1; inc = 1; @(negedge clk); clear = 0; inc = 0;
    check(bin == 0, "clear beats increment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
