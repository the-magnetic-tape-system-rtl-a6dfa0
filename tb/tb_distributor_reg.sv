// tb_distributor_reg: checks the DR's series-parallel conversion both ways:
// a loaded word shifted out gives digit 12 first down to digit 1, and twelve
// digits shifted in rebuild the word with even parity on every digit. Also
// checks the parity and validity checking circuit on corrupted words.
module tb_distributor_reg;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic clear = 0, load = 0, shift = 0, parity_ok, valid;
  word_t load_word = 0, word;
  bcd_t in_digit = 0, out_digit;
  int checks = 0, failures = 0;

  distributor_reg dut (.*);

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
    bcd_t d [12];
    word_t w;
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < 12; k++) begin
        d[k] = bcd_t'($urandom_range(9));
        w[5*k +: 5] = {^d[k], d[k]};
      end
      load = 1; load_word = w; @(negedge clk); load = 0;
      check(parity_ok && valid, "loaded good word passes the checks");
      for (int k = 11; k >= 0; k--) begin
        check(out_digit == d[k], $sformatf("shift out digit %0d", k + 1));
        shift = 1; in_digit = d[k]; @(negedge clk); shift = 0;
      end
      check(word == w, "twelve digits shifted in rebuild the word with parity");
    end
    w[7] = ~w[7];
    load = 1; load_word = w; @(negedge clk); load = 0;
    check(!parity_ok, "single bit error caught by digit parity");
    w[7] = ~w[7];
    w[5*3 +: 5] = {^4'hC, 4'hC};
    load = 1; load_word = w; @(negedge clk); load = 0;
    check(parity_ok && !valid, "digit 12 decimal value rejected by validity check");
    clear = 1; @(negedge clk); clear = 0;
    check(word == '0 && parity_ok && valid, "clear gives zero word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
