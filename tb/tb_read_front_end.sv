// tb_read_front_end: feeds the eight-channel read front end with skewed,
// reshaped pulses as a tape handler gives them (each channel starting up to
// 8 clocks apart, one character every 24 clocks), plus short noise glitches,
// and checks that every character comes out whole and in order, that BTR falls
// BTR_DELAY clocks after the sprocket pulse is recognised, and that the
// glitches never reach the output.
module tb_read_front_end;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic enable = 0, char_valid;
  tchar_t rd_pulse = 0, char_out;
  int checks = 0, failures = 0;

  read_front_end dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tchar_t sent [$];
  int got = 0;
  int btr_lag = -1;
  int spr_start;

  // collect output characters
  always @(posedge clk)
    if (char_valid) begin
      tchar_t e;
      e = sent.size() > 0 ? sent.pop_front() : 8'hxx;
      check(char_out == e, $sformatf("character %0d: got %02h want %02h", got, char_out, e));
      got++;
    end

  always @(posedge clk)
    if (dut.btr && btr_lag < 0) btr_lag = int'($time / 2) - spr_start;

  initial begin
    int skew [8];
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    for (int n = 0; n < 300; n++) begin
      tchar_t c;
      c = with_parity(7'($urandom) | 7'h08);
      foreach (skew[i]) skew[i] = (i == SPROCKET_BIT) ? 4 : $urandom_range(8);
      sent.push_back(c);
      for (int ft = 0; ft < 24; ft++) begin
        @(negedge clk);
        if (n == 0 && ft == 4) spr_start = int'($time / 2);
        for (int i = 0; i < 8; i++)
          rd_pulse[i] = (c[i] && ft >= skew[i] && ft < skew[i] + 8) ||
                        (!c[i] && n % 3 == 0 && ft >= 17 && ft < 17 + 4);
      end
    end
    @(negedge clk);
    rd_pulse = 0;
    repeat (40) @(negedge clk);
    check(got == 300, $sformatf("all 300 characters received (%0d)", got));
    // sprocket seen at start clock +0; counted >4 after 5 clocks; BTR 12 after
    check(btr_lag == 5 + 12 + 1 || btr_lag == 5 + 12 || btr_lag == 5 + 12 - 1,
          $sformatf("BTR lag %0d clocks after sprocket pulse start", btr_lag));
    enable = 0;
    rd_pulse = '1;
    repeat (30) @(negedge clk);
    check(got == 300, "disabled front end delivers nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
