// tb_mth_selector: checks that commands reach only the selected tape handler,
// and only after the relay settling time RELAY_CLKS (run here at its default),
// that the read lines come from the selected handler, and that changing the
// selection drops the commands at once and restarts the settling time.
module tb_mth_selector;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic [1:0] sel = 0;
  mth_cmd_t cmd = '0;
  mth_cmd_t mth_cmd [4];
  tchar_t mth_rd [4];
  tchar_t rd;
  logic settled;
  int checks = 0, failures = 0;

  mth_selector dut (.*);

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

  initial foreach (mth_rd[i]) mth_rd[i] = tchar_t'(8'h11 * (i + 1));

  initial begin
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd.fwd = 1; cmd.write = 1; cmd.nrz = 8'h5A;
    for (int s = 0; s < 4; s++) begin
      int t;
      sel = 2'(s + 1);
      @(negedge clk);
      sel = 2'(s);
      t = 0;
      while (!settled) begin
        @(negedge clk); t++;
        for (int i = 0; i < 4; i++)
          if (mth_cmd[i].fwd && !settled) begin check(0, $sformatf("no command before the relays settle (MTH %0d, t %0d, s %0d)", i, t, s)); break; end
      end
      check(t >= 692 && t <= 694, $sformatf("settling time %0d clocks", t));
      for (int i = 0; i < 4; i++) begin
        check(mth_cmd[i].fwd == (i == s) && mth_cmd[i].write == (i == s),
              $sformatf("command to MTH %0d only when selected (sel %0d)", i, s));
        check(mth_cmd[i].nrz == 8'h5A, "write levels reach every handler");
      end
      check(rd == mth_rd[s], "read lines from the selected handler");
    end
    sel = 1;
    #0.5;
    @(negedge clk);
    check(!settled && mth_cmd[3].fwd == 0 && mth_cmd[1].fwd == 0, "new selection drops commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
