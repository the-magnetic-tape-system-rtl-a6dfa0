// tb_tcu_indicators: random set/clear traffic on the TCU busy, MTH operation
// busy and tape-check indicators against a reference model, plus the tape-end
// indicator (set when the sensor comes on, kept until cleared) and MTH busy
// following a rewinding handler.
module tb_tcu_indicators;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic tcu_busy_set = 0, tcu_busy_clr = 0, tc_set = 0, tc_clr = 0;
  logic [3:0] op_busy_set = 0, op_busy_clr = 0, te_clr = 0;
  mth_stat_t stat [4];
  logic tcu_busy, tc_ind;
  logic [3:0] mth_busy, te_ind;
  int checks = 0, failures = 0;

  tcu_indicators dut (.*);

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

  initial foreach (stat[i]) stat[i] = '{ready: 1'b1, at_lp: 1'b1, at_te: 1'b0, rewinding: 1'b0};

  initial begin
    logic rb, rtc;
    logic [3:0] rop, rte, prev_te;
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rb = 0; rtc = 0; rop = 0; rte = 0; prev_te = 0;
    for (int n = 0; n < 2000; n++) begin
      tcu_busy_set = 1'($urandom); tcu_busy_clr = 1'($urandom);
      tc_set = ($urandom_range(7) == 0); tc_clr = 1'($urandom);
      op_busy_set = 4'($urandom); op_busy_clr = 4'($urandom);
      te_clr = 4'($urandom) & 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        if ($urandom_range(15) == 0) stat[i].at_te = ~stat[i].at_te;
        stat[i].rewinding = ($urandom_range(3) == 0);
      end
      @(negedge clk);
      rb  = tcu_busy_set ? 1'b1 : tcu_busy_clr ? 1'b0 : rb;
      rtc = tc_set ? 1'b1 : tc_clr ? 1'b0 : rtc;
      rop = (rop | op_busy_set) & ~op_busy_clr;
      for (int i = 0; i < 4; i++) begin
        if (te_clr[i]) rte[i] = 0;
        else if (stat[i].at_te && !prev_te[i]) rte[i] = 1;
        prev_te[i] = stat[i].at_te;
      end
      check(tcu_busy == rb, "TCU busy");
      check(tc_ind == rtc, "tape check");
      check(te_ind == rte, "tape end indicators");
      for (int i = 0; i < 4; i++)
        check(mth_busy[i] == (rop[i] | stat[i].rewinding), "MTH busy = operation busy or rewinding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
