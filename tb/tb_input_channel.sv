// tb_input_channel: drives pulses of every length from 1 to 10 clocks into
// one channel input circuit and checks that only pulses longer than
// NOISE_COUNT clocks are stored in IB, that `detect` fires once per pulse at
// the right clock, and that BTR moves IB into TR and empties IB.
module tb_input_channel;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic clear = 0, rd_in = 0, btr = 0, ib, tr, detect;
  int checks = 0, failures = 0;

  input_channel dut (.*);

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
    for (int len = 1; len <= 10; len++) begin
      int det_at, ndet;
      det_at = -1; ndet = 0;
      rd_in = 1;
      for (int c = 0; c < len + 3; c++) begin
        if (c == len) rd_in = 0;
        @(negedge clk);
        if (detect) begin ndet++; det_at = c; end
      end
      check(ib == (len > 4), $sformatf("pulse of %0d clocks %s", len, len > 4 ? "stored" : "rejected"));
      check(ndet == (len > 4 ? 1 : 0), "detect once per signal pulse");
      if (len > 4) check(det_at == 4, $sformatf("detect at the end of the 5th clock high (%0d)", det_at));
      btr = 1; @(negedge clk); btr = 0;
      check(tr == (len > 4) && !ib, "BTR moves IB to TR and clears IB");
      @(negedge clk);
    end
    btr = 1; @(negedge clk); btr = 0;
    check(!tr, "TR takes the empty IB on the next BTR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
