// tb_cb_adjustment: runs the CB adjustment sequencer against the real core
// buffer: writing all-ones and the two alternating patterns, reading all
// words repeatedly (panel display) until stopped, and clearing, and checks
// the core contents and the displayed words.
module tb_cb_adjustment;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic start = 0, stop = 0, running;
  logic [2:0] mode = 0;
  logic cb_req, cb_we, cb_ack, cb_busy;
  logic [5:0] cb_addr;
  word_t cb_wdata, cb_rdata, panel_word;
  int checks = 0, failures = 0;

  cb_adjustment dut (.*);
  core_buffer u_cb (.clk, .rst_n, .req(cb_req), .we(cb_we), .addr(cb_addr),
                    .wdata(cb_wdata), .rdata(cb_rdata), .ack(cb_ack), .busy(cb_busy));

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

  localparam word_t ALT = {30{2'b01}};

  function automatic word_t cb_word(input int a);
    return {u_cb.core[2*a+1], u_cb.core[2*a]};
  endfunction

  task automatic run(input int m);
    @(negedge clk);
    mode = 3'(m); start = 1; @(negedge clk); start = 0;
    check(running, "sequencer running");
    while (running) @(negedge clk);
  endtask

  initial begin
    int n;
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(3);
    n = 0; for (int a = 0; a < 50; a++) n += (cb_word(a) == '1);
    check(n == 50, "all ones written");
    run(4);
    n = 0; for (int a = 0; a < 50; a++) n += (cb_word(a) == ((a % 2) ? ~ALT : ALT));
    check(n == 50, "pattern A written");
    run(5);
    n = 0; for (int a = 0; a < 50; a++) n += (cb_word(a) == ((a % 2) ? ALT : ~ALT));
    check(n == 50, "pattern B written");
    // read all, repeatedly, and watch the panel display
    @(negedge clk);
    mode = 1; start = 1; @(negedge clk); start = 0;
    n = 0;
    for (int c = 0; c < 50 * 9 * 3; c++) begin
      @(negedge clk);
      if (dut.waiting && cb_ack) begin
        int a;
        a = int'(cb_addr);
        @(negedge clk);
        check(panel_word == cb_word(a), $sformatf("panel shows word %0d", a));
        n++;
      end
    end
    check(n > 100, $sformatf("read-all passed the buffer more than twice (%0d words)", n));
    check(running, "read-all repeats until stopped");
    stop = 1;
    while (running) @(negedge clk);
    stop = 0;
    check(panel_word == ALT || panel_word == ~ALT, "panel shows a CB word");
    run(2);
    n = 0; for (int a = 0; a < 50; a++) n += (cb_word(a) == '0);
    check(n == 50, "zeros written");
    run(3);
    run(0);
    n = 0; for (int a = 0; a < 50; a++) n += (cb_word(a) == '0);
    check(n == 50, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
