// tb_core_buffer: writes random words to all 50 locations of the core
// buffer, reads them back in a random order and checks data, the two-cycle
// access time (2 x CYCLE_CLKS clocks from request to ack), that the two
// 30-bit halves land in core words 2a and 2a+1, and that requests made
// while busy are ignored.
module tb_core_buffer;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic req = 0, we = 0, ack, busy;
  logic [5:0] addr = 0;
  word_t wdata = 0, rdata;
  int checks = 0, failures = 0;

  core_buffer dut (.*);

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

  word_t ref_mem [50];
  task automatic access(input bit w, input int a, input word_t d, output word_t q, output int lat);
    @(negedge clk);
    req = 1; we = w; addr = 6'(a); wdata = d;
    @(negedge clk);
    req = 0;
    lat = 1;
    while (!ack) begin @(negedge clk); lat++; end
    q = rdata;
  endtask

  initial begin
    word_t q;
    int lat;
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 50; a++) begin
      ref_mem[a] = word_t'({$urandom, $urandom});
      access(1, a, ref_mem[a], q, lat);
      check(lat == 9, $sformatf("write latency %0d clocks", lat));
    end
    for (int i = 0; i < 100; i++) begin
      int a;
      a = $urandom_range(49);
      access(0, a, '0, q, lat);
      check(q == ref_mem[a], $sformatf("read back word %0d", a));
      check(lat == 9, "read latency: request clock plus two core cycles");
    end
    check(dut.core[2*17] == ref_mem[17][29:0] && dut.core[2*17+1] == ref_mem[17][59:30],
          "halves stored in core words 2a and 2a+1");
    // a request while busy is ignored
    @(negedge clk);
    req = 1; we = 1; addr = 5; wdata = '1;
    @(negedge clk);
    addr = 6; wdata = '0;            // still requesting while busy
    @(negedge clk);
    req = 0;
    while (!ack) @(negedge clk);
    @(negedge clk);
    access(0, 6, '0, q, lat);
    check(q == ref_mem[6], "write request during busy ignored");
    access(0, 5, '0, q, lat);
    check(q == '1, "first write done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
