// tb_nrz_format: feeds random characters to the NRZ flip-flops and checks
// the write levels against an independent count of 1s per channel, that the
// channel-parity code makes every channel even (and, after an odd number of
// odd-parity characters, itself has odd parity), and the read-side even check.
module tb_nrz_format;
  import kdc_tape_pkg::*;
  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;
  logic clear = 0, toggle = 0, even;
  tchar_t ch = 0, nrz, cp_code;
  int checks = 0, failures = 0;

  nrz_format dut (.*);

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
    int ones [8];
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      clear = 1; @(negedge clk); clear = 0;
      foreach (ones[i]) ones[i] = 0;
      for (int c = 0; c < 661; c++) begin
        tchar_t x;
        x = with_parity(7'($urandom) | 7'h08);     // sprocket always on
        for (int i = 0; i < 8; i++) ones[i] += x[i];
        toggle = 1; ch = x; @(negedge clk); toggle = 0;
        for (int i = 0; i < 8; i++)
          if (nrz[i] != ones[i][0]) begin check(0, "NRZ level = count of 1s mod 2"); break; end
      end
      check(even == (nrz == '0), "even flag");
      check(^cp_code, "channel-parity code after 661 characters has odd parity");
      toggle = 1; ch = cp_code; @(negedge clk); toggle = 0;
      check(even && nrz == '0, "channel-parity code makes every channel even");
      toggle = 1; ch = 8'h01; @(negedge clk); toggle = 0;
      check(!even, "a lost bit breaks the channel parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
