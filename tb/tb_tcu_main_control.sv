// tb_tcu_main_control: focused test of the TCU main control sequencing. The
// main control is exercised inside the unit with shortened mechanical times
// (start/stop, run-out, relays, rewind) so that many operations fit in a short
// run; the character rate and the 0.45 ms release time keep their values.
// Checked: release 0.45 ms after acceptance for concurrent operations; the
// busy time of a block write (below); instructions wait while the TCU is busy; TPB releases at the end of
// the block number with or without skip; JTG/JTE jump decisions; DMB/BDM with
// random E move 50 - (E mod 50) words between drum addresses E.. and CB 0..;
// the stored block reads back equal after BST + TPB.
// Busy time of a write = relay + start + 2 cm lead-in + 666 characters +
// 2 cm run-out + stop.
module tb_tcu_main_control;
  import kdc_tape_pkg::*;

  localparam int NM = 4;
  localparam int unsigned START = 100, STOP = 100, RUNOUT = 300, RWD = 400, RELAY = 50;

  logic clk = 0, rst_n = 1;
  initial rst_n <= 1'b0;   // reset edge at time 0, before the first clock
  always #1 clk = ~clk;

  logic        instr_valid = 0, halt_te = 0;
  op_t         instr_op = OP_NONE;
  logic [1:0]  instr_n = 0;
  logic [15:0] instr_ja = 0;
  logic        instr_accept, cpu_release, cpu_skip, cpu_jump, error_stop;
  logic        cpu_cb_req = 0, cpu_cb_we = 0, cpu_cb_ack;
  logic [5:0]  cpu_cb_addr = 0;
  word_t       cpu_cb_wdata = 0, cpu_cb_rdata;
  logic        drum_req, drum_we, drum_ack;
  logic [13:0] drum_addr;
  word_t       drum_wdata, drum_rdata;
  logic        tcu_busy, tc_ind;
  logic [NM-1:0] mth_busy, te_ind;
  logic        panel_mode = 0, panel_instr_valid = 0, adj_start = 0, adj_stop = 0, adj_running;
  op_t         panel_op = OP_NONE;
  logic [1:0]  panel_n = 0;
  logic [15:0] panel_ja = 0;
  logic [2:0]  adj_mode = 0;
  word_t       panel_word;
  mth_cmd_t    mth_cmd [NM];
  tchar_t      mth_rd [NM];
  mth_stat_t   mth_stat [NM];

  kdc_tcu #(.START_CLKS(START), .STOP_CLKS(STOP), .RUNOUT_CLKS(RUNOUT),
            .RWD_TCU_CLKS(RWD), .RELAY_CLKS(RELAY)) dut (.*);

  for (genvar i = 0; i < NM; i++) begin : g_m
    mth_model #(.START_CLKS(START)) u (.clk, .cmd(mth_cmd[i]), .noise(1'b0),
                                      .rd(mth_rd[i]), .stat(mth_stat[i]));
  end

  word_t drum [4200];
  always_ff @(posedge clk) begin
    drum_ack <= 1'b0;
    if (drum_req) begin
      if (drum_we) drum[drum_addr] <= drum_wdata;
      drum_rdata <= drum[drum_addr];
      drum_ack   <= 1'b1;
    end
  end

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rand_word();
    word_t w;
    for (int k = 0; k < DIGITS; k++) w[5*k +: 5] = digit_with_parity(bcd_t'($urandom_range(9)));
    return w;
  endfunction

  task automatic cpu_write(input int a, input word_t w);
    @(negedge clk);
    cpu_cb_req = 1; cpu_cb_we = 1; cpu_cb_addr = 6'(a); cpu_cb_wdata = w;
    @(negedge clk);
    cpu_cb_req = 0;
    while (!cpu_cb_ack) @(negedge clk);
  endtask

  task automatic cpu_read(input int a, output word_t w);
    @(negedge clk);
    cpu_cb_req = 1; cpu_cb_we = 0; cpu_cb_addr = 6'(a);
    @(negedge clk);
    cpu_cb_req = 0;
    while (!cpu_cb_ack) @(negedge clk);
    w = cpu_cb_rdata;
  endtask

  int unsigned t_acc, t_rel, t_wait;
  logic r_skip, r_jump;
  task automatic issue(input op_t op, input int n, input logic [15:0] ja);
    int unsigned t0;
    @(negedge clk);
    t0 = cyc;
    instr_valid = 1; instr_op = op; instr_n = 2'(n); instr_ja = ja;
    while (!instr_accept) @(negedge clk);
    t_acc = cyc; t_wait = t_acc - t0;
    instr_valid = 0;
    while (!cpu_release) @(negedge clk);
    t_rel = cyc - t_acc;
    r_skip = cpu_skip; r_jump = cpu_jump;
  endtask

  task automatic wait_idle();
    while (tcu_busy) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic logic [15:0] to_bcd(input int v);
    return {4'(v / 1000), 4'(v / 100 % 10), 4'(v / 10 % 10), 4'(v % 10)};
  endfunction

  word_t blk [CB_WORDS];

  initial begin
    word_t w;
    int unsigned busy_t;
    @(negedge clk);
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---------------- DMB / BDM with random E
    foreach (drum[i]) drum[i] = rand_word();
    for (int t = 0; t < 8; t++) begin
      int e, k;
      bit ok;
      e = $urandom_range(4199);
      k = 50 - e % 50;
      for (int a = 0; a < CB_WORDS; a++) begin blk[a] = rand_word(); cpu_write(a, blk[a]); end
      issue(OP_DMB, 0, to_bcd(e));
      ok = 1;
      for (int a = 0; a < CB_WORDS; a++) begin
        cpu_read(a, w);
        if (w != (a < k ? drum[e + a] : blk[a])) ok = 0;
      end
      check(ok, $sformatf("DMB E=%0d moves %0d words", e, k));
      e = $urandom_range(4199);
      k = 50 - e % 50;
      for (int a = 0; a < CB_WORDS; a++) cpu_read(a, blk[a]);
      w = (e + k < 4200) ? drum[e + k] : '0;
      issue(OP_BDM, 0, to_bcd(e));
      ok = 1;
      for (int a = 0; a < k; a++) if (drum[e + a] != blk[a]) ok = 0;
      check(ok, $sformatf("BDM E=%0d moves %0d words", e, k));
      if (e + k < 4200) check(drum[e + k] == w, "BDM stops at the end of the count");
    end

    // ---------------- BTP timing
    for (int a = 0; a < CB_WORDS; a++) begin blk[a] = rand_word(); cpu_write(a, blk[a]); end
    issue(OP_BTP, 1, 16'h0815);
    check(t_rel >= 104 && t_rel <= 106, $sformatf("BTP releases the CPU after 0.45 ms (%0d clocks)", t_rel));
    busy_t = 0;
    while (tcu_busy) begin @(negedge clk); busy_t++; end
    busy_t += t_rel;
    begin
      int exp_t;
      exp_t = RELAY + START + RUNOUT + BLOCK_CHARS * 24 + RUNOUT + STOP;   // lead-in, block, run-out
      check(busy_t + 30 >= exp_t && busy_t <= exp_t + 60,
            $sformatf("BTP busy %0d clocks, expected about %0d", busy_t, exp_t));
    end
    @(negedge clk);

    // ---------------- busy wait: BTP on MTH 2 then an instruction right away
    issue(OP_BTP, 2, 16'h0001);
    issue(OP_JTG, 0, 16'h0000);
    check(t_wait > 1000, $sformatf("JTG waited for the TCU (%0d clocks)", t_wait));
    check(r_jump, "JTG jumps after a good write");
    issue(OP_JTE, 2, 16'h0000);
    check(!r_jump, "JTE does not jump before the tape end");

    // ---------------- read back
    issue(OP_BST, 1, 16'h0000);
    check(t_rel >= 104 && t_rel <= 106, "BST releases after 0.45 ms");
    wait_idle();
    for (int a = 0; a < CB_WORDS; a++) cpu_write(a, '0);
    issue(OP_TPB, 1, 16'h0815);
    check(r_skip, "TPB with equal block number skips");
    check(t_rel > START + 10 * 24 && t_rel < START + RELAY + 12 * 24 + 200,
          $sformatf("TPB released at the block number (%0d clocks)", t_rel));
    wait_idle();
    begin
      bit ok;
      ok = 1;
      for (int a = 0; a < CB_WORDS; a++) begin cpu_read(a, w); if (w != blk[a]) ok = 0; end
      check(ok, "TPB read the block back into the CB");
    end
    issue(OP_BST, 1, 16'h0000);
    wait_idle();
    issue(OP_TPB, 1, 16'h0816);
    check(!r_skip, "TPB with a different block number does not skip");
    wait_idle();
    issue(OP_JTG, 0, 16'h0000);
    check(r_jump && !tc_ind, "no tape check after good reads");

    // ---------------- rewind: TCU free after the RWD time, MTH busy longer
    issue(OP_RWD, 1, 16'h0000);
    wait_idle();
    check(mth_busy[1], "MTH busy while rewinding after the TCU is released");
    issue(OP_BTP, 2, 16'h0002);
    check(t_wait < 10, "other handler usable during rewind");
    wait_idle();
    while (mth_busy[1]) @(negedge clk);
    check(mth_stat[1].at_lp, "rewind ends at the load point");
    issue(OP_BST, 1, 16'h0000);
    check(!tcu_busy, "BST at the load point is a NOP");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
