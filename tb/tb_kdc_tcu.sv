// tb_kdc_tcu: end-to-end test of the tape control unit at its default
// parameters, with four tape handler models and a drum model.
//
// A CPU process fills the fast registers, writes three blocks with
// different block numbers, checks the recorded tape frame by frame (codes,
// character parity, channel parity, block number, data), then reads them
// back with TPB, BLS, TTP and BST, rewinds, erases, runs into the tape end,
// moves words between drum and CB, uses the control panel and provokes
// errors. Every mechanism of the TCU is counted and must occur:
// concurrent release, busy wait, skip, jump, TC set/clear, TE set/clear,
// NOP by TE, rewind overlapped with another handler, block search past
// other blocks, backward read, noise rejected, drum transfers in both
// directions with zero fill, panel instruction, CB adjustment, error stop.
module tb_kdc_tcu;
  import kdc_tape_pkg::*;

  localparam int NM = 4;
  localparam int unsigned CPU_REL = 104;   // 0.45 ms in digit times
  localparam int unsigned CHAR    = 24;    // clocks per tape character

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
  logic [NM-1:0] noise = '0;

  kdc_tcu dut (.*);

  for (genvar i = 0; i < NM; i++) begin : g_m
    mth_model u (.clk, .cmd(mth_cmd[i]), .noise(noise[i]), .rd(mth_rd[i]), .stat(mth_stat[i]));
  end

  // ---------------------------------------------------------- drum model
  word_t drum [10000];
  always_ff @(posedge clk) begin
    drum_ack <= 1'b0;
    if (drum_req) begin
      if (drum_we) drum[drum_addr] <= drum_wdata;
      drum_rdata <= drum[drum_addr];
      drum_ack   <= 1'b1;
    end
  end

  // ---------------------------------------------------------- bookkeeping
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef enum int {M_CONC, M_BUSYWAIT, M_SKIP, M_NOSKIP, M_JUMP, M_NOJUMP,
                    M_TCSET, M_TESET, M_TENOP, M_RWD_OVERLAP, M_BLS_PASS,
                    M_BACKWARD, M_NOISE, M_DMB, M_DMB_ZERO, M_BDM, M_BDM_NOP,
                    M_PANEL, M_ADJ, M_ERRSTOP, M_CHANPAR, M_NUM} mech_t;
  int mech [M_NUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- helpers
  function automatic word_t rand_word();
    word_t w;
    for (int k = 0; k < DIGITS; k++) begin
      bcd_t d = (k == DIGITS - 1) ? bcd_t'($urandom_range(3)) : bcd_t'($urandom_range(9));
      w[5*k +: 5] = digit_with_parity(d);
    end
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

  // issue an instruction; returns clocks from acceptance to release
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

  task automatic wait_mth_free(input int n);
    while (mth_busy[n] || tcu_busy) @(negedge clk);
    @(negedge clk);
  endtask

  // ---------------------------------------------------------- tape check
  word_t blk_words [4][CB_WORDS];

  // check one recorded block starting at frame p on handler n
  task automatic check_block_on_tape(input int n, input int p, input logic [15:0] bn,
                                     input int which);
    tchar_t c, acc;
    bit ok_par, ok_fmt, ok_data;
    word_t w;
    ok_par = 1; ok_fmt = 1; ok_data = 1; acc = '0;
    for (int i = 0; i < BLOCK_CHARS; i++) begin
      case (n)
        0: c = g_m[0].u.tape[p + i];
        default: c = g_m[1].u.tape[p + i];
      endcase
      if (!(^c)) ok_par = 0;
      if (i <= int'(IDX_CP)) acc ^= c;
      if (i < 4 && c != CODE_BB) ok_fmt = 0;
      if ((i == 4 || i == 9 || i == int'(IDX_NE3)) && c != CODE_NE) ok_fmt = 0;
      if (i >= 5 && i < 9 && (!is_digit(c) || char_value(c) != bn[4*(8-i) +: 4])) ok_fmt = 0;
      if (i >= int'(IDX_BE0) && c != CODE_BE) ok_fmt = 0;
      if (i >= int'(IDX_DATA0) && i < int'(IDX_NE3)) begin
        int wi, wp;
        wi = (i - IDX_DATA0) / CHARS_PER_WORD;
        wp = (i - IDX_DATA0) % CHARS_PER_WORD;
        if (wp == 12) begin
          if (c != CODE_WEND) ok_fmt = 0;
        end else if (char_value(c) != blk_words[which][wi][5*(11-wp) +: 4]) ok_data = 0;
      end
    end
    check(ok_par, "every recorded character has odd parity");
    check(acc == '0, "channel parity even in every channel");
    check(ok_fmt, "block layout: BB, NE, block number, NE, words, NE, CP, BE");
    check(ok_data, "recorded digits equal the CB words");
    if (acc == '0) mech[M_CHANPAR]++;
  endtask

  function automatic int find_block(input int n, input int from);
    for (int i = from; i < 4096; i++) begin
      tchar_t c;
      case (n)
        0: c = g_m[0].u.tape[i];
        default: c = g_m[1].u.tape[i];
      endcase
      if (c != '0) return i;
    end
    return -1;
  endfunction

  task automatic fill_cb(input int which);
    for (int a = 0; a < CB_WORDS; a++) begin
      blk_words[which][a] = rand_word();
      cpu_write(a, blk_words[which][a]);
    end
  endtask

  task automatic expect_cb(input int which, input string what);
    word_t w;
    bit ok;
    ok = 1;
    for (int a = 0; a < CB_WORDS; a++) begin
      cpu_read(a, w);
      if (w != blk_words[which][a]) ok = 0;
    end
    check(ok, what);
  endtask

  // ---------------------------------------------------------- scenario
  int p0, p1, p2;
  word_t w;
  initial begin
    foreach (drum[i]) drum[i] = '0;
    @(negedge clk);
    rst_n = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // fast registers
    fill_cb(0);
    expect_cb(0, "CB fast registers read back");
    check(!error_stop, "no error stop after good words");

    // ---- BTP #1234 on MTH 1 (index 0): concurrent with the CPU
    issue(OP_BTP, 0, 16'h1234);
    check(t_rel == CPU_REL, $sformatf("BTP releases the CPU after 0.45 ms (%0d clocks)", t_rel));
    check(tcu_busy && mth_busy[0], "TCU and MTH 1 busy during BTP");
    if (tcu_busy) mech[M_CONC]++;
    // register writes wait for the CB while the TCU uses it
    fill_cb(1);
    check(!tcu_busy, "register access waited for the end of BTP");
    issue(OP_BTP, 0, 16'h0042);
    // JTE on the busy handler is held until MTH 1 is free
    issue(OP_JTE, 0, 16'h0200);
    check(t_wait > 1000 && !mth_busy[0], $sformatf("JTE waited for MTH 1 busy (%0d clocks)", t_wait));
    if (t_wait > 1000) mech[M_BUSYWAIT]++;
    fill_cb(2);
    issue(OP_BTP, 0, 16'h0777);
    // while MTH 1 writes, the CPU's register access waits for the CB
    begin
      int unsigned tr0;
      tr0 = cyc;
      cpu_read(0, w);
      check(!tcu_busy, "CPU fast register access waited for the TCU");
      if (cyc - tr0 > 1000) mech[M_BUSYWAIT]++;
    end

    // ---- recorded tape
    p0 = find_block(0, 0);
    p1 = find_block(0, p0 + BLOCK_CHARS);
    p2 = find_block(0, p1 + BLOCK_CHARS);
    check(p0 > 0 && p1 > p0 && p2 > p1, "three blocks on tape 1");
    check_block_on_tape(0, p0, 16'h1234, 0);
    check_block_on_tape(0, p1, 16'h0042, 1);
    check_block_on_tape(0, p2, 16'h0777, 2);
    check(p1 - (p0 + BLOCK_CHARS) >= 100, "inter-block gap present");

    // ---- rewind MTH 1; MTH 2 is usable after 20 ms
    issue(OP_RWD, 0, 16'h0);
    check(t_rel == CPU_REL, "RWD releases after 0.45 ms");
    wait_idle();
    check(mth_busy[0] && mth_stat[0].rewinding, "MTH 1 still busy rewinding after the TCU is free");
    fill_cb(3);
    issue(OP_BTP, 1, 16'h0001);    // on MTH 2 while MTH 1 rewinds
    if (mth_stat[0].rewinding) mech[M_RWD_OVERLAP]++;
    wait_mth_free(0);
    wait_mth_free(1);
    check(mth_stat[0].at_lp, "rewind ends at load point");
    check_block_on_tape(1, find_block(1, 0), 16'h0001, 3);

    // ---- TPB with matching block number: skip
    for (int a = 0; a < CB_WORDS; a++) cpu_write(a, '0);
    issue(OP_TPB, 0, 16'h1234);
    check(r_skip == 1, "TPB skips when block number equals #JA");
    check(t_rel > 2000 && t_rel < 8000, $sformatf("TPB releases after the block number (%0d clocks)", t_rel));
    if (r_skip) mech[M_SKIP]++;
    wait_idle();
    expect_cb(0, "TPB stored block 1 in the CB");
    check(!tc_ind, "TC off after a good read");

    // ---- TPB on the next block with another number: no skip, still read
    noise[0] = 1;
    issue(OP_TPB, 0, 16'h9999);
    check(r_skip == 0, "TPB does not skip on unequal block number");
    if (!r_skip) mech[M_NOSKIP]++;
    wait_idle();
    noise[0] = 0;
    expect_cb(1, "TPB with noise on the read lines stored block 2");
    check(!tc_ind, "noise glitches rejected: TC still off");
    if (!tc_ind) mech[M_NOISE]++;

    // ---- BLS: rewind, then search block 0777 past two blocks
    issue(OP_RWD, 0, 16'h0);
    wait_mth_free(0);
    begin
      int unsigned tb0;
      tb0 = cyc;
      issue(OP_BLS, 0, 16'h0777);
      check(t_rel == CPU_REL, "BLS releases after 0.45 ms");
      wait_idle();
      check(cyc - tb0 > 2 * BLOCK_CHARS * CHAR, "BLS ran past two blocks");
      if (cyc - tb0 > 2 * BLOCK_CHARS * CHAR) mech[M_BLS_PASS]++;
    end
    expect_cb(2, "BLS stored the block numbered 0777");
    issue(OP_JTG, 0, 16'h0100);
    check(r_jump == 1, "JTG jumps when TC is off");
    if (r_jump) mech[M_JUMP]++;

    // ---- BST over block 0777, then corrupt it and test it
    issue(OP_BST, 0, 16'h0);
    wait_idle();
    check(!tc_ind, "BST reads the block backward without error");
    mech[M_BACKWARD]++;
    g_m[0].u.tape[p2 + 100] = g_m[0].u.tape[p2 + 100] ^ 8'h01;
    issue(OP_TTP, 0, 16'h0);
    wait_idle();
    check(tc_ind, "TTP finds the parity error: TC on");
    if (tc_ind) mech[M_TCSET]++;
    issue(OP_JTG, 0, 16'h0100);
    check(r_jump == 0, "JTG does not jump when TC is on");
    if (!r_jump) mech[M_NOJUMP]++;
    check(!tc_ind, "JTG clears TC");

    // ---- erase the bad block, then search into the tape end
    issue(OP_BST, 0, 16'h0);
    wait_idle();
    issue(OP_ETP, 0, 16'h0);
    wait_idle();
    check(find_block(0, p2 - 50) < 0 || find_block(0, p2 - 50) > p2 + BLOCK_CHARS,
          "ETP erased the block");
    issue(OP_JTE, 0, 16'h0200);
    check(r_jump == 0, "JTE does not jump before the tape end");
    issue(OP_TTP, 0, 16'h0);          // no block until TE: NOP
    wait_idle();
    check(te_ind[0], "tape end sets the TE indicator");
    if (te_ind[0]) mech[M_TESET]++;
    issue(OP_JTE, 0, 16'h0200);
    check(r_jump == 1, "JTE jumps at tape end");
    check(te_ind[0], "JTE leaves TE on");
    begin
      int unsigned fw;
      fw = g_m[0].u.frames_written;
      issue(OP_BTP, 0, 16'h5555);     // NOP while TE is on
      check(!tcu_busy && g_m[0].u.frames_written == fw, "BTP with TE on is NOP");
      if (!tcu_busy) mech[M_TENOP]++;
    end
    issue(OP_RWD, 0, 16'h0);
    check(!te_ind[0], "rewind clears TE");
    wait_mth_free(0);

    // ---- drum transfers
    for (int i = 0; i < 400; i++) drum[i] = rand_word();
    for (int a = 0; a < CB_WORDS; a++) begin
      blk_words[0][a] = rand_word();
      cpu_write(a, blk_words[0][a]);
    end
    issue(OP_DMB, 0, 16'h0120);       // 30 words: 120..149
    begin
      bit ok;
      ok = 1;
      for (int a = 0; a < CB_WORDS; a++) begin
        cpu_read(a, w);
        if (a < 30 && w != drum[120 + a]) ok = 0;
        if (a >= 30 && w != blk_words[0][a]) ok = 0;
      end
      check(ok, "DMB E=0120 moved 30 words and left the rest");
      if (ok) mech[M_DMB]++;
    end
    for (int a = 0; a < CB_WORDS; a++) cpu_read(a, blk_words[0][a]);
    w = drum[350];
    issue(OP_BDM, 0, 16'h0305);       // 45 words to 305..349
    begin
      bit ok;
      ok = 1;
      check(drum[350] == w, "BDM leaves the word after EL alone");
      for (int a = 0; a < 45; a++) if (drum[305 + a] != blk_words[0][a]) ok = 0;
      check(ok, "BDM E=0305 moved 45 words");
      if (ok) mech[M_BDM]++;
    end
    issue(OP_DMB, 0, 16'h4300);       // zeros into all 50
    begin
      bit ok;
      ok = 1;
      for (int a = 0; a < CB_WORDS; a++) begin
        cpu_read(a, w);
        if (w != '0) ok = 0;
      end
      check(ok, "DMB with E >= 4200 writes zeros");
      if (ok) mech[M_DMB_ZERO]++;
    end
    drum[5000] = '0;
    issue(OP_BDM, 0, 16'h5000);
    check(drum[5000] == '0 && !tcu_busy, "BDM with E >= 4200 is NOP");
    mech[M_BDM_NOP]++;

    // ---- control panel: instruction by hand and CB adjustment
    panel_mode = 1;
    @(negedge clk);
    panel_op = OP_JTE; panel_n = 0; panel_instr_valid = 1;
    while (!instr_accept) @(negedge clk);
    panel_instr_valid = 0;
    while (!cpu_release) @(negedge clk);
    check(cpu_jump == 0, "panel-triggered JTE executes");
    mech[M_PANEL]++;
    adj_mode = 3'd3; adj_start = 1;       // all ones
    @(negedge clk); adj_start = 0;
    @(negedge clk);
    check(adj_running, "CB adjustment runs");
    while (adj_running) @(negedge clk);
    adj_mode = 3'd1; adj_start = 1;       // read all repeatedly
    @(negedge clk); adj_start = 0;
    repeat (50 * 10) @(negedge clk);
    adj_stop = 1;
    while (adj_running) @(negedge clk);
    adj_stop = 0;
    check(panel_word == '1, "read-all shows the all-ones pattern");
    if (panel_word == '1) mech[M_ADJ]++;
    adj_mode = 3'd0; adj_start = 1;       // reset all words
    @(negedge clk); adj_start = 0;
    @(negedge clk);
    while (adj_running) @(negedge clk);
    panel_mode = 0;
    cpu_read(7, w);
    check(w == '0, "CB reset by the adjustment circuit");

    // ---- error stop: a bad-parity word bound for the drum
    check(!error_stop, "no error stop so far");
    cpu_write(3, 60'h1);                  // digit 1 = 1 without its parity bit
    issue(OP_BDM, 0, 16'h0000);
    check(error_stop, "CB parity error stops the computation");
    if (error_stop) mech[M_ERRSTOP]++;

    // ---- every mechanism happened
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s: %0d", mech_t'(m), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s exercised", mech_t'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
