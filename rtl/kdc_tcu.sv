// kdc_tcu: the magnetic tape control unit (TCU) of the KDC-I computer.
//
// The TCU stands between the CPU and up to four magnetic tape handlers
// (MTH). It contains a 50-word core buffer (CB) that doubles as the CPU's
// fast registers 4200-4249, and runs the tape instructions concurrently with
// the CPU. Its parts, wired as in the TCU block diagram:
//   tcu_main_control   main control, MTH control, jump/skip, end of operation
//   tcu_indicators     TCU busy, No. N MTH busy, No. N TE and TC indicators
//   core_buffer        CB, 50 words of 12 digits + parity (2 x 30-bit cores)
//   core_addr_reg      AR, two decimal digits, with its validity check
//   distributor_reg    DR, one word, series-parallel conversion and checks
//   nrz_format         output format control: NRZ flip-flops, channel parity
//   read_front_end     noise suppression and skew correction (8 channels)
//   block_number_test  block number comparison with #JA
//   mth_selector       relay selection of one handler
//   cb_adjustment      panel test of the CB
//
// The TCU connect/disconnect switch (`panel_mode`) hands the instruction
// inputs to the control panel (`panel_*`), so that instructions can be
// triggered by hand, and lets the CB adjustment circuit use the CB.
//
// CB ownership: the adjustment circuit while it runs, the main control while
// an operation of the TCU uses the CB, otherwise the CPU. A CPU access is a
// one-clock `cpu_cb_req`; it is held pending while the CB is owned by the
// TCU and answered with `cpu_cb_ack`. Words the CPU reads are parity and
// validity checked; a failure raises `error_stop`, as do errors found by the
// main control on words bound for tape or drum.
//
// The handler ports are one entry per MTH: `mth_cmd` (motion, erase, write
// current, rewind pulse, NRZ write levels), `mth_rd` (reshaped read pulses
// per channel) and `mth_stat` (ready, load point, tape end, rewinding).
// Timing is in digit times (about 4.33 us per clock); see kdc_tape_pkg.
module kdc_tcu
  import kdc_tape_pkg::*;
#(
  parameter int unsigned NM               = 4,
  parameter int unsigned CHAR_CLKS        = 24,
  parameter int unsigned CPU_RELEASE_CLKS = 104,
  parameter int unsigned START_CLKS       = 1615,
  parameter int unsigned STOP_CLKS        = 1615,
  parameter int unsigned RUNOUT_CLKS      = 3072,
  parameter int unsigned RWD_TCU_CLKS     = 4615,
  parameter int unsigned RELAY_CLKS       = 692,
  parameter int unsigned NOISE_COUNT      = 4,
  parameter int unsigned BTR_DELAY        = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU instruction interface
  input  logic        instr_valid,
  input  op_t         instr_op,
  input  logic [1:0]  instr_n,
  input  logic [15:0] instr_ja,
  input  logic        halt_te,
  output logic        instr_accept,
  output logic        cpu_release,
  output logic        cpu_skip,
  output logic        cpu_jump,
  output logic        error_stop,
  // CPU fast registers 4200-4249
  input  logic        cpu_cb_req,
  input  logic        cpu_cb_we,
  input  logic [5:0]  cpu_cb_addr,
  input  word_t       cpu_cb_wdata,
  output word_t       cpu_cb_rdata,
  output logic        cpu_cb_ack,
  // drum (in the CPU) for DMB / BDM
  output logic        drum_req,
  output logic        drum_we,
  output logic [13:0] drum_addr,
  output word_t       drum_wdata,
  input  logic        drum_ack,
  input  word_t       drum_rdata,
  // indicators (console and panel lamps)
  output logic        tcu_busy,
  output logic [NM-1:0] mth_busy,
  output logic [NM-1:0] te_ind,
  output logic        tc_ind,
  // control panel
  input  logic        panel_mode,
  input  logic        panel_instr_valid,
  input  op_t         panel_op,
  input  logic [1:0]  panel_n,
  input  logic [15:0] panel_ja,
  input  logic        adj_start,
  input  logic        adj_stop,
  input  logic [2:0]  adj_mode,
  output logic        adj_running,
  output word_t       panel_word,
  // tape handlers
  output mth_cmd_t    mth_cmd  [NM],
  input  tchar_t      mth_rd   [NM],
  input  mth_stat_t   mth_stat [NM]
);
  // ---------------------------------------------------------- wiring
  logic        tcu_busy_set, tcu_busy_clr, tc_set, tc_clr;
  logic [NM-1:0] op_busy_set, op_busy_clr, te_clr;
  logic [1:0]  sel;
  logic        sel_settled;
  logic        mot_fwd, mot_bwd, mot_erase, mot_write, mot_rewind;
  logic        nrz_clear, nrz_toggle, nrz_even;
  tchar_t      nrz_ch, nrz, cp_code, sel_rd;
  logic        rd_enable, rd_valid;
  tchar_t      rd_char;
  logic        dr_load, dr_shift, dr_parity_ok, dr_valid;
  bcd_t        dr_in_digit, dr_out_digit;
  word_t       dr_word;
  logic        ar_clear, ar_inc, ar_last, ar_valid;
  bcd_t        ar_tens, ar_units;
  logic [5:0]  ar_bin;
  logic        bnt_clear, bnt_strobe, bnt_done, bnt_equal, bnt_perr;
  tchar_t      bnt_ch;
  logic [15:0] bnt_target;
  logic        mc_cb_req, mc_cb_we, mc_err, op_active;
  logic [5:0]  mc_cb_addr;
  word_t       mc_cb_wdata;
  logic        adj_req, adj_we;
  logic [5:0]  adj_addr;
  word_t       adj_wdata;
  logic        cb_req, cb_we, cb_ack, cb_busy;
  logic [5:0]  cb_addr;
  word_t       cb_wdata, cb_rdata;
  mth_cmd_t    cmd;

  // TCU connect/disconnect switch; an instruction is offered to the main
  // control only while the CB is idle, so a tape operation never finds the
  // CB in the middle of a CPU access
  logic        iv;
  op_t         iop;
  logic [1:0]  in_n;
  logic [15:0] ija;
  assign iv   = (panel_mode ? panel_instr_valid : instr_valid) && !cb_busy && !adj_running;
  assign iop  = panel_mode ? panel_op          : instr_op;
  assign in_n = panel_mode ? panel_n           : instr_n;
  assign ija  = panel_mode ? panel_ja          : instr_ja;

  tcu_main_control #(
    .NM(NM), .CHAR_CLKS(CHAR_CLKS), .CPU_RELEASE_CLKS(CPU_RELEASE_CLKS),
    .START_CLKS(START_CLKS), .STOP_CLKS(STOP_CLKS), .RUNOUT_CLKS(RUNOUT_CLKS),
    .RWD_TCU_CLKS(RWD_TCU_CLKS), .DROP_CLKS(4 * CHAR_CLKS)
  ) u_main (
    .clk, .rst_n,
    .instr_valid(iv), .instr_op(iop), .instr_n(in_n), .instr_ja(ija), .halt_te,
    .instr_accept, .cpu_release, .cpu_skip, .cpu_jump, .error_stop(mc_err), .op_active,
    .tcu_busy, .mth_busy, .te_ind, .tc_ind, .stat(mth_stat),
    .tcu_busy_set, .tcu_busy_clr, .op_busy_set, .op_busy_clr, .te_clr, .tc_set, .tc_clr,
    .sel, .sel_settled, .mot_fwd, .mot_bwd, .mot_erase, .mot_write, .mot_rewind,
    .nrz_clear, .nrz_toggle, .nrz_ch, .cp_code, .nrz_even,
    .rd_enable, .rd_valid, .rd_char,
    .dr_load, .dr_shift, .dr_in_digit, .dr_word, .dr_out_digit, .dr_parity_ok, .dr_valid,
    .ar_clear, .ar_inc, .ar_bin, .ar_valid,
    .bnt_clear, .bnt_strobe, .bnt_ch, .bnt_target, .bnt_done, .bnt_equal, .bnt_perr,
    .cb_req(mc_cb_req), .cb_we(mc_cb_we), .cb_addr(mc_cb_addr), .cb_wdata(mc_cb_wdata),
    .cb_ack, .cb_rdata,
    .drum_req, .drum_we, .drum_addr, .drum_wdata, .drum_ack, .drum_rdata
  );

  tcu_indicators #(.NM(NM)) u_ind (
    .clk, .rst_n, .tcu_busy_set, .tcu_busy_clr, .op_busy_set, .op_busy_clr,
    .stat(mth_stat), .te_clr, .tc_set, .tc_clr,
    .tcu_busy, .mth_busy, .te_ind, .tc_ind
  );

  core_buffer #(.WORDS(CB_WORDS)) u_cb (
    .clk, .rst_n, .req(cb_req), .we(cb_we), .addr(cb_addr), .wdata(cb_wdata),
    .rdata(cb_rdata), .ack(cb_ack), .busy(cb_busy)
  );

  core_addr_reg u_ar (
    .clk, .rst_n, .clear(ar_clear), .load(1'b0), .load_tens('0), .load_units('0),
    .inc(ar_inc), .tens(ar_tens), .units(ar_units), .bin(ar_bin), .last(ar_last),
    .valid(ar_valid)
  );

  distributor_reg u_dr (
    .clk, .rst_n, .clear(1'b0), .load(dr_load), .load_word(cb_rdata),
    .shift(dr_shift), .in_digit(dr_in_digit), .word(dr_word),
    .out_digit(dr_out_digit), .parity_ok(dr_parity_ok), .valid(dr_valid)
  );

  nrz_format u_nrz (
    .clk, .rst_n, .clear(nrz_clear), .toggle(nrz_toggle), .ch(nrz_ch),
    .nrz, .cp_code, .even(nrz_even)
  );

  read_front_end #(.NOISE_COUNT(NOISE_COUNT), .BTR_DELAY(BTR_DELAY)) u_rfe (
    .clk, .rst_n, .enable(rd_enable), .rd_pulse(sel_rd),
    .char_out(rd_char), .char_valid(rd_valid)
  );

  block_number_test u_bnt (
    .clk, .rst_n, .clear(bnt_clear), .strobe(bnt_strobe), .ch(bnt_ch),
    .target(bnt_target), .done(bnt_done), .equal(bnt_equal), .parity_err(bnt_perr)
  );

  assign cmd = '{fwd: mot_fwd, bwd: mot_bwd, erase: mot_erase, write: mot_write,
                 rewind: mot_rewind, nrz: nrz};

  mth_selector #(.NM(NM), .RELAY_CLKS(RELAY_CLKS)) u_sel (
    .clk, .rst_n, .sel, .cmd, .mth_cmd, .mth_rd, .rd(sel_rd), .settled(sel_settled)
  );

  cb_adjustment #(.WORDS(CB_WORDS)) u_adj (
    .clk, .rst_n, .start(adj_start && panel_mode && !tcu_busy), .stop(adj_stop),
    .mode(adj_mode), .running(adj_running),
    .cb_req(adj_req), .cb_we(adj_we), .cb_addr(adj_addr), .cb_wdata(adj_wdata),
    .cb_ack, .cb_rdata, .panel_word
  );

  // ------------------------------------------------- CB ownership and CPU
  typedef enum logic [1:0] {OWN_CPU, OWN_MC, OWN_ADJ} owner_t;
  owner_t cur_owner;             // owner of the access in progress
  logic   cpu_pend, cpu_pwe, cpu_issue, cpu_check;
  logic [5:0] cpu_paddr;
  word_t  cpu_pwdata;
  logic   cpu_err;

  assign cpu_issue = cpu_pend && !adj_running && !op_active && !cb_busy && !iv &&
                     !mc_cb_req && !adj_req && !cb_ack;

  always_comb begin
    cb_req   = 1'b0;
    cb_we    = 1'b0;
    cb_addr  = '0;
    cb_wdata = '0;
    if (adj_req) begin
      cb_req = 1'b1; cb_we = adj_we; cb_addr = adj_addr; cb_wdata = adj_wdata;
    end else if (mc_cb_req) begin
      cb_req = 1'b1; cb_we = mc_cb_we; cb_addr = mc_cb_addr; cb_wdata = mc_cb_wdata;
    end else if (cpu_issue) begin
      cb_req = 1'b1; cb_we = cpu_pwe; cb_addr = cpu_paddr; cb_wdata = cpu_pwdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_owner    <= OWN_CPU;
      cpu_pend     <= 1'b0;
      cpu_pwe      <= 1'b0;
      cpu_paddr    <= '0;
      cpu_pwdata   <= '0;
      cpu_cb_ack   <= 1'b0;
      cpu_cb_rdata <= '0;
      cpu_check    <= 1'b0;
      cpu_err      <= 1'b0;
    end else begin
      cpu_cb_ack <= 1'b0;
      cpu_check  <= 1'b0;
      if (cpu_cb_req && !cpu_pend) begin
        cpu_pend   <= 1'b1;
        cpu_pwe    <= cpu_cb_we;
        cpu_paddr  <= cpu_cb_addr;
        cpu_pwdata <= cpu_cb_wdata;
      end
      if (cb_req && !cb_busy)
        cur_owner <= adj_req ? OWN_ADJ : (mc_cb_req ? OWN_MC : OWN_CPU);
      if (cpu_issue) cpu_pend <= 1'b0;
      if (cb_ack && cur_owner == OWN_CPU) begin
        cpu_cb_ack   <= 1'b1;
        cpu_cb_rdata <= cb_rdata;
        cpu_check    <= !cpu_pwe;
      end
      if (cpu_check && (!word_parity_ok(cpu_cb_rdata) || !word_valid(cpu_cb_rdata)))
        cpu_err <= 1'b1;
    end
  end

  assign error_stop = mc_err | cpu_err;

  // the CB takes a request only when it is idle
  a_cb_idle: assert property (@(posedge clk) disable iff (!rst_n) cb_req |-> !cb_busy);
endmodule
