// tcu_main_control: the main control of the KDC-I tape control unit,
// together with the MTH control, jump/skip control and end-of-operation
// logic of the TCU block diagram.
//
// It takes one instruction at a time from the CPU (`instr_valid` held until
// `instr_accept`) and runs it:
//   BTP  write #JA and the 50 CB words as one block (erase head on)
//   ETP  erase one block length and gap (no write current)
//   TPB  read the nearest block into the CB; skip the next instruction when
//        its block number equals #JA
//   BLS  read block numbers until one equals #JA, then read that block
//   TTP  read the nearest block forward, parity checks only
//   BST  read the nearest block backward, parity checks only
//   RWD  start a rewind; the TCU is busy only for RWD_TCU_CLKS
//   JTG  jump if TC is off; TC is cleared
//   JTE  jump if No. N TE is on
//   DMB  drum -> CB fast registers, BDM  CB -> drum (50 - E mod 50 words)
// Accepting waits, as the document requires, until the TCU and No. N MTH
// busy indicators are off. The CPU is released (`cpu_release` one-clock
// pulse, with `cpu_skip`/`cpu_jump`) CPU_RELEASE_CLKS (0.45 ms) after the
// start, so it runs concurrently with the tape; TPB releases when the block
// number has been compared (about 17 ms in the machine), DMB/BDM when the
// transfer is over. The TE indicator turns an operation into NOP as listed
// in the document (forward operations with TE on; BST and RWD at load point).
//
// Tape format handling is character-indexed (see kdc_tape_pkg): on writing a
// character is emitted every CHAR_CLKS clocks through the NRZ flip-flops;
// on reading the block is synchronised on its first block-beginning code
// (block-ending code when backward) and every later character is checked
// against the code expected at its index. Read errors (character parity,
// code validity, channel parity, DR parity/validity, drop-out) set the TC
// indicator and do not stop the computer. Errors on words going from the CB
// to tape or drum, and an invalid AR, raise `error_stop`, the document's
// "the error will cause the computation to stop".
//
// This design's own choices: the clock is one digit time; after the last
// block-ending code the tape runs RUNOUT_CLKS more (to the middle of the
// gap) before it is stopped, and a write starts with the same length of
// erased lead-in, so blocks are 4 cm apart with the head stopped mid-gap as
// the document describes; a read block that goes quiet for DROP_CLKS is
// abandoned with TC set; `halt_te` (console HALT + TE buttons) ends a block
// search as NOP.
module tcu_main_control
  import kdc_tape_pkg::*;
#(
  parameter int unsigned NM               = 4,
  parameter int unsigned CHAR_CLKS        = 24,    // 104 us
  parameter int unsigned CPU_RELEASE_CLKS = 104,   // 0.45 ms
  parameter int unsigned START_CLKS       = 1615,  // 7 ms
  parameter int unsigned STOP_CLKS        = 1615,  // 7 ms
  parameter int unsigned RUNOUT_CLKS      = 3072,  // 2 cm at 150 cm/s
  parameter int unsigned RWD_TCU_CLKS     = 4615,  // 20 ms
  parameter int unsigned DROP_CLKS        = 96     // 4 character times
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU
  input  logic          instr_valid,
  input  op_t           instr_op,
  input  logic [1:0]    instr_n,
  input  logic [15:0]   instr_ja,
  input  logic          halt_te,
  output logic          instr_accept,
  output logic          cpu_release,
  output logic          cpu_skip,
  output logic          cpu_jump,
  output logic          error_stop,
  output logic          op_active,      // TCU owns the CB
  // indicators
  input  logic          tcu_busy,
  input  logic [NM-1:0] mth_busy,
  input  logic [NM-1:0] te_ind,
  input  logic          tc_ind,
  input  mth_stat_t     stat [NM],
  output logic          tcu_busy_set,
  output logic          tcu_busy_clr,
  output logic [NM-1:0] op_busy_set,
  output logic [NM-1:0] op_busy_clr,
  output logic [NM-1:0] te_clr,
  output logic          tc_set,
  output logic          tc_clr,
  // MTH selector and motion
  output logic [1:0]    sel,
  input  logic          sel_settled,
  output logic          mot_fwd,
  output logic          mot_bwd,
  output logic          mot_erase,
  output logic          mot_write,
  output logic          mot_rewind,
  // output format control (NRZ flip-flops)
  output logic          nrz_clear,
  output logic          nrz_toggle,
  output tchar_t        nrz_ch,
  input  tchar_t        cp_code,
  input  logic          nrz_even,
  // noise suppression / skew correction
  output logic          rd_enable,
  input  logic          rd_valid,
  input  tchar_t        rd_char,
  // DR
  output logic          dr_load,
  output logic          dr_shift,
  output bcd_t          dr_in_digit,
  input  word_t         dr_word,
  input  bcd_t          dr_out_digit,
  input  logic          dr_parity_ok,
  input  logic          dr_valid,
  // AR
  output logic          ar_clear,
  output logic          ar_inc,
  input  logic [5:0]    ar_bin,
  input  logic          ar_valid,
  // block number test
  output logic          bnt_clear,
  output logic          bnt_strobe,
  output tchar_t        bnt_ch,
  output logic [15:0]   bnt_target,
  input  logic          bnt_done,
  input  logic          bnt_equal,
  input  logic          bnt_perr,
  // CB
  output logic          cb_req,
  output logic          cb_we,
  output logic [5:0]    cb_addr,
  output word_t         cb_wdata,
  input  logic          cb_ack,
  input  word_t         cb_rdata,
  // drum
  output logic          drum_req,
  output logic          drum_we,
  output logic [13:0]   drum_addr,
  output word_t         drum_wdata,
  input  logic          drum_ack,
  input  word_t         drum_rdata
);
  typedef enum logic [4:0] {
    S_IDLE, S_JUMP, S_SELECT, S_START, S_WLP, S_WLOAD, S_WRITE,
    S_RSEEK, S_RBLOCK, S_RUNOUT, S_STOP, S_RWD, S_DRUM_A, S_DRUM_B,
    S_END
  } state_t;

  state_t      st;
  op_t         op;
  logic [1:0]  n;
  logic [15:0] ja;
  logic [15:0] tmr;
  logic [15:0] rel_cnt;
  logic        released;
  logic        rel_at_cnt;     // release by the 0.45 ms counter
  logic [9:0]  idx;            // character index inside the block
  logic [3:0]  wp;             // character position inside a word (0..12)
  logic [4:0]  ctick;          // character timer while writing
  logic        need_load;      // CB word to fetch into the DR
  logic        target;         // BLS: this block is the one searched for
  logic        checking;       // full checks on this block
  logic        store;          // words go to the CB
  logic        bn_seen;        // block number compared (TPB release)
  logic        cp_count;       // parity code being counted this clock
  logic        cp_check;       // NRZ flip-flops hold the final count
  logic        chk_load;       // check the DR after a CB load
  logic [5:0]  k_words;        // drum transfer word count
  logic [13:0] e_addr;         // drum start address E

  wire  tape_write    = (op == OP_BTP) || (op == OP_ETP);
  wire  backward      = (op == OP_BST);

  // ------------------------------------------------------------ E for drum
  int unsigned e_int;
  assign e_int = bcd4_to_int(instr_ja);

  // -------------------------------------------------- character to write
  tchar_t wchar;
  always_comb begin
    if (idx < 10'(IDX_NE1))           wchar = CODE_BB;
    else if (idx == 10'(IDX_NE1))     wchar = CODE_NE;
    else if (idx < 10'(IDX_NE2))      wchar = code_digit(ja[4*(3 - (idx - 10'(IDX_BN0))) +: 4]);
    else if (idx == 10'(IDX_NE2))     wchar = CODE_NE;
    else if (idx < 10'(IDX_NE3))      wchar = (wp == 4'd12) ? CODE_WEND : code_digit(dr_out_digit);
    else if (idx == 10'(IDX_NE3))     wchar = CODE_NE;
    else if (idx == 10'(IDX_CP))      wchar = cp_code;
    else                              wchar = CODE_BE;
  end

  // -------------------------------- expected class of a character read
  // forward index f = idx; backward index maps to 665 - idx
  logic [9:0] fidx;
  logic       exp_ok;
  assign fidx = backward ? 10'(IDX_LAST) - idx : idx;
  always_comb begin
    if (fidx < 10'(IDX_NE1))          exp_ok = (rd_char == CODE_BB);
    else if (fidx == 10'(IDX_NE1))    exp_ok = (rd_char == CODE_NE);
    else if (fidx < 10'(IDX_NE2))     exp_ok = is_digit(rd_char);
    else if (fidx == 10'(IDX_NE2))    exp_ok = (rd_char == CODE_NE);
    else if (fidx < 10'(IDX_NE3))     exp_ok = (wp == 4'd12) ? (rd_char == CODE_WEND) : is_digit(rd_char);
    else if (fidx == 10'(IDX_NE3))    exp_ok = (rd_char == CODE_NE);
    else if (fidx == 10'(IDX_CP))     exp_ok = 1'b1;
    else                              exp_ok = (rd_char == CODE_BE);
  end
  wire in_data = (fidx >= 10'(IDX_DATA0)) && (fidx < 10'(IDX_NE3));
  wire in_bn   = (fidx >= 10'(IDX_BN0)) && (fidx < 10'(IDX_NE2));

  // ---------------------------------------------------------- main FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; op <= OP_NONE; n <= '0; ja <= '0;
      tmr <= '0; rel_cnt <= '0; released <= 1'b1; rel_at_cnt <= 1'b0;
      idx <= '0; wp <= '0; ctick <= '0; need_load <= 1'b0;
      target <= 1'b0; checking <= 1'b0; store <= 1'b0; bn_seen <= 1'b0;
      cp_count <= 1'b0; cp_check <= 1'b0; chk_load <= 1'b0; k_words <= '0; e_addr <= '0;
      instr_accept <= 1'b0; cpu_release <= 1'b0; cpu_skip <= 1'b0; cpu_jump <= 1'b0;
      error_stop <= 1'b0;
      tcu_busy_set <= 1'b0; tcu_busy_clr <= 1'b0; op_busy_set <= '0; op_busy_clr <= '0;
      te_clr <= '0; tc_set <= 1'b0; tc_clr <= 1'b0;
      sel <= '0; mot_fwd <= 1'b0; mot_bwd <= 1'b0; mot_erase <= 1'b0; mot_write <= 1'b0;
      mot_rewind <= 1'b0; rd_enable <= 1'b0;
      nrz_clear <= 1'b0; nrz_toggle <= 1'b0; nrz_ch <= '0;
      dr_load <= 1'b0; dr_shift <= 1'b0; dr_in_digit <= '0;
      ar_clear <= 1'b0; ar_inc <= 1'b0;
      bnt_clear <= 1'b0; bnt_strobe <= 1'b0; bnt_ch <= '0;
      cb_req <= 1'b0; cb_we <= 1'b0; cb_wdata <= '0;
      drum_req <= 1'b0; drum_we <= 1'b0; drum_addr <= '0; drum_wdata <= '0;
      op_active <= 1'b0;
    end else begin
      // one-clock strobes
      instr_accept <= 1'b0; cpu_release <= 1'b0;
      tcu_busy_set <= 1'b0; tcu_busy_clr <= 1'b0; op_busy_set <= '0; op_busy_clr <= '0;
      te_clr <= '0; tc_set <= 1'b0; tc_clr <= 1'b0; mot_rewind <= 1'b0;
      nrz_clear <= 1'b0; nrz_toggle <= 1'b0; dr_load <= 1'b0; dr_shift <= 1'b0;
      ar_clear <= 1'b0; ar_inc <= 1'b0; bnt_clear <= 1'b0; bnt_strobe <= 1'b0;
      cb_req <= 1'b0; drum_req <= 1'b0; cp_count <= 1'b0; chk_load <= 1'b0;
      cp_check <= cp_count;

      // concurrent operation: release the CPU after 0.45 ms
      if (!released) begin
        rel_cnt <= rel_cnt + 1'b1;
        if (rel_at_cnt && rel_cnt == 16'(CPU_RELEASE_CLKS - 1)) begin
          released    <= 1'b1;
          cpu_release <= 1'b1;
        end
      end

      // channel parity check once the parity code has been counted
      if (cp_check && !nrz_even && checking) tc_set <= 1'b1;
      // DR check after a CB word was loaded for writing
      if (chk_load && (!dr_parity_ok || !dr_valid)) error_stop <= 1'b1;
      // AR validity on every CB access made by the TCU
      if (cb_req && !ar_valid) error_stop <= 1'b1;

      unique case (st)
        // ------------------------------------------------------------
        S_IDLE: begin
          op_active <= 1'b0;
          if (instr_valid && instr_op != OP_NONE &&
              !(instr_op inside {OP_BTP, OP_ETP, OP_TPB, OP_BLS, OP_TTP,
                                 OP_BST, OP_RWD, OP_JTE} && mth_busy[instr_n]) &&
              !tcu_busy) begin
            instr_accept <= 1'b1;
            op        <= instr_op;
            n         <= instr_n;
            ja        <= instr_ja;
            rel_cnt   <= '0;
            released  <= 1'b0;
            rel_at_cnt <= !(instr_op inside {OP_TPB, OP_DMB, OP_BDM});
            cpu_skip  <= 1'b0;
            cpu_jump  <= 1'b0;
            e_addr    <= 14'(e_int);
            k_words   <= 6'(50 - (e_int % 50));
            bn_seen   <= 1'b0;
            unique case (instr_op)
              OP_JTG: begin
                cpu_jump <= !tc_ind;
                tc_clr   <= 1'b1;
                st       <= S_JUMP;
              end
              OP_JTE: begin
                cpu_jump <= te_ind[instr_n];
                st       <= S_JUMP;
              end
              OP_DMB, OP_BDM: begin
                if (instr_op == OP_BDM && e_int >= 4200) begin
                  rel_at_cnt <= 1'b1;         // NOP
                  st         <= S_JUMP;
                end else begin
                  tcu_busy_set <= 1'b1;
                  op_active    <= 1'b1;
                  ar_clear     <= 1'b1;
                  st           <= S_DRUM_A;
                end
              end
              default: begin                  // tape operations
                if ((instr_op inside {OP_BTP, OP_ETP, OP_TPB, OP_BLS, OP_TTP} && te_ind[instr_n]) ||
                    (instr_op inside {OP_BST, OP_RWD} && stat[instr_n].at_lp)) begin
                  rel_at_cnt <= 1'b1;         // NOP; TPB releases without skip
                  st         <= S_JUMP;
                end else begin
                  tcu_busy_set          <= 1'b1;
                  op_busy_set[instr_n]  <= 1'b1;
                  op_active             <= 1'b1;
                  if (instr_op inside {OP_BST, OP_RWD}) te_clr[instr_n] <= 1'b1;
                  sel <= instr_n;
                  st  <= S_SELECT;
                end
              end
            endcase
          end
        end
        // ------------------------------------------------------------
        S_JUMP: if (released || cpu_release) st <= S_IDLE;
        // ------------------------------------------------------------
        S_SELECT: if (sel_settled) begin
          tmr <= '0;
          if (op == OP_RWD) begin
            mot_rewind <= 1'b1;
            st         <= S_RWD;
          end else begin
            mot_fwd   <= !backward;
            mot_bwd   <= backward;
            mot_erase <= tape_write;
            st        <= S_START;
          end
        end
        // ------------------------------------------------------------
        S_RWD: begin
          tmr <= tmr + 1'b1;
          if (tmr == 16'(RWD_TCU_CLKS - 1)) begin
            tcu_busy_clr   <= 1'b1;
            op_busy_clr[n] <= 1'b1;   // MTH stays busy while it rewinds
            st             <= S_END;
          end
        end
        // ------------------------------------------------------------
        S_START: begin
          tmr <= tmr + 1'b1;
          if (tmr == 16'(START_CLKS - 1)) begin
            tmr <= '0;
            idx <= '0;
            wp  <= '0;
            if (tape_write) begin
              st <= S_WLP;
            end else begin
              rd_enable <= 1'b1;
              nrz_clear <= 1'b1;
              bnt_clear <= 1'b1;
              ar_clear  <= 1'b1;
              st        <= S_RSEEK;
            end
          end
        end
        // ------------------------------------------------------------
        // writing begins only after the tape has left its load point, and
        // after a lead-in of RUNOUT_CLKS (2 cm) of erased tape, so that the
        // head stopped mid-gap leaves a full 4 cm gap before the new block
        S_WLP: if (stat[n].at_lp) begin
          tmr <= '0;
        end else if (tmr != 16'(RUNOUT_CLKS - 1)) begin
          tmr <= tmr + 1'b1;
        end else begin
          nrz_clear <= 1'b1;
          ar_clear  <= 1'b1;
          mot_write <= (op == OP_BTP);
          if (op == OP_BTP) begin
            need_load <= 1'b1;
            st        <= S_WLOAD;
          end else begin
            ctick <= '0;
            st    <= S_WRITE;
          end
        end
        S_WLOAD: begin
          if (need_load && !ar_clear) begin
            cb_req    <= 1'b1;
            cb_we     <= 1'b0;
            need_load <= 1'b0;
          end
          if (cb_ack) begin
            dr_load  <= 1'b1;
            chk_load <= 1'b1;
            ctick    <= '0;
            st       <= S_WRITE;
          end
        end
        // ------------------------------------------------------------
        S_WRITE: begin
          ctick <= (ctick == 5'(CHAR_CLKS - 1)) ? '0 : ctick + 1'b1;
          if (need_load && !ar_inc) begin
            cb_req    <= 1'b1;
            cb_we     <= 1'b0;
            need_load <= 1'b0;
          end
          if (cb_ack) begin
            dr_load  <= 1'b1;
            chk_load <= 1'b1;
          end
          if (ctick == '0) begin
            nrz_toggle <= 1'b1;
            nrz_ch     <= wchar;
            idx        <= idx + 1'b1;
            if (idx >= 10'(IDX_DATA0) && idx < 10'(IDX_NE3)) begin
              if (wp == 4'd12) begin
                wp <= '0;
                if (op == OP_BTP && idx != 10'(IDX_NE3 - 1)) begin
                  ar_inc    <= 1'b1;
                  need_load <= 1'b1;
                end
              end else begin
                wp       <= wp + 1'b1;
                dr_shift <= 1'b1;
              end
            end
            if (idx == 10'(IDX_LAST)) begin
              tmr <= '0;
              st  <= S_RUNOUT;
            end
          end
        end
        // ------------------------------------------------------------
        S_RSEEK: begin
          tmr <= tmr + 1'b1;
          if (rd_valid && rd_char == (backward ? CODE_BE : CODE_BB)) begin
            // first code of a block: index 0
            idx        <= 10'd1;
            wp         <= '0;
            tmr        <= '0;
            checking   <= (op != OP_BLS);
            store      <= (op == OP_TPB);
            target     <= 1'b0;
            nrz_toggle <= !backward;
            nrz_ch     <= rd_char;
            if (!char_parity_ok(rd_char) && op != OP_BLS) tc_set <= 1'b1;
            st         <= S_RBLOCK;
          end else if ((!backward && stat[n].at_te) || (backward && stat[n].at_lp) ||
                       (halt_te && op == OP_BLS)) begin
            // no block: the operation becomes NOP
            rd_enable <= 1'b0;
            mot_fwd   <= 1'b0;
            mot_bwd   <= 1'b0;
            tmr       <= '0;
            st        <= S_STOP;
          end
        end
        // ------------------------------------------------------------
        S_RBLOCK: begin
          tmr <= tmr + 1'b1;
          // block number compared
          if (bnt_done) begin
            if (bnt_perr) tc_set <= 1'b1;
            if (op == OP_TPB && !bn_seen) begin
              bn_seen     <= 1'b1;
              cpu_skip    <= bnt_equal;
              cpu_release <= !released;
              released    <= 1'b1;
            end
            if (op == OP_BLS && bnt_equal) begin
              target   <= 1'b1;
              checking <= 1'b1;
              store    <= 1'b1;
            end
          end
          if (rd_valid) begin
            tmr <= '0;
            idx <= idx + 1'b1;
            if (checking && (!char_parity_ok(rd_char) || (!exp_ok && !backward))) tc_set <= 1'b1;
            // channel parity counts everything up to the parity code
            if (backward ? (idx >= 10'(IDX_LAST - IDX_CP)) : (idx <= 10'(IDX_CP))) begin
              nrz_toggle <= 1'b1;
              nrz_ch     <= rd_char;
            end
            if (fidx == 10'(backward ? 0 : IDX_CP)) cp_count <= 1'b1;
            if (in_bn && !backward) begin
              bnt_strobe <= 1'b1;
              bnt_ch     <= rd_char;
            end
            if (in_data) begin
              if (wp == 4'd12) begin
                wp <= '0;
                if (store && !backward) begin
                  if (!dr_parity_ok || !dr_valid) tc_set <= 1'b1;
                  cb_req   <= 1'b1;
                  cb_we    <= 1'b1;
                  cb_wdata <= dr_word;
                  ar_inc   <= 1'b1;
                end
              end else begin
                wp          <= wp + 1'b1;
                dr_shift    <= !backward;
                dr_in_digit <= char_value(rd_char);
              end
            end
            if (idx == 10'(IDX_LAST)) begin
              if (op == OP_BLS && !target) begin
                nrz_clear <= 1'b1;
                bnt_clear <= 1'b1;
                ar_clear  <= 1'b1;
                st        <= S_RSEEK;
              end else begin
                tmr <= '0;
                st  <= S_RUNOUT;
              end
            end
          end else if (tmr == 16'(DROP_CLKS - 1)) begin
            // drop-out: characters stopped in the middle of a block
            if (checking) tc_set <= 1'b1;
            if (op == OP_BLS && !target) begin
              nrz_clear <= 1'b1;
              bnt_clear <= 1'b1;
              st        <= S_RSEEK;
            end else begin
              tmr <= '0;
              st  <= S_RUNOUT;
            end
          end
        end
        // ------------------------------------------------------------
        S_RUNOUT: begin
          tmr <= tmr + 1'b1;
          if (tmr == 16'(RUNOUT_CLKS - 1)) begin
            mot_write <= 1'b0;
            mot_fwd   <= 1'b0;
            mot_bwd   <= 1'b0;
            mot_erase <= 1'b0;
            rd_enable <= 1'b0;
            tmr       <= '0;
            st        <= S_STOP;
          end
        end
        S_STOP: begin
          tmr <= tmr + 1'b1;
          if (tmr == 16'(STOP_CLKS - 1)) begin
            tcu_busy_clr   <= 1'b1;
            op_busy_clr[n] <= 1'b1;
            if (op == OP_TPB && !released) begin
              cpu_release <= 1'b1;            // no block: NOP, no skip
              released    <= 1'b1;
            end
            st <= S_END;
          end
        end
        // ------------------------------------------------------------
        // drum transfers, one word per pass: A fetches, B stores
        S_DRUM_A: if (!ar_clear && !ar_inc && !cb_req && !drum_req) begin
          if (op == OP_DMB) begin
            if (e_addr < 14'd4200) begin
              drum_req  <= 1'b1;
              drum_we   <= 1'b0;
              drum_addr <= e_addr + 14'(ar_bin);
            end else begin
              cb_req   <= 1'b1;               // zeros replace the words
              cb_we    <= 1'b1;
              cb_wdata <= '0;
            end
          end else begin
            cb_req <= 1'b1;
            cb_we  <= 1'b0;
          end
          st <= S_DRUM_B;
        end
        S_DRUM_B: begin
          if (op == OP_DMB && drum_ack) begin
            cb_req   <= 1'b1;
            cb_we    <= 1'b1;
            cb_wdata <= drum_rdata;
          end
          if (op == OP_BDM && cb_ack) begin
            if (!word_parity_ok(cb_rdata) || !word_valid(cb_rdata)) error_stop <= 1'b1;
            drum_req   <= 1'b1;
            drum_we    <= 1'b1;
            drum_addr  <= e_addr + 14'(ar_bin);
            drum_wdata <= cb_rdata;
          end
          if ((op == OP_DMB && cb_ack) || (op == OP_BDM && drum_ack)) begin
            if (ar_bin == k_words - 1'b1) begin
              tcu_busy_clr <= 1'b1;
              cpu_release  <= 1'b1;
              released     <= 1'b1;
              st           <= S_END;
            end else begin
              ar_inc <= 1'b1;
              st     <= S_DRUM_A;
            end
          end
        end
        // ------------------------------------------------------------
        S_END: begin
          op_active <= 1'b0;
          nrz_clear <= 1'b1;      // write levels back to the erased state
          if (released || cpu_release) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign cb_addr    = ar_bin;
  assign bnt_target = ja;

  // a released CPU is never released twice
  property p_one_release;
    @(posedge clk) disable iff (!rst_n) cpu_release |=> !cpu_release;
  endproperty
  a_one_release: assert property (p_one_release);
endmodule
