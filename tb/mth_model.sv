// mth_model: behavioural model of one magnetic tape handler (MTH) with its
// reel of tape, for simulation only (not synthesizable logic).
//
// The tape is an array of FRAMES character frames; a frame holds the eight
// channel bits of one character, 0 where the tape is erased. The head sits
// over frame `pos`. After `fwd` or `bwd` has been on for START_CLKS clocks
// the tape runs at one frame per CHAR_CLKS clocks (150 cm/s at 64 characters
// per cm); dropping the command stops it at once (the stopping distance is
// folded into the TCU's run-out time).
//
// Writing: while the erase head is on and the tape runs forward, the frame
// under the erase head, ERASE_AHEAD frames (6 mm) ahead, is erased, and each frame
// passing the head is recorded as the NRZ transitions seen during that frame
// (NRZ level XOR the level at the end of the previous frame) if the write
// current is on, or as erased (0) if not.
// Reading: with erase and write off, each channel whose bit is 1 in the frame
// under the head gives a reshaped pulse PULSE_LEN clocks long, starting
// `skew` clocks into the frame; the skew differs per channel (up to 8
// clocks, about 35 us). With `noise` set, short NOISE_LEN-clock glitches are
// added on channels holding 0, which the TCU must reject.
//
// Sensors: load point while pos <= LP_POS; tape end from TE_POS on. The tape
// stops by itself at the load point going backward and TE_RUN frames after
// the tape end going forward. A rewind pulse (ignored at load point) starts
// an uninterruptible rewind at three times normal speed back to LP_POS.
module mth_model
  import kdc_tape_pkg::*;
#(
  parameter int unsigned FRAMES     = 4096,
  parameter int unsigned CHAR_CLKS  = 24,
  parameter int unsigned START_CLKS = 1615,
  parameter int unsigned LP_POS     = 8,
  parameter int unsigned TE_POS     = 4000,
  parameter int unsigned TE_RUN     = 64,
  parameter int unsigned PULSE_LEN  = 8,
  parameter int unsigned NOISE_LEN  = 2,
  parameter int unsigned ERASE_AHEAD = 38    // erase head 6 mm before the R/W head
) (
  input  logic      clk,
  input  mth_cmd_t  cmd,
  input  logic      noise,
  output tchar_t    rd,
  output mth_stat_t stat
);
  tchar_t      tape [FRAMES];
  int unsigned pos;
  int unsigned run_cnt;
  int unsigned ft;
  int unsigned rw_cnt;
  logic        rewinding;
  tchar_t      nrz_prev;
  int unsigned frames_written;
  int unsigned frames_read;

  function automatic int unsigned skew(input int i);
    return (i == SPROCKET_BIT) ? 4 : (i * 5) % 9;
  endfunction

  wire moving  = (cmd.fwd || cmd.bwd) && run_cnt >= START_CLKS && !rewinding;
  wire reading = moving && !cmd.erase && !cmd.write;

  initial begin
    foreach (tape[i]) tape[i] = '0;
    pos = LP_POS; run_cnt = 0; ft = 0; rw_cnt = 0; rewinding = 1'b0;
    nrz_prev = '0; frames_written = 0; frames_read = 0;
  end

  always @(posedge clk) begin
    if (rewinding) begin
      rw_cnt <= rw_cnt + 1;
      if (rw_cnt == CHAR_CLKS / 3 - 1) begin
        rw_cnt <= 0;
        if (pos <= LP_POS) rewinding <= 1'b0;
        else               pos <= pos - 1;
      end
    end else if (cmd.rewind && pos > LP_POS) begin
      rewinding <= 1'b1;
      rw_cnt    <= 0;
    end

    if ((cmd.fwd || cmd.bwd) && !rewinding) begin
      if (run_cnt < START_CLKS) run_cnt <= run_cnt + 1;
    end else begin
      run_cnt <= 0;
      ft      <= 0;
    end

    if (!(moving && cmd.erase)) nrz_prev <= cmd.nrz;

    if (moving) begin
      ft <= (ft == CHAR_CLKS - 1) ? 0 : ft + 1;
      if (ft == CHAR_CLKS - 1) begin
        if (cmd.fwd) begin
          if (cmd.erase) begin
            tape[pos] <= cmd.write ? (cmd.nrz ^ nrz_prev) : '0;
            if (pos + ERASE_AHEAD < FRAMES) tape[pos + ERASE_AHEAD] <= '0;
            nrz_prev  <= cmd.nrz;
            if (cmd.write && (cmd.nrz ^ nrz_prev) != '0) frames_written <= frames_written + 1;
          end else if (tape[pos] != '0) begin
            frames_read <= frames_read + 1;
          end
          if (pos < FRAMES - 1 && pos < TE_POS + TE_RUN) pos <= pos + 1;
        end else if (cmd.bwd) begin
          if (tape[pos] != '0) frames_read <= frames_read + 1;
          if (pos > LP_POS) pos <= pos - 1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < CH; i++) begin
      rd[i] = reading && tape[pos][i] && ft >= skew(i) && ft < skew(i) + PULSE_LEN;
      if (reading && noise && !tape[pos][i] && ft >= 17 && ft < 17 + NOISE_LEN) rd[i] = 1'b1;
    end
  end

  assign stat.ready     = 1'b1;
  assign stat.at_lp     = (pos <= LP_POS);
  assign stat.at_te     = (pos >= TE_POS);
  assign stat.rewinding = rewinding;
endmodule
