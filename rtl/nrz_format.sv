// nrz_format: output format control of the TCU: eight modulo-2 flip-flops,
// one per tape channel.
//
// Writing (biased NRZ): the tape is erased to one flux direction and a
// channel's write current reverses for every 1 written. Each flip-flop
// toggles on a 1 in its channel of the character being written, so its
// output is the NRZ write level for that channel. Because the flip-flops are
// modulo-2 counters, their state after a block's characters is exactly the
// channel-parity code that makes every channel's count of 1s even; writing
// that code returns them all to the cleared state.
//
// Reading: the same flip-flops count the 1s received in each channel, and
// `even` says that every channel has an even count: the channel parity check
// after the channel-parity code has been counted.
//
// Interface: `clear` resets all flip-flops (start of a block); `toggle` with
// `ch` flips every flip-flop whose bit is 1. `nrz` (= `cp_code`) is the
// state. Both act at the next clock; clear beats toggle.
module nrz_format
  import kdc_tape_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   toggle,
  input  tchar_t ch,
  output tchar_t nrz,
  output tchar_t cp_code,
  output logic   even
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      nrz <= '0;
    else if (clear)  nrz <= '0;
    else if (toggle) nrz <= nrz ^ ch;
  end

  assign cp_code = nrz;
  assign even    = (nrz == '0);
endmodule
