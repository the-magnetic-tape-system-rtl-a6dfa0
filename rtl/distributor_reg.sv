// distributor_reg: the TCU's Distributor Register (DR), one word of 12
// decimal digits, each with an even parity bit.
//
// Every word between the tape and the core buffer passes through the DR. It
// does the series-parallel conversion: a whole word is loaded from or
// presented to the core buffer in parallel, and digits are exchanged with the
// tape one per character. Digits are shifted towards digit 12: a digit
// shifted in enters at digit 1 and `out_digit` is always digit 12, so twelve
// shifts move a word out to tape most significant digit first (sv, m, 10..1),
// and twelve shifts in from tape leave the first digit read in digit 12.
// Digits shifted in get their even parity bit here.
//
// The checking circuit watches the register continuously: `parity_ok` is low
// when any digit has odd parity, `valid` is low when any digit exceeds 9.
// Since every word flows through the DR, this is also the check on core
// buffer reads.
//
// Timing: clear, load and shift take effect at the next clock (clear first).
module distributor_reg
  import kdc_tape_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  load,        // parallel load from the core buffer
  input  word_t load_word,
  input  logic  shift,       // move one digit towards digit 12
  input  bcd_t  in_digit,    // digit entering at digit 1 on shift
  output word_t word,
  output bcd_t  out_digit,   // digit 12
  output logic  parity_ok,
  output logic  valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      word <= '0;
    else if (clear)  word <= '0;
    else if (load)   word <= load_word;
    else if (shift)  word <= {word[WORD_BITS-6:0], digit_with_parity(in_digit)};
  end

  assign out_digit = word[WORD_BITS-2 -: 4];
  assign parity_ok = word_parity_ok(word);
  assign valid     = word_valid(word);
endmodule
