// kdc_tape_pkg: types, constants and character-code functions shared by the
// KDC-I magnetic tape control unit (TCU).
//
// Timing unit. Every count in this design is in digit times: the computer is
// digit-serial with 12 digits per word and a word time of about 52 us, so one
// clock is about 4.33 us. A tape character passes every two word times
// (24 clocks, 104 us, 9,600 characters/s at 150 cm/s).
//
// Tape character (8 channels, one bit each, bit 7 down to bit 0):
//   H(parity) G(32) F(16) E(8) D(sprocket) C(4) B(2) A(1)
// The sprocket channel D is 1 in every character and is counted in the odd
// character parity H. Sixteen codes are used: the digits 0-9, '+', '-', the
// word-ending mark, block-beginning, block-ending and no-effect. Digits carry
// F plus their 8-4-2-1 value on E, C, B, A. The bit patterns of the six
// non-digit codes are this design's choice (F/G based, distinct from digits).
//
// Core/DR word: 12 decimal digits, each 4 bits BCD plus an even parity bit,
// 60 bits; digit k (1..12) lives in bits [5k-1 -: 5], parity in the top bit of
// each group. Digit 12 holds the sign bit s (bit 0) and overflow bit v (bit 1).
//
// Block on tape, in writing order (666 characters):
//   4 block-beginning, 1 no-effect, 4 block-number digits (most significant
//   first), 1 no-effect, 50 words of 13 characters (digit 12 = sv first,
//   digit 11 = m, then 10..1, then the word-ending mark), 1 no-effect,
//   1 channel-parity code, 4 block-ending.
// The channel parity covers the 661 characters before it plus itself; since
// 661 is odd the channel-parity code also has odd character parity.
package kdc_tape_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned CH           = 8;    // tape channels
  localparam int unsigned SPROCKET_BIT = 3;    // channel D
  localparam int unsigned DIGITS       = 12;   // digits per word
  localparam int unsigned WORD_BITS    = 60;   // 12 x (4 + parity)
  localparam int unsigned CB_WORDS     = 50;   // core buffer words
  localparam int unsigned N_MTH        = 4;    // tape handlers
  localparam int unsigned CHARS_PER_WORD = 13; // sv, m, 10..1, word end

  // character index of each field inside a block (writing order)
  localparam int unsigned IDX_NE1   = 4;
  localparam int unsigned IDX_BN0   = 5;
  localparam int unsigned IDX_NE2   = 9;
  localparam int unsigned IDX_DATA0 = 10;
  localparam int unsigned IDX_NE3   = IDX_DATA0 + CB_WORDS * CHARS_PER_WORD; // 660
  localparam int unsigned IDX_CP    = IDX_NE3 + 1;                           // 661
  localparam int unsigned IDX_BE0   = IDX_CP + 1;                            // 662
  localparam int unsigned IDX_LAST  = IDX_BE0 + 3;                           // 665
  localparam int unsigned BLOCK_CHARS = IDX_LAST + 1;                        // 666

  typedef logic [CH-1:0]        tchar_t;   // one tape character
  typedef logic [WORD_BITS-1:0] word_t;    // one CB / DR word
  typedef logic [3:0]           bcd_t;

  // ---------------------------------------------------------------- codes
  localparam tchar_t SPR = tchar_t'(1 << SPROCKET_BIT);

  // add the odd character parity bit H to a 7-bit pattern (sprocket counted)
  function automatic tchar_t with_parity(input logic [6:0] bits7);
    tchar_t c;
    c = {1'b0, bits7};
    c[7] = ~(^bits7);
    return c;
  endfunction

  // pattern without parity: {G,F,E,D,C,B,A}
  function automatic logic [6:0] digit_bits(input bcd_t d);
    return {1'b0, 1'b1, d[3], 1'b1, d[2], d[1], d[0]};
  endfunction

  function automatic tchar_t code_digit(input bcd_t d);
    return with_parity(digit_bits(d));
  endfunction

  //                                         G F E D C B A
  localparam tchar_t CODE_PLUS  = with_parity(7'b0_1_1_1_0_1_0);
  localparam tchar_t CODE_MINUS = with_parity(7'b0_1_1_1_0_1_1);
  localparam tchar_t CODE_WEND  = with_parity(7'b1_0_0_1_0_0_1);
  localparam tchar_t CODE_BB    = with_parity(7'b1_0_0_1_0_1_0);
  localparam tchar_t CODE_BE    = with_parity(7'b1_0_0_1_1_0_0);
  localparam tchar_t CODE_NE    = with_parity(7'b1_1_1_1_0_0_0);

  function automatic logic char_parity_ok(input tchar_t c);
    return ^c;  // odd number of ones
  endfunction

  function automatic logic is_digit(input tchar_t c);
    return c[6:5] == 2'b01 && c[SPROCKET_BIT] && (c[4] ? (c[2:1] == 2'b00) : 1'b1);
  endfunction

  function automatic bcd_t char_value(input tchar_t c);
    return {c[4], c[2], c[1], c[0]};
  endfunction

  // ------------------------------------------------------- word digits
  function automatic logic [4:0] digit_with_parity(input bcd_t d);
    return {^d, d};   // even parity over 5 bits
  endfunction

  function automatic logic word_parity_ok(input word_t w);
    logic ok;
    ok = 1'b1;
    for (int k = 0; k < DIGITS; k++) ok &= ~(^w[5*k +: 5]);
    return ok;
  endfunction

  function automatic logic word_valid(input word_t w);
    logic ok;
    ok = 1'b1;
    for (int k = 0; k < DIGITS; k++) ok &= (w[5*k +: 4] <= 4'd9);
    return ok;
  endfunction

  function automatic int unsigned bcd4_to_int(input logic [15:0] b);
    return 1000 * int'(b[15:12]) + 100 * int'(b[11:8]) + 10 * int'(b[7:4]) + int'(b[3:0]);
  endfunction

  // ------------------------------------------------------- instructions
  typedef enum logic [3:0] {
    OP_NONE = 4'd0,
    OP_BTP  = 4'd1,   // 910 buffer to tape
    OP_TPB  = 4'd2,   // 912 tape to buffer
    OP_BLS  = 4'd3,   // 914 block search
    OP_DMB  = 4'd4,   // 920 drum to buffer
    OP_BDM  = 4'd5,   // 922 buffer to drum
    OP_RWD  = 4'd6,   // 930 rewind
    OP_BST  = 4'd7,   // 932 backspace tape
    OP_TTP  = 4'd8,   // 934 test tape
    OP_ETP  = 4'd9,   // 936 erase tape
    OP_JTG  = 4'd10,  // 950 jump on tape good
    OP_JTE  = 4'd11   // 952 jump by tape end
  } op_t;

  // numerical function code (3 decimal digits) to internal op
  function automatic op_t decode_fn(input logic [11:0] fn_bcd);
    case (fn_bcd)
      12'h910: return OP_BTP;
      12'h912: return OP_TPB;
      12'h914: return OP_BLS;
      12'h920: return OP_DMB;
      12'h922: return OP_BDM;
      12'h930: return OP_RWD;
      12'h932: return OP_BST;
      12'h934: return OP_TTP;
      12'h936: return OP_ETP;
      12'h950: return OP_JTG;
      12'h952: return OP_JTE;
      default: return OP_NONE;
    endcase
  endfunction

  // commands from the TCU to one tape handler
  typedef struct packed {
    logic   fwd;       // run forward
    logic   bwd;       // run backward
    logic   erase;     // erase head on
    logic   write;     // write current on
    logic   rewind;    // one-clock pulse: start an uninterruptible rewind
    tchar_t nrz;       // NRZ write levels, one per channel
  } mth_cmd_t;

  // status reported by one tape handler
  typedef struct packed {
    logic ready;
    logic at_lp;       // load point sensed
    logic at_te;       // tape end sensed
    logic rewinding;
  } mth_stat_t;

endpackage
