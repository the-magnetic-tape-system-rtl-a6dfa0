// block_number_test: compares the block number read from tape with #JA.
//
// Under the variable block number system any four decimal digits can be
// written at the head of a block. While a block is read, its four
// block-number characters (most significant digit first) are offered one
// per `strobe`. Each is compared with the matching digit of `target` and its
// odd character parity and numeric validity are checked. After the fourth
// digit `done` pulses for one clock with `equal` (all four digits matched and
// were valid) and `parity_err` (any of the four failed its character parity
// or was not a digit). `clear` restarts the comparison for the next block.
module block_number_test
  import kdc_tape_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        strobe,
  input  tchar_t      ch,
  input  logic [15:0] target,
  output logic        done,
  output logic        equal,
  output logic        parity_err
);
  logic [1:0] pos;
  logic       eq_acc, err_acc;
  bcd_t       want;
  logic       ch_eq, ch_err;

  assign want   = target[4*(3 - pos) +: 4];
  assign ch_eq  = is_digit(ch) && char_parity_ok(ch) && char_value(ch) == want;
  assign ch_err = !char_parity_ok(ch) || !is_digit(ch);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; eq_acc <= 1'b1; err_acc <= 1'b0;
      done <= 1'b0; equal <= 1'b0; parity_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        pos <= '0; eq_acc <= 1'b1; err_acc <= 1'b0;
      end else if (strobe) begin
        pos <= pos + 1'b1;
        if (pos == 2'd3) begin
          done       <= 1'b1;
          equal      <= eq_acc && ch_eq;
          parity_err <= err_acc || ch_err;
          eq_acc     <= 1'b1;
          err_acc    <= 1'b0;
        end else begin
          eq_acc  <= eq_acc && ch_eq;
          err_acc <= err_acc || ch_err;
        end
      end
    end
  end
endmodule
