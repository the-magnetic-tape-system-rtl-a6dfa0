// core_addr_reg: the TCU's core address register (AR).
//
// The AR holds the two least significant decimal digits of a core buffer
// location (4200-4249 -> 00-49) as two BCD digits, as the document gives it.
// It can be cleared, loaded, or counted up by one; counting past 49 wraps to
// 00 and pulses nothing else. `valid` is the AR's validity check: both digits
// must be decimal and the value at most 49. `bin` is the same address in
// binary for the core buffer's selection lines.
//
// Timing: all actions take effect at the next clock; clear beats load beats
// increment.
module core_addr_reg
  import kdc_tape_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       load,
  input  bcd_t       load_tens,
  input  bcd_t       load_units,
  input  logic       inc,
  output bcd_t       tens,
  output bcd_t       units,
  output logic [5:0] bin,
  output logic       last,    // AR = 49
  output logic       valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tens  <= '0;
      units <= '0;
    end else if (clear) begin
      tens  <= '0;
      units <= '0;
    end else if (load) begin
      tens  <= load_tens;
      units <= load_units;
    end else if (inc) begin
      if (tens == 4'd4 && units == 4'd9) begin
        tens  <= '0;
        units <= '0;
      end else if (units == 4'd9) begin
        units <= '0;
        tens  <= tens + 4'd1;
      end else begin
        units <= units + 4'd1;
      end
    end
  end

  assign bin   = 6'(tens * 4'd10) + 6'(units);
  assign last  = (tens == 4'd4) && (units == 4'd9);
  assign valid = (tens <= 4'd4) && (units <= 4'd9);
endmodule
