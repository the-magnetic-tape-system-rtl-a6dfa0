// read_front_end: noise suppression and skew correction for the eight read
// channels of the TCU.
//
// Each channel has its own input_channel (duration filter, IB, TR). Because
// the channels of one character reach the head at slightly different times
// (skew), the sprocket channel D, which is 1 in every character and lies in
// the middle of the tape, is the timing reference: BTR_DELAY clocks (52 us,
// one word time) after the sprocket pulse has been recognised, the transfer
// strobe BTR copies every channel's IB into its TR. One clock later
// `char_valid` pulses with `char_out` = the eight TR bits; this is the Tx
// strobe at which the DR side takes the character. A channel bit therefore
// counts if it is recognised within about BTR_DELAY clocks after the
// sprocket, or before it if it lies between the previous BTR and the
// sprocket (about +-40 us at the defaults).
//
// `enable` low clears all channels and the timing (not reading).
module read_front_end
  import kdc_tape_pkg::*;
#(
  parameter int unsigned NOISE_COUNT = 4,
  parameter int unsigned BTR_DELAY   = 12
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  input  tchar_t rd_pulse,     // reshaped read pulses from the selected MTH
  output tchar_t char_out,
  output logic   char_valid
);
  localparam int unsigned TW = $clog2(BTR_DELAY + 1);

  tchar_t ib, tr, det;
  logic   btr;
  logic   timing;              // BTR delay running
  logic [TW-1:0] tcnt;

  for (genvar i = 0; i < CH; i++) begin : g_ch
    input_channel #(.NOISE_COUNT(NOISE_COUNT)) u_ch (
      .clk    (clk),
      .rst_n  (rst_n),
      .clear  (!enable),
      .rd_in  (rd_pulse[i]),
      .btr    (btr),
      .ib     (ib[i]),
      .tr     (tr[i]),
      .detect (det[i])
    );
  end

  assign btr = timing && (tcnt == TW'(BTR_DELAY - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timing     <= 1'b0;
      tcnt       <= '0;
      char_valid <= 1'b0;
    end else if (!enable) begin
      timing     <= 1'b0;
      tcnt       <= '0;
      char_valid <= 1'b0;
    end else begin
      char_valid <= btr;
      if (btr) begin
        timing <= 1'b0;
        tcnt   <= '0;
      end else if (timing) begin
        tcnt <= tcnt + 1'b1;
      end else if (det[SPROCKET_BIT]) begin
        timing <= 1'b1;
        tcnt   <= '0;
      end
    end
  end

  assign char_out = tr;
endmodule
