// input_channel: the input circuit of one tape channel in the TCU.
//
// Noise suppression: the reshaped read pulse from the handler is timed by a
// counter (the SA/SB stages). Only a pulse that stays high for more than
// NOISE_COUNT clocks (about 17.4 us at the default) is taken as a signal and
// stored in the IB flip-flop; shorter pulses are noise and leave no trace.
// This is a digital integrator.
//
// Synchronisation: on the transfer strobe `btr`, IB is copied into TR (the
// synchronisation buffer) and IB is cleared for the next character; TR holds
// the bit until the next `btr`, and the DR takes it with its own timing.
//
// `detect` pulses for one clock when IB is set; for the sprocket channel it
// starts the transfer timing in read_front_end. `clear` empties the channel.
module input_channel #(
  parameter int unsigned NOISE_COUNT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic rd_in,
  input  logic btr,
  output logic ib,
  output logic tr,
  output logic detect
);
  localparam int unsigned CW = $clog2(NOISE_COUNT + 2);
  logic [CW-1:0] cnt;
  logic          hit;

  assign hit = rd_in && (cnt == CW'(NOISE_COUNT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ib     <= 1'b0;
      tr     <= 1'b0;
      detect <= 1'b0;
    end else if (clear) begin
      cnt    <= '0;
      ib     <= 1'b0;
      tr     <= 1'b0;
      detect <= 1'b0;
    end else begin
      // pulse duration counter, saturating one above the threshold
      if (!rd_in)                          cnt <= '0;
      else if (cnt <= CW'(NOISE_COUNT))    cnt <= cnt + 1'b1;
      detect <= hit && !ib;
      if (btr) begin
        tr <= ib | hit;
        ib <= 1'b0;
      end else if (hit) begin
        ib <= 1'b1;
      end
    end
  end
endmodule
