// tcu_indicators: the TCU's indicator flip-flops and handler status detector.
//
// * TCU busy: on while the TCU executes a tape or drum-transfer operation
//   (set/clear by the main control).
// * No. N MTH busy (N = 1..4): on while an operation uses handler N, and also
//   while handler N is rewinding. A rewind therefore keeps only its own
//   handler busy once the TCU is free again.
// * No. N TE (tape end): set when handler N's tape-end sensor comes on;
//   cleared by backward motion of that handler (BST, RWD). JTE reads it and
//   does not change it.
// * TC (tape check): set by a parity or validity error found while reading
//   tape; cleared by JTG.
// All set/clear inputs are one-clock strobes that act at the next clock;
// set beats clear for TC, clear beats set for TE.
module tcu_indicators
  import kdc_tape_pkg::*;
#(
  parameter int unsigned NM = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tcu_busy_set,
  input  logic          tcu_busy_clr,
  input  logic [NM-1:0] op_busy_set,
  input  logic [NM-1:0] op_busy_clr,
  input  mth_stat_t     stat [NM],
  input  logic [NM-1:0] te_clr,
  input  logic          tc_set,
  input  logic          tc_clr,
  output logic          tcu_busy,
  output logic [NM-1:0] mth_busy,
  output logic [NM-1:0] te_ind,
  output logic          tc_ind
);
  logic [NM-1:0] op_busy;
  logic [NM-1:0] te_seen;      // tape-end sensor state one clock ago

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcu_busy <= 1'b0;
      op_busy  <= '0;
      te_ind   <= '0;
      te_seen  <= '0;
      tc_ind   <= 1'b0;
    end else begin
      for (int i = 0; i < NM; i++) te_seen[i] <= stat[i].at_te;
      if (tcu_busy_set)      tcu_busy <= 1'b1;
      else if (tcu_busy_clr) tcu_busy <= 1'b0;
      op_busy <= (op_busy | op_busy_set) & ~op_busy_clr;
      for (int i = 0; i < NM; i++) begin
        if (te_clr[i])             te_ind[i] <= 1'b0;
        else if (stat[i].at_te && !te_seen[i]) te_ind[i] <= 1'b1;
      end
      if (tc_set)      tc_ind <= 1'b1;
      else if (tc_clr) tc_ind <= 1'b0;
    end
  end

  always_comb
    for (int i = 0; i < NM; i++) mth_busy[i] = op_busy[i] | stat[i].rewinding;
endmodule
