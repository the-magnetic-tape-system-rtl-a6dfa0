// mth_selector: connects the TCU to one of the N_MTH tape handlers.
//
// In the machine this is a set of reed relays, which take a few milliseconds
// to operate. Here `sel` picks the handler; whenever it changes, the contacts
// are open (no commands out, no read pulses in) for RELAY_CLKS clocks, and
// `settled` is low until the new connection is made. Commands from the TCU
// go only to the connected handler; the others see an idle command. The
// rewind pulse is passed like any other command: a handler, once told to
// rewind, keeps rewinding on its own after it is disconnected.
// Handler status lines (ready, load point, tape end, rewinding) do not pass
// through the selector; each handler reports them to the indicators directly.
module mth_selector
  import kdc_tape_pkg::*;
#(
  parameter int unsigned NM         = 4,
  parameter int unsigned RELAY_CLKS = 692    // about 3 ms
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [1:0]     sel,
  input  mth_cmd_t       cmd,
  output mth_cmd_t       mth_cmd [NM],
  input  tchar_t         mth_rd  [NM],
  output tchar_t         rd,
  output logic           settled
);
  localparam int unsigned RW = $clog2(RELAY_CLKS + 1);
  logic [1:0]    cur;
  logic [RW-1:0] rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      rcnt    <= '0;
      settled <= 1'b0;
    end else if (sel != cur) begin
      cur     <= sel;
      rcnt    <= '0;
      settled <= 1'b0;
    end else if (!settled) begin
      if (rcnt == RW'(RELAY_CLKS - 1)) settled <= 1'b1;
      else                             rcnt    <= rcnt + 1'b1;
    end
  end

  always_comb begin
    rd = '0;
    for (int i = 0; i < NM; i++) begin
      mth_cmd[i] = '0;
      mth_cmd[i].nrz = cmd.nrz;   // write levels idle unless write is on
      if (settled && cur == 2'(i)) begin
        mth_cmd[i] = cmd;
        rd         = mth_rd[i];
      end
    end
  end
endmodule
