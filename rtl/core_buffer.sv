// core_buffer: the TCU's 50-word magnetic core buffer (CB), also used by the
// CPU as the fast registers 4200-4249.
//
// A 60-bit word (12 digits with even parity each) is stored as two 30-bit
// core words, the low half (digits 1-6) at core address 2*addr and the high
// half (digits 7-12) at 2*addr+1, as in the document's 100 x 30-bit
// coincident-current matrix. An access runs two core cycles of CYCLE_CLKS
// clocks each (17.4 us each, about 4 digit times), low half first, so a word
// takes 2*CYCLE_CLKS clocks, within the document's one word time.
//
// Interface: a one-clock `req` with `we`, `addr` (0..WORDS-1) and `wdata`
// starts an access when `busy` is low; `ack` pulses for one clock when it is
// done, with `rdata` valid from then until the next access. Requests while
// busy are ignored. Addresses >= WORDS are not written and read as zero.
// Core storage keeps its contents over reset, as core memory does; only the
// control is reset.
module core_buffer
  import kdc_tape_pkg::*;
#(
  parameter int unsigned WORDS      = 50,
  parameter int unsigned HALF_BITS  = 30,
  parameter int unsigned CYCLE_CLKS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic         we,
  input  logic [5:0]   addr,
  input  logic [2*HALF_BITS-1:0] wdata,
  output logic [2*HALF_BITS-1:0] rdata,
  output logic         ack,
  output logic         busy
);
  localparam int unsigned CW = $clog2(CYCLE_CLKS + 1);

  logic [HALF_BITS-1:0] core [2*WORDS];

  logic                  half;       // 0: low half cycle, 1: high half
  logic [CW-1:0]         cyc;
  logic                  op_we;
  logic [5:0]            op_addr;
  logic [2*HALF_BITS-1:0] op_wdata;
  logic                  in_range;
  logic [6:0]            caddr;

  assign in_range = op_addr < 6'(WORDS);
  assign caddr    = {op_addr, half};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      ack      <= 1'b0;
      half     <= 1'b0;
      cyc      <= '0;
      op_we    <= 1'b0;
      op_addr  <= '0;
      op_wdata <= '0;
      rdata    <= '0;
    end else begin
      ack <= 1'b0;
      if (!busy) begin
        if (req) begin
          busy     <= 1'b1;
          half     <= 1'b0;
          cyc      <= '0;
          op_we    <= we;
          op_addr  <= addr;
          op_wdata <= wdata;
        end
      end else if (cyc != CW'(CYCLE_CLKS - 1)) begin
        cyc <= cyc + 1'b1;
      end else begin
        // end of one core cycle: transfer one half word
        if (op_we) begin
          if (in_range) core[caddr] <= half ? op_wdata[2*HALF_BITS-1:HALF_BITS]
                                            : op_wdata[HALF_BITS-1:0];
        end
        if (half) rdata[2*HALF_BITS-1:HALF_BITS] <= in_range ? core[caddr] : '0;
        else      rdata[HALF_BITS-1:0]           <= in_range ? core[caddr] : '0;
        cyc <= '0;
        if (half) begin
          busy <= 1'b0;
          ack  <= 1'b1;
        end
        half <= ~half;
      end
    end
  end
endmodule
