// cb_adjustment: the core buffer adjustment circuit of the TCU control panel.
//
// Started from the panel, it runs through all WORDS core buffer locations
// once (or, for READ_ALL, over and over until `stop`), issuing one core
// buffer access per location through a req/ack port like the core_buffer's:
//   CLEAR     write the word 0 (all digits 0 with their parity) everywhere
//   READ_ALL  read every word repeatedly; each word read is shown on
//             `panel_word` for observation (the DR checks its parity)
//   ZEROS     write all bits 0
//   ONES      write all bits 1
//   PAT_A     write ...0101 in even and ...1010 in odd locations
//   PAT_B     the complement of PAT_A
// The two alternating patterns are this design's choice for the document's
// "two very unfavourable patterns". `running` is high while it works.
module cb_adjustment
  import kdc_tape_pkg::*;
#(
  parameter int unsigned WORDS = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       stop,
  input  logic [2:0] mode,
  output logic       running,
  output logic       cb_req,
  output logic       cb_we,
  output logic [5:0] cb_addr,
  output word_t      cb_wdata,
  input  logic       cb_ack,
  input  word_t      cb_rdata,
  output word_t      panel_word
);
  typedef enum logic [2:0] {
    ADJ_CLEAR = 3'd0, ADJ_READ_ALL = 3'd1, ADJ_ZEROS = 3'd2,
    ADJ_ONES  = 3'd3, ADJ_PAT_A    = 3'd4, ADJ_PAT_B = 3'd5
  } adj_mode_t;

  localparam word_t ALT = {30{2'b01}};

  adj_mode_t m;
  logic      waiting;

  always_comb begin
    unique case (m)
      ADJ_ONES:  cb_wdata = '1;
      ADJ_PAT_A: cb_wdata = cb_addr[0] ? ~ALT : ALT;
      ADJ_PAT_B: cb_wdata = cb_addr[0] ? ALT : ~ALT;
      default:   cb_wdata = '0;   // CLEAR, ZEROS (word 0 has even parity)
    endcase
  end
  assign cb_we = (m != ADJ_READ_ALL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      waiting    <= 1'b0;
      cb_req     <= 1'b0;
      cb_addr    <= '0;
      m          <= ADJ_CLEAR;
      panel_word <= '0;
    end else begin
      cb_req <= 1'b0;
      if (!running) begin
        if (start && mode <= 3'd5) begin
          m       <= adj_mode_t'(mode);
          running <= 1'b1;
          cb_addr <= '0;
          cb_req  <= 1'b1;
          waiting <= 1'b1;
        end
      end else if (waiting && cb_ack) begin
        waiting <= 1'b0;
        if (m == ADJ_READ_ALL) panel_word <= cb_rdata;
        if (cb_addr == 6'(WORDS - 1)) begin
          cb_addr <= '0;
          if (m == ADJ_READ_ALL && !stop) begin
            cb_req  <= 1'b1;
            waiting <= 1'b1;
          end else begin
            running <= 1'b0;
          end
        end else if (stop) begin
          running <= 1'b0;
        end else begin
          cb_addr <= cb_addr + 1'b1;
          cb_req  <= 1'b1;
          waiting <= 1'b1;
        end
      end
    end
  end
endmodule
