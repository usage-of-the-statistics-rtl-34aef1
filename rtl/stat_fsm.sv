// stat_fsm: the controller ("RAM control") of the Statistics Counter Plus.
//
// After reset the controller is in CLEAR: it walks the write port over every
// counter address, one per cycle, writing zero. It then enters RUN and raises
// ready_o. In RUN a two-bit slot counter rotates through the three event
// lines and the read port, one slot per cycle. If the flag of the slot being
// visited is pending, the controller serves it: it clears the flag, and for an
// event line starts a read-modify-write (inc_go_o), for the read slot it marks
// a counter read (rd_go_o). Because a slot comes round only every four cycles,
// an increment's write (three cycles after its read) always lands before the
// next read of the same line.
//
// Interface and timing: slot_o steers the request multiplexers in the same
// cycle. inc_go_o and rd_go_o are combinational in the serving cycle (the
// RAM samples the address at the end of it). strobe_o is rd_go_o delayed by
// one cycle, the cycle the RAM's output holds the word read; the top
// registers it once more to make data_strobe, together with cntr_data.
// clr_we_o/clr_addr_o drive the write port during CLEAR.
//
// From the source description: a controller that shares the RAM between the
// requests and produces the data strobe. This design's own choices: the fixed
// round-robin order, clearing the memory after reset and the ready handshake.
module stat_fsm
  import stat_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_EVENTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_SLOTS-1:0] pend_i,
  output slot_t                slot_o,
  output logic [NUM_SLOTS-1:0] clr_o,
  output logic                 inc_go_o,
  output logic                 rd_go_o,
  output logic                 strobe_o,
  output logic                 ready_o,
  output logic                 clr_we_o,
  output evt_num_t             clr_addr_o
);

  typedef enum logic [0:0] {S_CLEAR, S_RUN} state_t;

  state_t   state_q;
  slot_t    slot_q;
  evt_num_t clr_addr_q;
  logic     serve;

  assign slot_o     = slot_q;
  assign ready_o    = (state_q == S_RUN);
  assign clr_we_o   = (state_q == S_CLEAR);
  assign clr_addr_o = clr_addr_q;

  always_comb begin
    serve    = ready_o && pend_i[slot_q];
    clr_o    = '0;
    if (serve) clr_o[slot_q] = 1'b1;
    inc_go_o = serve && (slot_q != slot_t'(READ_SLOT));
    rd_go_o  = serve && (slot_q == slot_t'(READ_SLOT));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_CLEAR;
      slot_q     <= '0;
      clr_addr_q <= '0;
      strobe_o   <= 1'b0;
    end else begin
      strobe_o <= rd_go_o;
      unique case (state_q)
        S_CLEAR: begin
          clr_addr_q <= clr_addr_q + evt_num_t'(1);
          if (clr_addr_q == evt_num_t'(DEPTH - 1)) state_q <= S_RUN;
        end
        S_RUN: begin
          slot_q <= slot_q + slot_t'(1);
        end
        default: state_q <= S_CLEAR;
      endcase
    end
  end

endmodule
