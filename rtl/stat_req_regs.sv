// stat_req_regs: the request registers and the slot multiplexers.
//
// Four 8-bit registers hold the counter numbers of the three event lines and
// of the read port; three 3-bit registers hold the increment amounts; four
// 1-bit registers flag a pending request per slot. An increment request pulse
// loads a line's number and amount and sets its flag; a cntr_read pulse loads
// the read number and sets the read flag. The controller clears a flag in the
// cycle it serves that slot (a new request in the same cycle wins). Two
// multiplexers, steered by the controller's slot, put the selected number on
// the RAM read address and the selected amount on the update pipeline; the
// read slot has no amount and selects zero.
//
// Interface and timing: requests are registered, so a request pulsed in cycle
// t is visible on pend_o and through the multiplexers from cycle t+1.
//
// From the source description: the four 8-bit, three 3-bit and four 1-bit
// registers and the two multiplexers of the block diagram. This design's own
// choices: set/clear flags and the zero amount for the read slot.
module stat_req_regs
  import stat_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // increment requests from the event requestor
  input  logic     inc_req_i [NUM_LINES],
  input  amt_t     inc_amt_i [NUM_LINES],
  input  evt_num_t inc_num_i [NUM_LINES],
  // read request from the user
  input  logic     cntr_read_i,
  input  evt_num_t cntr_num_read_i,
  // controller side
  input  slot_t    slot_i,
  input  logic [NUM_SLOTS-1:0] clr_i,
  output logic [NUM_SLOTS-1:0] pend_o,
  output evt_num_t sel_num_o,
  output amt_t     sel_amt_o
);

  evt_num_t num_q [NUM_SLOTS];
  amt_t     amt_q [NUM_LINES];
  logic [NUM_SLOTS-1:0] set;

  always_comb begin
    for (int k = 0; k < NUM_LINES; k++) set[k] = inc_req_i[k];
    set[READ_SLOT] = cntr_read_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_o <= '0;
      for (int k = 0; k < NUM_SLOTS; k++) num_q[k] <= '0;
      for (int k = 0; k < NUM_LINES; k++) amt_q[k] <= '0;
    end else begin
      pend_o <= set | (pend_o & ~clr_i);
      for (int k = 0; k < NUM_LINES; k++) begin
        if (inc_req_i[k]) begin
          num_q[k] <= inc_num_i[k];
          amt_q[k] <= inc_amt_i[k];
        end
      end
      if (cntr_read_i) num_q[READ_SLOT] <= cntr_num_read_i;
    end
  end

  always_comb begin
    sel_num_o = num_q[slot_i];
    sel_amt_o = '0;
    for (int k = 0; k < NUM_LINES; k++) begin
      if (slot_i == slot_t'(k)) sel_amt_o = amt_q[k];
    end
  end

endmodule
