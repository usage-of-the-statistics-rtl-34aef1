// event_requestor: turns held-high event lines into periodic increment requests.
//
// Each of the NUM_LINES event lines has a small accumulator (AMT_W bits) and
// a register holding the event number last seen with the line high. Every
// cycle the line is high adds one to the accumulator. Once in every rotation
// of the arbiter, in the cycle before the arbiter visits the line's slot, the
// requestor pulses req_o for that line if the accumulator is non-zero, and
// hands over the accumulated amount and the event number. In that pulse cycle
// the accumulator restarts at one if the line is high (the event of that
// cycle is counted in the next request) and at zero if it is low. With one
// request per four cycles the accumulator never exceeds four, so three bits
// suffice.
//
// Interface: slot_i is the arbiter slot being served this cycle; line k is
// served in slot k. enable_i (the controller's ready) gates counting: events
// before the memory has been cleared are dropped. cntr_ready_o is enable_i
// registered, and is the block's ready output.
//
// From the source description: the per-line event count, the request pulse
// carrying amount and number, and the reset-to-zero-or-one rule. This
// design's own choices: tying the request to the arbiter rotation, latching
// the event number whenever the line is high, and dropping events before
// ready.
module event_requestor
  import stat_pkg::*;
#(
  parameter int unsigned LINES = NUM_LINES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable_i,
  input  slot_t    slot_i,
  input  logic     event_i     [LINES],
  input  evt_num_t event_num_i [LINES],
  output logic     req_o       [LINES],
  output amt_t     req_amt_o   [LINES],
  output evt_num_t req_num_o   [LINES],
  output logic     cntr_ready_o
);

  amt_t     acc_q [LINES];
  evt_num_t num_q [LINES];
  slot_t    next_slot;

  assign next_slot = slot_i + slot_t'(1);

  always_comb begin
    for (int k = 0; k < LINES; k++) begin
      req_o[k]     = enable_i && (next_slot == slot_t'(k)) && (acc_q[k] != '0);
      req_amt_o[k] = acc_q[k];
      req_num_o[k] = num_q[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cntr_ready_o <= 1'b0;
      for (int k = 0; k < LINES; k++) begin
        acc_q[k] <= '0;
        num_q[k] <= '0;
      end
    end else begin
      cntr_ready_o <= enable_i;
      for (int k = 0; k < LINES; k++) begin
        if (enable_i) begin
          if (req_o[k])      acc_q[k] <= amt_t'(event_i[k]);
          else if (event_i[k]) acc_q[k] <= acc_q[k] + amt_t'(1);
          if (event_i[k]) num_q[k] <= event_num_i[k];
        end
      end
    end
  end

  // The accumulator must never wrap: at most one request period of events.
  for (genvar k = 0; k < LINES; k++) begin : g_chk
    a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
      !(event_i[k] && !req_o[k] && acc_q[k] == '1));
  end

endmodule
