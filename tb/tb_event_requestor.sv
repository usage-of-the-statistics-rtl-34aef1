// tb_event_requestor: self-checking test of the event requestor.
//
// The testbench plays the controller: it rotates the slot 0,1,2,3 every cycle
// and raises enable after a few cycles. Each event line is driven with random
// bursts (1 to 12 cycles high, one event number per burst, at least four low
// cycles before the number changes, and sometimes a short gap with the same
// number). A reference model counts, per line, the high cycles seen since the
// last request and checks every cycle that:
//   - a request appears exactly when the next slot is the line's and the
//     count is non-zero, and carries that count and the burst's number;
//   - no event is lost: all amounts requested add up to all events driven.
// Events before enable must be ignored, and cntr_ready must follow enable by
// one cycle.
module tb_event_requestor;
  import stat_pkg::*;

  localparam int unsigned L = NUM_LINES;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     enable;
  slot_t    slot;
  logic     ev [L];
  evt_num_t ev_num [L];
  logic     req [L];
  amt_t     req_amt [L];
  evt_num_t req_num [L];
  logic     ready;

  int checks = 0, failures = 0;
  int pending [L];          // events seen since the last request
  evt_num_t cur_num [L];    // number of the events being accumulated
  longint driven [L], requested [L];
  int multi = 0;            // requests with an amount above one

  event_requestor dut (
    .clk(clk), .rst_n(rst_n), .enable_i(enable), .slot_i(slot),
    .event_i(ev), .event_num_i(ev_num), .req_o(req), .req_amt_o(req_amt),
    .req_num_o(req_num), .cntr_ready_o(ready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus per line: state kept in the driver process
  int burst_left [L], gap_left [L];
  logic enable_d;

  task automatic step_line(int k);
    if (burst_left[k] > 0) begin
      ev[k] = 1'b1;
      burst_left[k]--;
      if (burst_left[k] == 0) gap_left[k] = 1 + ($urandom % 8);
    end else begin
      ev[k] = 1'b0;
      if (gap_left[k] > 0) gap_left[k]--;
      if (gap_left[k] == 0) begin
        burst_left[k] = 1 + ($urandom % 12);
        // a new number only after four low cycles: ensured by the check
        // below, otherwise reuse the old one
      end
    end
  endtask

  int low_run [L];

  initial begin
    rst_n = 1'b0; enable = 1'b0; slot = '0;
    for (int k = 0; k < L; k++) begin
      ev[k] = 1'b0; ev_num[k] = '0; pending[k] = 0; cur_num[k] = '0;
      driven[k] = 0; requested[k] = 0; burst_left[k] = 0; gap_left[k] = 2;
      low_run[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      enable_d = enable;
      if (cyc == 10) enable = 1'b1;
      slot = enable ? slot_t'(cyc) : '0;
      for (int k = 0; k < L; k++) begin
        logic was_low;
        was_low = !ev[k];
        step_line(k);
        if (ev[k] && was_low && low_run[k] >= 4) ev_num[k] = evt_num_t'($urandom);
        low_run[k] = ev[k] ? 0 : low_run[k] + 1;
      end
      #1;
      // check this cycle's combinational request against the model
      for (int k = 0; k < L; k++) begin
        logic exp_req;
        exp_req = enable && (slot_t'(slot + 1) == slot_t'(k)) && pending[k] != 0;
        checks++;
        if (req[k] !== exp_req) begin
          failures++;
          $display("cyc %0d line %0d: req %0b expected %0b (pending %0d)", cyc, k, req[k], exp_req, pending[k]);
        end
        if (exp_req) begin
          checks++;
          if (req_amt[k] != amt_t'(pending[k]) || req_num[k] != cur_num[k]) begin
            failures++;
            $display("cyc %0d line %0d: amount %0d num %h expected %0d %h", cyc, k, req_amt[k], req_num[k], pending[k], cur_num[k]);
          end
          requested[k] += req_amt[k];
          if (req_amt[k] > 1) multi++;
          pending[k] = 0;
        end
        if (enable && ev[k]) begin
          pending[k]++;
          cur_num[k] = ev_num[k];
          driven[k]++;
        end
      end
      checks++;
      if (ready !== enable_d) begin
        failures++;
        $display("cyc %0d: cntr_ready %0b expected %0b", cyc, ready, enable_d);
      end
    end
    // drain: lines low, let every pending count go out
    for (int cyc = 0; cyc < 8; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < L; k++) ev[k] = 1'b0;
      slot = slot + 1;
      #1;
      for (int k = 0; k < L; k++) if (req[k]) begin
        requested[k] += req_amt[k];
        pending[k] = 0;
      end
    end
    for (int k = 0; k < L; k++) begin
      checks++;
      if (requested[k] != driven[k]) begin
        failures++;
        $display("line %0d: requested %0d events, drove %0d", k, requested[k], driven[k]);
      end
    end
    checks++;
    if (multi == 0) begin
      failures++;
      $display("no request carried more than one event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
