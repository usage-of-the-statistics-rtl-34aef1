// tb_stat_req_regs: self-checking test of the request registers and multiplexers.
//
// Random increment requests (with random amounts and numbers), random read
// pulses, random slot selections and random clear strobes are applied for
// several thousand cycles. A reference model of the registers (loads on a
// request, flag set by a request and cleared by the controller, a new request
// winning over a clear) predicts the pending flags and the multiplexer
// outputs, which are compared every cycle; the read slot must select amount 0.
module tb_stat_req_regs;
  import stat_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     inc_req [NUM_LINES];
  amt_t     inc_amt [NUM_LINES];
  evt_num_t inc_num [NUM_LINES];
  logic     cntr_read;
  evt_num_t cntr_num_read;
  slot_t    slot;
  logic [NUM_SLOTS-1:0] clr, pend;
  evt_num_t sel_num;
  amt_t     sel_amt;

  logic [NUM_SLOTS-1:0] m_pend;
  evt_num_t m_num [NUM_SLOTS];
  amt_t     m_amt [NUM_SLOTS];
  int checks = 0, failures = 0;

  stat_req_regs dut (
    .clk(clk), .rst_n(rst_n), .inc_req_i(inc_req), .inc_amt_i(inc_amt),
    .inc_num_i(inc_num), .cntr_read_i(cntr_read), .cntr_num_read_i(cntr_num_read),
    .slot_i(slot), .clr_i(clr), .pend_o(pend), .sel_num_o(sel_num), .sel_amt_o(sel_amt)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cntr_read = 1'b0; cntr_num_read = '0; slot = '0; clr = '0;
    for (int k = 0; k < NUM_LINES; k++) begin
      inc_req[k] = 1'b0; inc_amt[k] = '0; inc_num[k] = '0;
    end
    m_pend = '0;
    for (int k = 0; k < NUM_SLOTS; k++) begin m_num[k] = '0; m_amt[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // compare the registered state from the previous edge
      slot = slot_t'($urandom);
      #1;
      checks++;
      if (pend !== m_pend || sel_num !== m_num[slot] ||
          sel_amt !== (slot == slot_t'(READ_SLOT) ? amt_t'(0) : m_amt[slot])) begin
        failures++;
        $display("cyc %0d slot %0d: pend %b/%b num %h/%h amt %0d/%0d", cyc, slot,
                 pend, m_pend, sel_num, m_num[slot], sel_amt, m_amt[slot]);
      end
      // new inputs for the next edge
      for (int k = 0; k < NUM_LINES; k++) begin
        inc_req[k] = ($urandom % 4) == 0;
        inc_amt[k] = amt_t'($urandom);
        inc_num[k] = evt_num_t'($urandom);
      end
      cntr_read = ($urandom % 4) == 0;
      cntr_num_read = evt_num_t'($urandom);
      clr = NUM_SLOTS'($urandom);
      // model update
      for (int k = 0; k < NUM_LINES; k++) if (inc_req[k]) begin
        m_num[k] = inc_num[k]; m_amt[k] = inc_amt[k];
      end
      if (cntr_read) m_num[READ_SLOT] = cntr_num_read;
      m_pend = (m_pend & ~clr) | {cntr_read, inc_req[2], inc_req[1], inc_req[0]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
