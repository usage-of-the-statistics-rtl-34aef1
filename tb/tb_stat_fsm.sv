// tb_stat_fsm: self-checking test of the controller.
//
// After reset the controller must write zero to every address 0..255 in turn
// (clear write enable high for exactly 256 cycles) with ready low, then raise
// ready. In operation the slot must advance by one every cycle; with random
// pending flags the testbench checks that exactly the visited slot's flag is
// cleared when it is pending, that an increment is started for line slots and
// a read marked for the read slot, and that the strobe follows a read by one
// cycle.
module tb_stat_fsm;
  import stat_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic [NUM_SLOTS-1:0] pend, clr;
  slot_t slot, last_slot;
  logic inc_go, rd_go, strobe, ready, clr_we, rd_go_d;
  evt_num_t clr_addr;
  int checks = 0, failures = 0;
  int clear_cycles = 0;
  int reads = 0, incs = 0;

  stat_fsm dut (
    .clk(clk), .rst_n(rst_n), .pend_i(pend), .slot_o(slot), .clr_o(clr),
    .inc_go_o(inc_go), .rd_go_o(rd_go), .strobe_o(strobe), .ready_o(ready),
    .clr_we_o(clr_we), .clr_addr_o(clr_addr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    rst_n = 1'b0; pend = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // clear phase
    for (int a = 0; a < NUM_EVENTS; a++) begin
      #1;
      check(clr_we && !ready && clr_addr == evt_num_t'(a), $sformatf("clear write %0d", a));
      check(!inc_go && !rd_go, "no service while clearing");
      @(negedge clk);
    end
    #1;
    check(ready && !clr_we, "ready after clearing 256 counters");
    last_slot = slot;
    rd_go_d = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      pend = NUM_SLOTS'($urandom);
      #1;
      if (cyc > 0) check(slot == slot_t'(last_slot + 1), "slot advances by one");
      check(clr == (pend[slot] ? NUM_SLOTS'(1) << slot : '0), "clear of served flag");
      check(inc_go == (pend[slot] && slot != slot_t'(READ_SLOT)), "increment start");
      check(rd_go == (pend[slot] && slot == slot_t'(READ_SLOT)), "read start");
      check(strobe == rd_go_d, "strobe one cycle after read");
      check(ready && !clr_we, "stays ready");
      reads += rd_go; incs += inc_go;
      rd_go_d = rd_go;
      last_slot = slot;
      @(negedge clk);
    end
    check(reads > 0 && incs > 0, "both kinds of service seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
