// tb_stat_workloads: the counter in its intended uses, at full size.
//
// Part 1, basic usage: event line 1 is held high for five cycles on event
// number 0x07, then, after four low cycles, records event 0x10; line 2 counts
// events 0x25 then 0x30 and line 3 events 0x40 then 0x45, independently. The
// counters are read back (reads four cycles apart, the same number twice in a
// row included) and must hold exactly the cycles each line was high.
//
// Part 2, a control cell processor: 64 virtual circuits (VCI 0..63) and four
// kinds of events. The event number packs the kind into bits 7:6 and the VCI
// into bits 5:0: 00 = cell arrived on the VCI, 01 = SRAM read, 10 = SRAM
// write; number 0xC0 counts all control cells. For each cell, line 1 pulses
// the cell's VCI counter and line 2 the total counter in the same cycle;
// line 3 is then held for as many cycles as the cell reads or writes SRAM
// words, with the read or write number of its VCI. Cells come back to back at
// random intervals, after a reset that clears part 1. Afterwards all 193 counters are read, must equal the
// reference, and the total must equal the sum of the per-VCI cell counts.
module tb_stat_workloads;
  import stat_pkg::*;

  logic     clk = 1'b0;
  logic     reset_l_int;
  logic     event_1, event_2, event_3;
  evt_num_t event_1_number, event_2_number, event_3_number;
  logic     cntr_read;
  evt_num_t cntr_num_read;
  logic     cntr_ready, data_strobe;
  cnt_t     cntr_data;

  stat_counter_plus dut (.*);

  always #5 clk = ~clk;

  localparam evt_num_t TOTAL = 8'hC0;
  int checks = 0, failures = 0;
  cnt_t model [NUM_EVENTS];

  function automatic evt_num_t ccp_num(int kind, int vci);
    return evt_num_t'({kind[1:0], vci[5:0]});
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one cycle of the three event lines (0 = low)
  task automatic cycle3(bit e1, evt_num_t n1, bit e2, evt_num_t n2, bit e3, evt_num_t n3);
    @(negedge clk);
    event_1 = e1; event_1_number = e1 ? n1 : 8'hFF;
    event_2 = e2; event_2_number = e2 ? n2 : 8'hFF;
    event_3 = e3; event_3_number = e3 ? n3 : 8'hFF;
    if (e1) model[n1]++;
    if (e2) model[n2]++;
    if (e3) model[n3]++;
  endtask

  // read one counter; returns after the strobe and checks the latency
  task automatic read_check(evt_num_t n, cnt_t expected);
    int lat = 0;
    @(negedge clk);
    {event_1, event_2, event_3} = '0;
    cntr_read = 1'b1; cntr_num_read = n;
    @(negedge clk);
    cntr_read = 1'b0; cntr_num_read = 8'hFF;
    lat = 1;
    while (!data_strobe && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (!data_strobe || lat < 3 || lat > 6 || cntr_data != expected) begin
      failures++;
      $display("counter %h: %0d (expected %0d), latency %0d", n, cntr_data, expected, lat);
    end
    // keep reads at least four cycles apart
    repeat (lat >= 4 ? 0 : 4 - lat) @(negedge clk);
  endtask

  initial begin
    reset_l_int = 1'b0;
    {event_1, event_2, event_3} = '0;
    {event_1_number, event_2_number, event_3_number} = '0;
    cntr_read = 1'b0; cntr_num_read = '0;
    for (int a = 0; a < NUM_EVENTS; a++) model[a] = '0;
    repeat (3) @(negedge clk);
    reset_l_int = 1'b1;
    while (!cntr_ready) @(negedge clk);

    // Part 1
    for (int c = 0; c < 16; c++) begin
      cycle3(c < 5 || c >= 9, c < 9 ? 8'h07 : 8'h10,
             (c >= 2 && c < 6) || c == 11, c < 8 ? 8'h25 : 8'h30,
             c == 2 || (c >= 8 && c < 11), c < 5 ? 8'h40 : 8'h45);
    end
    repeat (12) cycle3(0, 0, 0, 0, 0, 0);
    read_check(8'h07, 5);
    read_check(8'h07, 5);
    read_check(8'h10, 7);
    read_check(8'h25, 4);
    read_check(8'h30, 1);
    read_check(8'h40, 1);
    read_check(8'h45, 3);

    // Part 2, from a fresh reset
    @(negedge clk);
    reset_l_int = 1'b0;
    repeat (2) @(negedge clk);
    reset_l_int = 1'b1;
    for (int a = 0; a < NUM_EVENTS; a++) model[a] = '0;
    @(negedge clk);
    while (!cntr_ready) @(negedge clk);
    for (int n_cell = 0; n_cell < 3000; n_cell++) begin
      int vci = $urandom % 64;
      int kind = 1 + ($urandom % 2);
      int words = 1 + ($urandom % 16);
      cycle3(1, ccp_num(0, vci), 1, TOTAL, 0, 0);
      for (int w = 0; w < words; w++) cycle3(0, 0, 0, 0, 1, ccp_num(kind, vci));
      // four low cycles before line 3 may change its number
      repeat (4 + ($urandom % 3)) cycle3(0, 0, 0, 0, 0, 0);
    end
    repeat (12) cycle3(0, 0, 0, 0, 0, 0);
    begin
      cnt_t sum = '0;
      for (int vci = 0; vci < 64; vci++) begin
        sum += model[ccp_num(0, vci)];
        for (int kind = 0; kind < 3; kind++) read_check(ccp_num(kind, vci), model[ccp_num(kind, vci)]);
      end
      read_check(TOTAL, sum);
      checks++;
      if (model[TOTAL] != 32'd3000) begin
        failures++;
        $display("reference total %0d", model[TOTAL]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
