// tb_stat_counter_plus: end-to-end test of the Statistics Counter Plus.
//
// Runs the complete block at its default size (256 counters of 32 bits):
//   1. reset; cntr_ready must rise only after all 256 counters are cleared,
//      and reads of counters then return 0;
//   2. random traffic: each event line is driven with bursts of 1 to 12 high
//      cycles, switching to a new event number only after four low cycles;
//      line k only uses numbers n with n mod 3 = k, so no number is shared.
//      Reads are pulsed every 4 to 9 cycles at random numbers;
//   3. one event held high for 70,000 cycles, so that its count carries from
//      the lower 16-bit RAM half into the upper one;
//   4. a quiet period, then every one of the 256 counters is read and must
//      equal the reference count exactly;
//   5. a second reset, after which the counters must read 0 again.
// A reference model counts every event. A read returns a value from a moving
// count, so during traffic the returned value v must satisfy
// count(r-8) <= v <= count(now), where r is the cycle of the read pulse: an
// event is in the RAM at most 9 cycles after it happened, and a value cannot
// contain events that have not happened yet. Each data_strobe must come 3 to 6
// cycles after its read pulse. Every mechanism of the design is counted and a
// failure is recorded for any that never happened: events held for several
// cycles (two and four high cycles in a row), number switches on a line, all three lines
// active in one cycle, each read latency 3, 4, 5 and 6, the carry into the
// upper half, and the clear after reset.
module tb_stat_counter_plus;
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

  localparam int unsigned HIST = 16;
  localparam int unsigned L = NUM_LINES;

  int checks = 0, failures = 0;
  longint cyc = 0;
  cnt_t model [NUM_EVENTS];
  cnt_t hist  [HIST][NUM_EVENTS];

  // stimulus state per line
  logic     ev [L];
  evt_num_t ev_num [L];
  int burst_left [L], gap_left [L], low_run [L];
  bit traffic;     // random bursts on
  bit hold_long;   // line 0 held high on one number

  // outstanding reads
  typedef struct { longint r; evt_num_t num; cnt_t lo; bit exact; } rd_t;
  rd_t rq [$];
  int  next_read;
  bit  reads_on;

  // mechanism counters
  int n_multi = 0, n_amt4 = 0, n_switch = 0, n_all3 = 0, n_carry = 0, n_clear = 0;
  int n_lat [7];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high_run [L];

  function automatic evt_num_t line_number(int k);
    evt_num_t n;
    do n = evt_num_t'($urandom); while (int'(n) % 3 != k || n == 8'h60);
    return n;
  endfunction

  // One clock cycle: sample outputs, then drive this cycle's inputs.
  task automatic tick(bit rd_allowed);
    @(negedge clk);
    cyc++;
    // outputs of this cycle
    if (data_strobe) begin
      if (rq.size() == 0) check(0, "data_strobe without a read");
      else begin
        rd_t e = rq.pop_front();
        int lat = int'(cyc - e.r);
        check(lat >= 3 && lat <= 6, $sformatf("read latency %0d", lat));
        if (lat >= 3 && lat <= 6) n_lat[lat]++;
        if (e.exact)
          check(cntr_data == model[e.num],
                $sformatf("counter %h = %0d expected %0d", e.num, cntr_data, model[e.num]));
        else
          check(cntr_data >= e.lo && cntr_data <= model[e.num],
                $sformatf("counter %h = %0d outside [%0d,%0d]", e.num, cntr_data, e.lo, model[e.num]));
      end
    end
    if (rq.size() != 0) check(cyc - rq[0].r <= 6, "read not answered within 6 cycles");
    // event lines
    for (int k = 0; k < L; k++) begin
      bit was_low = !ev[k];
      if (k == 0 && hold_long) begin
        ev[k] = 1'b1;
      end else if (traffic && burst_left[k] > 0) begin
        ev[k] = 1'b1;
        burst_left[k]--;
        if (burst_left[k] == 0) gap_left[k] = 1 + ($urandom % 7);
      end else begin
        ev[k] = 1'b0;
        if (gap_left[k] > 0) gap_left[k]--;
        else if (traffic) burst_left[k] = 1 + ($urandom % 12);
      end
      if (ev[k] && was_low && low_run[k] >= 4 && !(k == 0 && hold_long)) begin
        evt_num_t n = line_number(k);
        if (n != ev_num[k]) n_switch++;
        ev_num[k] = n;
      end
      low_run[k] = ev[k] ? 0 : low_run[k] + 1;
      high_run[k] = ev[k] ? high_run[k] + 1 : 0;
      // a line high for 2 (4) cycles in a row makes the requestor hand over
      // an increment above one (of four, the most one request can carry)
      if (high_run[k] == 2) n_multi++;
      if (high_run[k] == 4) n_amt4++;
    end
    {event_1, event_2, event_3} = {ev[0], ev[1], ev[2]};
    {event_1_number, event_2_number, event_3_number} = {ev_num[0], ev_num[1], ev_num[2]};
    if (ev[0] && ev[1] && ev[2]) n_all3++;
    // read port
    cntr_read = 1'b0;
    next_read--;
    if (rd_allowed && next_read <= 0) begin
      rd_t e;
      e.r = cyc;
      e.num = evt_num_t'($urandom);
      e.lo = hist[(cyc - 8) % HIST][e.num];
      e.exact = 1'b0;
      cntr_read = 1'b1;
      cntr_num_read = e.num;
      rq.push_back(e);
      next_read = 4 + ($urandom % 6);
    end
    // reference model: the events of this cycle
    for (int k = 0; k < L; k++) if (ev[k]) model[ev_num[k]]++;
    hist[cyc % HIST] = model;
  endtask

  // Read one counter exactly (no traffic on it), wait for the answer.
  task automatic read_exact(evt_num_t n);
    rd_t e;
    @(negedge clk);
    cyc++;
    e.r = cyc; e.num = n; e.lo = '0; e.exact = 1'b1;
    cntr_read = 1'b1; cntr_num_read = n;
    rq.push_back(e);
    hist[cyc % HIST] = model;
    repeat (3) tick(1'b0);
    while (rq.size() != 0) tick(1'b0);
  endtask

  task automatic do_reset();
    longint t0;
    int wait_cycles = 0;
    reset_l_int = 1'b0;
    repeat (3) @(negedge clk);
    reset_l_int = 1'b1;
    while (!cntr_ready) begin
      @(negedge clk);
      wait_cycles++;
    end
    check(wait_cycles >= NUM_EVENTS, $sformatf("cntr_ready after %0d cycles, before the clear ended", wait_cycles));
    for (int a = 0; a < NUM_EVENTS; a++) model[a] = '0;
    for (int h = 0; h < HIST; h++) hist[h] = model;
    // counters read zero after the clear
    for (int i = 0; i < 16; i++) read_exact(evt_num_t'($urandom));
    n_clear++;
  endtask

  initial begin
    reset_l_int = 1'b0;
    {event_1, event_2, event_3} = '0;
    {event_1_number, event_2_number, event_3_number} = '0;
    cntr_read = 1'b0; cntr_num_read = '0;
    for (int k = 0; k < L; k++) begin
      ev[k] = 1'b0; ev_num[k] = line_number(k); burst_left[k] = 0;
      gap_left[k] = 0; low_run[k] = 10;
    end
    for (int i = 0; i < 7; i++) n_lat[i] = 0;
    traffic = 1'b0; hold_long = 1'b0; next_read = 5;
    for (int k = 0; k < L; k++) high_run[k] = 0;

    // 1. reset and clear
    do_reset();

    // 2. random traffic with reads
    traffic = 1'b1;
    repeat (30000) tick(1'b1);

    // 3. one event held for 70,000 cycles while the other lines keep going
    traffic = 1'b0;
    repeat (8) tick(1'b1);
    hold_long = 1'b1;
    ev_num[0] = 8'h60;
    traffic = 1'b1;
    for (int i = 0; i < 70000; i++) begin
      // line 0 is held; stop its random burst state from switching numbers
      burst_left[0] = 0; gap_left[0] = 1;
      tick(1'b1);
    end
    hold_long = 1'b0;
    traffic = 1'b0;

    // 4. quiet, then exact readout of every counter
    repeat (20) tick(1'b0);
    check(model[8'h60] >= 32'd70000, "long hold counted in the model");
    for (int a = 0; a < NUM_EVENTS; a++) read_exact(evt_num_t'(a));
    if (model[8'h60] > 32'hFFFF) n_carry++;

    // 5. second reset clears everything
    do_reset();

    // mechanism report
    $display("increments above one: %0d (of four: %0d), number switches: %0d, all three lines: %0d",
             n_multi, n_amt4, n_switch, n_all3);
    $display("read latencies 3/4/5/6: %0d/%0d/%0d/%0d, carry into upper half: %0d, clears: %0d",
             n_lat[3], n_lat[4], n_lat[5], n_lat[6], n_carry, n_clear);
    check(n_multi > 0, "no held event");
    check(n_amt4 > 0, "no increment of four");
    check(n_switch > 0, "no event number switch");
    check(n_all3 > 0, "never all three lines at once");
    for (int i = 3; i <= 6; i++) check(n_lat[i] > 0, $sformatf("read latency %0d never seen", i));
    check(n_carry > 0, "no carry into the upper RAM half");
    check(n_clear == 2, "clear after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
