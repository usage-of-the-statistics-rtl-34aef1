// stat_counter_plus: 256 event counters for a network hardware module.
//
// The block counts up to 256 kinds of events in 32-bit counters kept in two
// 256 x 16 block RAMs (upper and lower halves). Three event lines can report
// events at the same time; each line may stay high for as many cycles as its
// event keeps happening, and every high cycle is counted. A read port returns
// any counter's value.
//
// How it works: the event requestor counts the high cycles of each line in a
// 3-bit accumulator and, once every four cycles, hands the count and the event
// number to the request registers. The controller rotates through four slots
// (line 1, line 2, line 3, read), one per cycle. Serving a line reads the
// counter from RAM port A; three cycles later the update pipeline writes the
// counter plus the accumulated amount back through port B. Serving the read
// slot reads the counter and returns it on cntr_data.
//
// Usage rules (from the source description): hold event_#_number steady while
// event_# is high; an event number may be used on one line only; to change a
// line's event number, hold the line low for four cycles first; pulse
// cntr_read for one cycle with cntr_num_read valid, at least four cycles
// apart. cntr_ready rises once the counters have been cleared after reset.
//
// Timing: cntr_data and data_strobe come 3 to 6 cycles after the cntr_read
// pulse, depending on where the rotation stands; cntr_data is only valid
// while data_strobe is high. An event is written to the RAM at most 8 cycles
// after its cycle on the line, so a read served 9 or more cycles later sees it.
//
// Structure and widths follow the block diagram of the source. The clear
// after reset, the slot rotation and the synchronous active-low reset are
// this design's choices.
module stat_counter_plus
  import stat_pkg::*;
(
  input  logic     clk,
  input  logic     reset_l_int,
  input  logic     event_1,
  input  logic     event_2,
  input  logic     event_3,
  input  evt_num_t event_1_number,
  input  evt_num_t event_2_number,
  input  evt_num_t event_3_number,
  input  logic     cntr_read,
  input  evt_num_t cntr_num_read,
  output logic     cntr_ready,
  output logic     data_strobe,
  output cnt_t     cntr_data
);

  logic     ev     [NUM_LINES];
  evt_num_t ev_num [NUM_LINES];
  logic     inc_req [NUM_LINES];
  amt_t     inc_amt [NUM_LINES];
  evt_num_t inc_num [NUM_LINES];

  logic [NUM_SLOTS-1:0] pend, clr;
  slot_t    slot;
  evt_num_t sel_num;
  amt_t     sel_amt;
  logic     inc_go, rd_go, strobe, ready;
  logic     clr_we;
  evt_num_t clr_addr;

  evt_num_t ram_addrb;
  cnt_t     ram_din, ram_dout;
  logic     ram_web;

  assign ev     = '{event_1, event_2, event_3};
  assign ev_num = '{event_1_number, event_2_number, event_3_number};

  event_requestor u_requestor (
    .clk          (clk),
    .rst_n        (reset_l_int),
    .enable_i     (ready),
    .slot_i       (slot),
    .event_i      (ev),
    .event_num_i  (ev_num),
    .req_o        (inc_req),
    .req_amt_o    (inc_amt),
    .req_num_o    (inc_num),
    .cntr_ready_o (cntr_ready)
  );

  stat_req_regs u_req_regs (
    .clk             (clk),
    .rst_n           (reset_l_int),
    .inc_req_i       (inc_req),
    .inc_amt_i       (inc_amt),
    .inc_num_i       (inc_num),
    .cntr_read_i     (cntr_read),
    .cntr_num_read_i (cntr_num_read),
    .slot_i          (slot),
    .clr_i           (clr),
    .pend_o          (pend),
    .sel_num_o       (sel_num),
    .sel_amt_o       (sel_amt)
  );

  stat_fsm u_fsm (
    .clk        (clk),
    .rst_n      (reset_l_int),
    .pend_i     (pend),
    .slot_o     (slot),
    .clr_o      (clr),
    .inc_go_o   (inc_go),
    .rd_go_o    (rd_go),
    .strobe_o   (strobe),
    .ready_o    (ready),
    .clr_we_o   (clr_we),
    .clr_addr_o (clr_addr)
  );

  stat_update_pipe u_update (
    .clk         (clk),
    .rst_n       (reset_l_int),
    .addr_i      (sel_num),
    .amt_i       (sel_amt),
    .inc_go_i    (inc_go),
    .ram_dout_i  (ram_dout),
    .clr_we_i    (clr_we),
    .clr_addr_i  (clr_addr),
    .ram_addrb_o (ram_addrb),
    .ram_din_o   (ram_din),
    .ram_web_o   (ram_web)
  );

  stat_bram #(.DEPTH(NUM_EVENTS), .DATA_W(RAM_W)) u_ram_upper (
    .clk   (clk),
    .addra (sel_num),
    .douta (ram_dout[CNT_W-1:RAM_W]),
    .addrb (ram_addrb),
    .dinb  (ram_din[CNT_W-1:RAM_W]),
    .web   (ram_web)
  );

  stat_bram #(.DEPTH(NUM_EVENTS), .DATA_W(RAM_W)) u_ram_lower (
    .clk   (clk),
    .addra (sel_num),
    .douta (ram_dout[RAM_W-1:0]),
    .addrb (ram_addrb),
    .dinb  (ram_din[RAM_W-1:0]),
    .web   (ram_web)
  );

  // Output registers: cntr_data follows the RAM output every cycle and is
  // meaningful only while data_strobe is high.
  always_ff @(posedge clk) begin
    if (!reset_l_int) begin
      data_strobe <= 1'b0;
      cntr_data   <= '0;
    end else begin
      data_strobe <= strobe;
      cntr_data   <= ram_dout;
    end
  end

  // Usage rule: a read pulse must not arrive while an earlier read is still
  // waiting for its slot (reads at least four cycles apart guarantee this).
  a_read_spacing: assert property (@(posedge clk) disable iff (!reset_l_int)
    cntr_read |-> !(pend[READ_SLOT] && !rd_go));

endmodule
