// stat_pkg: sizes and types shared by the Statistics Counter Plus modules.
//
// The counter keeps NUM_EVENTS independent 32-bit counts, addressed by an
// 8-bit event number. Three event lines feed it, and a fourth service slot
// reads a count out. The arbiter visits the four slots in a fixed rotation,
// one per clock, so every source is served once every NUM_SLOTS cycles. The
// 256 events, 8-bit numbers, 32-bit counts, 3-bit increment amounts, three
// event lines and 16-bit RAM halves all follow the source description. The
// slot order (lines 1..3, then the read) is a choice of this design.
package stat_pkg;

  localparam int unsigned NUM_EVENTS = 256;
  localparam int unsigned EVT_W      = 8;   // event (counter) number width
  localparam int unsigned CNT_W      = 32;  // counter width
  localparam int unsigned AMT_W      = 3;   // width of an accumulated increment
  localparam int unsigned RAM_W      = 16;  // width of one block RAM half
  localparam int unsigned NUM_LINES  = 3;   // event_1 .. event_3
  localparam int unsigned NUM_SLOTS  = NUM_LINES + 1;  // plus the read port
  localparam int unsigned SLOT_W     = 2;
  localparam int unsigned READ_SLOT  = NUM_LINES;      // slot index of the read

  typedef logic [EVT_W-1:0]  evt_num_t;
  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [AMT_W-1:0]  amt_t;
  typedef logic [SLOT_W-1:0] slot_t;

endpackage
