// stat_bram: one half (upper or lower 16 bits) of the counter memory.
//
// A simple dual-port synchronous RAM of DEPTH words of DATA_W bits, the
// shape of an FPGA block RAM. Port A only reads: the address is sampled at a
// clock edge and the word appears on douta one cycle later. Port B only
// writes: when web is high, dinb is stored at addrb at the clock edge. The
// counter never reads a word in the cycle it is written (the four-cycle
// spacing rule prevents it), so the read-during-write result is left as the
// old word. The two-port split (read on A, write on B) and the 256 x 16 size
// follow the block diagram; the memory has no reset, its contents are cleared
// by the controller after reset.
module stat_bram #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addra,
  output logic [DATA_W-1:0] douta,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [DATA_W-1:0] dinb,
  input  logic              web
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    douta <= mem[addra];
  end

  always_ff @(posedge clk) begin
    if (web) mem[addrb] <= dinb;
  end

endmodule
