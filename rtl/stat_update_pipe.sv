// stat_update_pipe: the read-modify-write path that adds an amount to a counter.
//
// The counter memory is read on port A in the cycle the controller serves an
// increment (cycle s; the RAM samples the address at the end of it). From
// there the pipeline is:
//   s+1  the RAM drives the old 32-bit count (upper and lower halves)
//   s+2  dout_q holds the count; the adder adds the amount, which has been
//        delayed by two registers to line up with it
//   s+3  sum_q holds the new count; the address, delayed by three registers,
//        and the write enable, delayed likewise, write it through port B
// So a counter is written at the end of cycle s+3 and may be read again from
// cycle s+4 on: this is why a line is served only every four cycles.
//
// During the clear after reset the controller's clear write (clr_we_i,
// clr_addr_i) takes over port B and writes zero.
//
// From the source description: the three address registers, the two amount
// registers, the register on the RAM output, the 32-bit + 3-bit adder and the
// register after it. This design's own choices: the delayed write enable and
// the clear multiplexer on port B.
module stat_update_pipe
  import stat_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // served request (cycle s)
  input  evt_num_t addr_i,
  input  amt_t     amt_i,
  input  logic     inc_go_i,
  // memory read data (cycle s+1)
  input  cnt_t     ram_dout_i,
  // clear after reset
  input  logic     clr_we_i,
  input  evt_num_t clr_addr_i,
  // memory write port
  output evt_num_t ram_addrb_o,
  output cnt_t     ram_din_o,
  output logic     ram_web_o
);

  localparam int unsigned ADDR_DLY = 3;
  localparam int unsigned AMT_DLY  = 2;

  evt_num_t addr_d [ADDR_DLY];
  logic     we_d   [ADDR_DLY];
  amt_t     amt_d  [AMT_DLY];
  cnt_t     dout_q;
  cnt_t     sum_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ADDR_DLY; i++) begin
        addr_d[i] <= '0;
        we_d[i]   <= 1'b0;
      end
      for (int i = 0; i < AMT_DLY; i++) amt_d[i] <= '0;
      dout_q <= '0;
      sum_q  <= '0;
    end else begin
      addr_d[0] <= addr_i;
      we_d[0]   <= inc_go_i;
      amt_d[0]  <= amt_i;
      for (int i = 1; i < ADDR_DLY; i++) begin
        addr_d[i] <= addr_d[i-1];
        we_d[i]   <= we_d[i-1];
      end
      for (int i = 1; i < AMT_DLY; i++) amt_d[i] <= amt_d[i-1];
      dout_q <= ram_dout_i;
      sum_q  <= dout_q + cnt_t'(amt_d[AMT_DLY-1]);
    end
  end

  always_comb begin
    if (clr_we_i) begin
      ram_addrb_o = clr_addr_i;
      ram_din_o   = '0;
      ram_web_o   = 1'b1;
    end else begin
      ram_addrb_o = addr_d[ADDR_DLY-1];
      ram_din_o   = sum_q;
      ram_web_o   = we_d[ADDR_DLY-1];
    end
  end

endmodule
