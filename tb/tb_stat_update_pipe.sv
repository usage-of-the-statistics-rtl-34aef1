// tb_stat_update_pipe: self-checking test of the read-modify-write pipeline.
//
// The testbench holds a 256 x 32 memory with one-cycle read latency in front
// of the pipeline, as the two block RAMs are in the full design. It first
// clears the memory through the clear port, then issues random increments
// (random address, amount 0..7, a new increment in most cycles) with the rule
// of the full design that an address is not issued again within four cycles.
// For every increment issued in cycle s it checks that the write port carries
// address, old value + amount and write enable in cycle s+3, and nothing else
// is written; at the end every counter is compared with a reference count.
// Counters are preloaded near 2^16 and 2^32 to check carries across the two
// 16-bit halves and the wrap of the 32-bit count.
module tb_stat_update_pipe;
  import stat_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  evt_num_t addr;
  amt_t     amt;
  logic     inc_go;
  cnt_t     ram_dout;
  logic     clr_we;
  evt_num_t clr_addr;
  evt_num_t ram_addrb;
  cnt_t     ram_din;
  logic     ram_web;

  cnt_t mem [NUM_EVENTS];
  cnt_t ref_cnt [NUM_EVENTS];
  int   last_use [NUM_EVENTS];
  // expected writes, indexed by the cycle they must happen in
  logic     exp_we   [int];
  evt_num_t exp_addr [int];
  cnt_t     exp_data [int];
  int checks = 0, failures = 0;
  int cyc = 0;

  stat_update_pipe dut (
    .clk(clk), .rst_n(rst_n), .addr_i(addr), .amt_i(amt), .inc_go_i(inc_go),
    .ram_dout_i(ram_dout), .clr_we_i(clr_we), .clr_addr_i(clr_addr),
    .ram_addrb_o(ram_addrb), .ram_din_o(ram_din), .ram_web_o(ram_web)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    ram_dout <= mem[addr];
    if (ram_web) mem[ram_addrb] <= ram_din;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; addr = '0; amt = '0; inc_go = 1'b0; clr_we = 1'b0; clr_addr = '0;
    for (int a = 0; a < NUM_EVENTS; a++) begin
      mem[a] = cnt_t'($urandom); last_use[a] = -100;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NUM_EVENTS; a++) begin
      clr_we = 1'b1; clr_addr = evt_num_t'(a);
      #1;
      checks++;
      if (!(ram_web && ram_addrb == evt_num_t'(a) && ram_din == '0)) begin
        failures++; $display("clear write %0d wrong", a);
      end
      @(negedge clk);
    end
    clr_we = 1'b0;
    for (int a = 0; a < NUM_EVENTS; a++) begin
      checks++;
      if (mem[a] != '0) begin failures++; $display("counter %0d not cleared", a); end
      ref_cnt[a] = '0;
    end
    // preload a few counters near the carry points
    mem[1] = 32'h0000_FFFE;    ref_cnt[1] = 32'h0000_FFFE;
    mem[2] = 32'hFFFF_FFFD;    ref_cnt[2] = 32'hFFFF_FFFD;
    mem[3] = 32'h1234_FFFF;    ref_cnt[3] = 32'h1234_FFFF;
    @(negedge clk);
    for (cyc = 0; cyc < 6000; cyc++) begin
      // drive this cycle
      inc_go = ($urandom % 5) != 0 && cyc < 5990;
      addr = (cyc % 50 < 3) ? evt_num_t'(1 + cyc % 50) : evt_num_t'($urandom);
      while (inc_go && cyc - last_use[addr] < 4) addr = evt_num_t'($urandom);
      amt = amt_t'($urandom);
      if (inc_go) begin
        last_use[addr] = cyc;
        ref_cnt[addr] = ref_cnt[addr] + cnt_t'(amt);
        exp_we[cyc + 3] = 1'b1;
        exp_addr[cyc + 3] = addr;
        exp_data[cyc + 3] = ref_cnt[addr];
      end
      #1;
      checks++;
      if (exp_we.exists(cyc)) begin
        if (!(ram_web && ram_addrb == exp_addr[cyc] && ram_din == exp_data[cyc])) begin
          failures++;
          $display("cyc %0d: write we=%0b a=%h d=%h expected a=%h d=%h", cyc, ram_web,
                   ram_addrb, ram_din, exp_addr[cyc], exp_data[cyc]);
        end
      end else if (ram_web) begin
        failures++;
        $display("cyc %0d: unexpected write to %h", cyc, ram_addrb);
      end
      @(negedge clk);
    end
    inc_go = 1'b0;
    repeat (5) @(negedge clk);
    for (int a = 0; a < NUM_EVENTS; a++) begin
      checks++;
      if (mem[a] != ref_cnt[a]) begin
        failures++; $display("counter %0d = %h expected %h", a, mem[a], ref_cnt[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
