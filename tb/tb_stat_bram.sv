// tb_stat_bram: self-checking test of the 256 x 16 dual-port counter RAM.
//
// Fills every address through the write port with a value derived from the
// address, then reads them back through the read port and checks that each
// word arrives exactly one cycle after its address. A second pass writes
// random words at random addresses, with a shadow array as the reference,
// and reads random addresses in the same cycles (never the one being
// written). A watchdog ends the run if it hangs.
module tb_stat_bram;

  localparam int unsigned DEPTH  = 256;
  localparam int unsigned DATA_W = 16;

  logic              clk = 1'b0;
  logic [7:0]        addra, addrb;
  logic [DATA_W-1:0] douta, dinb;
  logic              web;
  logic [DATA_W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  stat_bram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] pattern(int a);
    return DATA_W'((a * 40503) ^ 16'h5A3C);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    web = 1'b0; addra = '0; addrb = '0; dinb = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addrb = 8'(a); dinb = pattern(a); web = 1'b1;
      shadow[a] = pattern(a);
    end
    @(negedge clk); web = 1'b0;
    // read back: douta holds mem[addra] one edge after addra is set
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addra = 8'(a);
      @(negedge clk);
      checks++;
      if (douta !== shadow[a]) begin
        failures++;
        $display("read %0d: got %h expected %h", a, douta, shadow[a]);
      end
    end
    // random concurrent traffic
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] ra, wa;
      logic [DATA_W-1:0] wd;
      @(negedge clk);
      wa = 8'($urandom);
      do ra = 8'($urandom); while (ra == wa);
      wd = DATA_W'($urandom);
      addrb = wa; dinb = wd; web = ($urandom % 2) == 0;
      addra = ra;
      @(posedge clk);
      #1;
      checks++;
      if (douta !== shadow[ra]) begin
        failures++;
        $display("random read %0d: got %h expected %h", ra, douta, shadow[ra]);
      end
      if (web) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
