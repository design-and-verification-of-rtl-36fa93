// tb_master_module: self-checking test of the daisy-chain SPI master alone.
//
// The testbench plays the rest of the ring. For each transfer it picks a
// random word for the master (din) and a random word for the last slave,
// watches cs, samples mosi on every rising sclk edge while cs is low (mode 0
// sample edge) and compares the bit stream with din, MSB first. It presents
// the slave word on miso MSB first, changing it after each falling edge, and
// checks that dout holds that word after cs rises, that cs stayed low for
// exactly 8 sclk periods, and that a held start does not start a second
// transfer. A reset in the middle of a transfer must return cs high.
`timescale 1ns/1ps
module tb_master_module;
  localparam int W = 8;

  logic sclk = 1'b0;
  logic rst = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] din = '0;
  logic miso = 1'b0;
  logic cs, mosi;
  logic [W-1:0] dout;

  int checks = 0;
  int failures = 0;

  master_module #(.DATA_W(W)) dut (
    .sclk(sclk), .rst(rst), .start(start), .din(din), .miso(miso),
    .cs(cs), .mosi(mosi), .dout(dout)
  );

  always #5 sclk = ~sclk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One transfer, master word m, last-slave word s.
  task automatic transfer(input logic [W-1:0] m, input logic [W-1:0] s,
                          input bit hold_start);
    logic [W-1:0] seen;
    int low_cycles;
    @(posedge sclk); #1;
    din = m; start = 1'b1; miso = s[W-1];
    wait (cs == 1'b0);
    low_cycles = 0;
    for (int i = W - 1; i >= 0; i--) begin
      @(posedge sclk);
      check(cs == 1'b0, "cs low while shifting");
      seen[i] = mosi;
      low_cycles++;
      @(negedge sclk); #1;
      if (i > 0) miso = s[i-1];
      if (!hold_start) start = 1'b0;
    end
    check(cs == 1'b1, "cs high after 8 periods");
    check(low_cycles == W, "cs low for exactly 8 periods");
    check(seen == m, $sformatf("mosi stream %b expected %b", seen, m));
    check(dout == s, $sformatf("dout %h expected %h", dout, s));
    // With start held, no new transfer may begin.
    repeat (4) begin
      @(posedge sclk);
      check(cs == 1'b1, "no repeat transfer while start held");
    end
    start = 1'b0;
    repeat (2) @(posedge sclk);
  endtask

  initial begin
    repeat (3) @(posedge sclk);
    #1 rst = 1'b1;
    check(cs == 1'b1, "cs high after reset");
    transfer(8'b1011_0110, 8'b1001_0011, 1'b1);
    for (int n = 0; n < 40; n++)
      transfer(W'($urandom), W'($urandom), n[0]);
    // Reset in the middle of a transfer.
    @(posedge sclk); #1 din = 8'hA5; start = 1'b1;
    wait (cs == 1'b0);
    repeat (3) @(posedge sclk);
    #1 rst = 1'b0;
    #1 check(cs == 1'b1, "reset aborts transfer");
    check(dout == '0, "reset clears dout");
    start = 1'b0;
    @(posedge sclk); #1 rst = 1'b1;
    transfer(8'h3C, 8'hC3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
