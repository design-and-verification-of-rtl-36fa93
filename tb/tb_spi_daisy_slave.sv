// tb_spi_daisy_slave: self-checking test of one daisy-chain SPI slave.
//
// The testbench acts as the master and as the previous node of the ring.
// With cs high it raises start to load a random word into the slave, then
// pulls cs low on a falling sclk edge and drives sdi MSB first, changing it
// after each falling edge (mode 0). On every rising edge it records sdo.
// It checks that sdo carries the loaded word MSB first, that dout holds the
// word sent on sdi after 8 periods, and that with cs held low for two words
// the slave passes the first incoming word on during the second word, as a
// daisy-chain node must.
`timescale 1ns/1ps
module tb_spi_daisy_slave;
  localparam int W = 8;

  logic sclk = 1'b0;
  logic rst = 1'b0;
  logic start = 1'b0;
  logic cs = 1'b1;
  logic sdi = 1'b0;
  logic [W-1:0] din = '0;
  logic sdo;
  logic [W-1:0] dout;

  int checks = 0;
  int failures = 0;

  spi_daisy_slave #(.DATA_W(W)) dut (
    .sclk(sclk), .rst(rst), .start(start), .cs(cs), .sdi(sdi), .din(din),
    .sdo(sdo), .dout(dout)
  );

  always #5 sclk = ~sclk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Shift the top nwords words of in_bits into the slave in one cs-low frame,
  // MSB first, and return what appeared on sdo, left-aligned the same way.
  task automatic frame(input logic [W-1:0] own, input logic [2*W-1:0] in_bits,
                       input int nwords, output logic [2*W-1:0] out_bits);
    // load
    @(negedge sclk); #1;
    din = own; start = 1'b1;
    @(negedge sclk); #1;
    start = 1'b0;
    din = ~own;       // must not matter once loaded
    cs = 1'b0;
    out_bits = '0;
    for (int k = 0; k < nwords * W; k++) begin
      sdi = in_bits[2*W-1-k];
      @(posedge sclk);
      out_bits[2*W-1-k] = sdo;
      @(negedge sclk); #1;
    end
    cs = 1'b1;
  endtask

  initial begin
    logic [W-1:0] own, a, b;
    logic [2*W-1:0] got;
    repeat (2) @(posedge sclk);
    #1 rst = 1'b1;
    for (int n = 0; n < 40; n++) begin
      own = W'($urandom); a = W'($urandom);
      frame(own, {a, {W{1'b0}}}, 1, got);
      check(got[2*W-1:W] == own, $sformatf("sdo %h expected %h", got[2*W-1:W], own));
      check(dout == a, $sformatf("dout %h expected %h", dout, a));
    end
    // Two words in one frame: the slave forwards the first incoming word.
    for (int n = 0; n < 10; n++) begin
      own = W'($urandom); a = W'($urandom); b = W'($urandom);
      frame(own, {a, b}, 2, got);
      check(got == {own, a}, $sformatf("pass-through %h expected %h", got, {own, a}));
      check(dout == b, $sformatf("dout %h expected %h", dout, b));
    end
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
