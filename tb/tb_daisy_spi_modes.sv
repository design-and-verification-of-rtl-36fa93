// tb_daisy_spi_modes: the two-slave daisy-chain SPI in all four SPI modes.
//
// Four copies of the top, one per SPI_MODE, get the same inputs and run the
// same random transfers; each must end with the ring rotation
// dout1 = din, dout2 = din1, dout = din2. The testbench also checks the edge
// discipline of each mode on the master's mosi line: in modes 0 and 3 it may
// change only on falling sclk edges (data shifted on the falling edge,
// sampled on the rising edge), in modes 1 and 2 only on rising edges.
`timescale 1ns/1ps
module tb_daisy_spi_modes;
  localparam int W = 8;

  logic sclk = 1'b0;
  logic rst = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] din = '0, din1 = '0, din2 = '0;
  logic [W-1:0] dout [4], dout1 [4], dout2 [4];
  logic [3:0] cs_all, mosi_all;

  int checks = 0;
  int failures = 0;
  int mosi_changes [4] = '{0, 0, 0, 0};

  for (genvar m = 0; m < 4; m++) begin : g_mode
    daisy_spi_top #(.DATA_W(W), .SPI_MODE(m)) dut (
      .sclk(sclk), .rst(rst), .start(start),
      .din(din), .din1(din1), .din2(din2),
      .dout(dout[m]), .dout1(dout1[m]), .dout2(dout2[m])
    );
    assign cs_all[m]   = dut.cs;
    assign mosi_all[m] = dut.mosi;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mosi may only change on the mode's shift edge.
  logic [3:0] mosi_q = '0;
  always @(posedge sclk or negedge sclk) begin
    #1;
    for (int m = 0; m < 4; m++) begin
      if (rst && mosi_all[m] != mosi_q[m]) begin
        mosi_changes[m]++;
        checks++;
        if (sclk == ((m == 0 || m == 3) ? 1'b1 : 1'b0)) begin
          failures++;
          $display("FAIL: mode %0d mosi changed on the sample edge", m);
        end
      end
    end
    mosi_q = mosi_all;
  end

  initial begin
    repeat (3) #10;
    #2 rst = 1'b1;
    for (int n = 0; n < 60; n++) begin
      #10;
      din = W'($urandom); din1 = W'($urandom); din2 = W'($urandom);
      start = 1'b1;
      #20 start = 1'b0;
      wait (cs_all == 4'hF);
      #2;
      for (int m = 0; m < 4; m++) begin
        check(dout1[m] == din,  $sformatf("mode %0d dout1 %h expected %h", m, dout1[m], din));
        check(dout2[m] == din1, $sformatf("mode %0d dout2 %h expected %h", m, dout2[m], din1));
        check(dout[m]  == din2, $sformatf("mode %0d dout %h expected %h", m, dout[m], din2));
      end
    end
    for (int m = 0; m < 4; m++)
      check(mosi_changes[m] > 0, $sformatf("mode %0d mosi never toggled", m));
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

  always #5 sclk = ~sclk;
endmodule
