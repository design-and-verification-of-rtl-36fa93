// tb_daisy_spi_top: end-to-end test of the two-slave daisy-chain SPI at its
// default parameters (8-bit words, SPI mode 0).
//
// Each transfer loads din, din1 and din2, raises start and waits for the
// result on the output words. The expected result is the ring
// rotation: dout1 = din, dout2 = din1, dout = din2. The testbench runs the
// three data sets from the published results (10110110/11001101/10010011,
// 1/10/11 and 182/138/7), then random words. Using only the top's ports, it
// also checks that the result arrives 9 falling sclk edges after start is
// raised (one edge to load, 8 to shift), that a held start gives only one
// transfer even when the input words change, and that a reset during a
// transfer stops it and clears the outputs. Each of these events is counted, and one that never happened
// counts as a failure.
`timescale 1ns/1ps
module tb_daisy_spi_top;
  localparam int W = 8;

  logic sclk = 1'b0;
  logic rst = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] din = '0, din1 = '0, din2 = '0;
  logic [W-1:0] dout, dout1, dout2;

  int checks = 0;
  int failures = 0;
  int n_transfers = 0, n_held_start = 0, n_reset_abort = 0, n_paper_sets = 0;
  int n_latency = 0;

  daisy_spi_top dut (
    .sclk(sclk), .rst(rst), .start(start),
    .din(din), .din1(din1), .din2(din2),
    .dout(dout), .dout1(dout1), .dout2(dout2)
  );

  always #5 sclk = ~sclk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One transfer. The master takes start on the first falling sclk edge
  // (mode 0 shift edge) and the result appears on the DATA_W-th falling edge
  // after that: W + 1 falling edges from raising start. The latency is
  // checked whenever every output word changes.
  task automatic transfer(input logic [W-1:0] a, input logic [W-1:0] b,
                          input logic [W-1:0] c, input bit hold_start);
    int edges;
    bit all_change;
    @(posedge sclk); #1;
    all_change = (dout1 != a) && (dout2 != b) && (dout != c);
    din = a; din1 = b; din2 = c; start = 1'b1;
    edges = 0;
    while (!(dout1 == a && dout2 == b && dout == c) && edges < 4 * W) begin
      @(negedge sclk);
      edges++;
      #1;
      if (!hold_start) start = 1'b0;
    end
    check(dout1 == a, $sformatf("dout1 %h expected din %h", dout1, a));
    check(dout2 == b, $sformatf("dout2 %h expected din1 %h", dout2, b));
    check(dout  == c, $sformatf("dout %h expected din2 %h", dout, c));
    if (all_change) begin
      check(edges == W + 1, $sformatf("result after %0d falling edges, expected %0d", edges, W + 1));
      n_latency++;
    end
    n_transfers++;
    if (hold_start) begin
      // New words on the inputs must not start a second transfer.
      #1 din = ~a; din1 = ~b; din2 = ~c;
      repeat (3 * W) @(posedge sclk);
      check(dout1 == a && dout2 == b && dout == c, "held start must not start another transfer");
      n_held_start++;
    end
    #1 start = 1'b0;
    @(posedge sclk);
  endtask

  initial begin
    repeat (3) @(posedge sclk);
    #1 rst = 1'b1;
    check(dout == '0 && dout1 == '0 && dout2 == '0, "outputs clear after reset");
    // Data sets of the published simulation results.
    transfer(8'b1011_0110, 8'b1100_1101, 8'b1001_0011, 1'b1); n_paper_sets++;
    transfer(8'd1, 8'd10, 8'd11, 1'b0);                       n_paper_sets++;
    transfer(8'd182, 8'd138, 8'd7, 1'b0);                     n_paper_sets++;
    for (int n = 0; n < 100; n++)
      transfer(W'($urandom), W'($urandom), W'($urandom), n % 5 == 0);
    // Reset in the middle of a transfer.
    @(posedge sclk); #1;
    din = 8'h5A; din1 = 8'hC3; din2 = 8'h0F; start = 1'b1;
    repeat (W / 2) @(posedge sclk);
    #1 rst = 1'b0; start = 1'b0;
    #1;
    check(dout == '0 && dout1 == '0 && dout2 == '0, "reset clears outputs");
    n_reset_abort++;
    @(posedge sclk); #1 rst = 1'b1;
    // After the aborted transfer nothing may arrive without a new start.
    repeat (2 * W) @(posedge sclk);
    check(dout == '0 && dout1 == '0 && dout2 == '0, "aborted transfer does not resume");
    transfer(8'h5A, 8'hC3, 8'h0F, 1'b0);

    check(n_transfers > 0, "no transfer happened");
    check(n_held_start > 0, "held start never exercised");
    check(n_reset_abort > 0, "reset during transfer never exercised");
    check(n_paper_sets == 3, "published data sets not all run");
    check(n_latency > 0, "latency never measured");
    $display("transfers=%0d held_start=%0d reset_abort=%0d paper_sets=%0d latency_checks=%0d",
             n_transfers, n_held_start, n_reset_abort, n_paper_sets, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
