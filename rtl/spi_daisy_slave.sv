// spi_daisy_slave: one slave (subnode) of a daisy-chain SPI ring.
//
// While the shared chip select cs is high the slave is idle; if start is
// high on a shift edge it loads din into its shift register. While cs is low
// every sclk period moves one bit: the slave samples sdi (the output of the
// previous node) on the sample edge and shifts its register left on the shift
// edge, so sdo carries the register's MSB (MSB first) to the next node. A bit
// counter, cleared while cs is high, stores the register in dout at every
// DATA_W-th shift: after one word-long transfer dout holds the word the
// previous node sent. If cs stays low for longer, the slave keeps passing the
// data on, one word every DATA_W periods, as a daisy-chain device does.
//
// The same module serves as slave 1 (sdi = mosi, sdo = miso1) and slave 2
// (sdi = miso1, sdo = miso) of the two-slave chain.
//
// Timing (mode 0): bits are sampled on rising sclk edges and shifted on
// falling edges; dout changes on the falling edge of the DATA_W-th shift.
//
// Interface: sclk is the only clock, rst an asynchronous active-low reset,
// SPI_MODE (0..3) selects the sample and shift edges. The ports, the 8-bit
// width and the chain order follow the design description; loading din on
// start while cs is high, MSB-first order, the byte counter and the
// always-driven sdo (no tri-state when deselected) are this implementation's
// choices.
module spi_daisy_slave
  import spi_daisy_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned SPI_MODE = 0
) (
  input  logic              sclk,
  input  logic              rst,
  input  logic              start,
  input  logic              cs,
  input  logic              sdi,
  input  logic [DATA_W-1:0] din,
  output logic              sdo,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned CNT_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(DATA_W - 1);

  // Sample edge is the rising edge of clk_s, shift edge its falling edge.
  logic clk_s;
  assign clk_s = sample_on_rise(SPI_MODE) ? sclk : ~sclk;

  logic [DATA_W-1:0] shreg;
  logic [CNT_W-1:0]  cnt;
  logic              rx;

  always_ff @(posedge clk_s or negedge rst) begin
    if (!rst)     rx <= 1'b0;
    else if (!cs) rx <= sdi;
  end

  always_ff @(negedge clk_s or negedge rst) begin
    if (!rst) begin
      shreg <= '0;
      cnt   <= '0;
      dout  <= '0;
    end else if (cs) begin
      cnt <= '0;
      if (start) shreg <= din;
    end else begin
      shreg <= {shreg[DATA_W-2:0], rx};
      cnt   <= (cnt == LAST) ? '0 : cnt + 1'b1;
      if (cnt == LAST) dout <= {shreg[DATA_W-2:0], rx};
    end
  end

  assign sdo = shreg[DATA_W-1];

  initial begin
    if (DATA_W < 2) $error("spi_daisy_slave: DATA_W must be at least 2");
    if (SPI_MODE > 3) $error("spi_daisy_slave: SPI_MODE must be 0..3");
  end

endmodule
