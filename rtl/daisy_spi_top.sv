// daisy_spi_top: daisy-chain SPI with one master and two slaves.
//
// A daisy chain needs one chip select however many slaves there are: all
// slaves share cs and sclk, and the serial data runs in a ring. The master's
// mosi feeds slave 1, slave 1's output (miso1) feeds slave 2, and slave 2's
// output is the master's miso. Each node is a DATA_W-bit shift register, so
// one transfer of DATA_W sclk periods rotates every word one place along the
// ring: afterwards dout1 = din (master to slave 1), dout2 = din1 (slave 1 to
// slave 2) and dout = din2 (slave 2 back to the master).
//
// Interface: sclk is the only clock; rst is an asynchronous active-low reset;
// a start (pulse or level) starts one transfer, and start must be low once
// before the next transfer. din, din1, din2 are the words the master, slave 1
// and slave 2 send; dout, dout1, dout2 the words they received. The instance
// names (mas1, s1, s2), ports and ring wiring follow the published schematic
// of the design; SPI_MODE and the reset polarity are this implementation's
// choices (mode 0 by default).
module daisy_spi_top #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned SPI_MODE = 0
) (
  input  logic              sclk,
  input  logic              rst,
  input  logic              start,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] din1,
  input  logic [DATA_W-1:0] din2,
  output logic [DATA_W-1:0] dout,
  output logic [DATA_W-1:0] dout1,
  output logic [DATA_W-1:0] dout2
);

  logic cs;     // shared chip select, active low
  logic mosi;   // master -> slave 1
  logic miso1;  // slave 1 -> slave 2
  logic miso;   // slave 2 -> master

  master_module #(.DATA_W(DATA_W), .SPI_MODE(SPI_MODE)) mas1 (
    .sclk (sclk),
    .rst  (rst),
    .start(start),
    .din  (din),
    .miso (miso),
    .cs   (cs),
    .mosi (mosi),
    .dout (dout)
  );

  spi_daisy_slave #(.DATA_W(DATA_W), .SPI_MODE(SPI_MODE)) s1 (
    .sclk (sclk),
    .rst  (rst),
    .start(start),
    .cs   (cs),
    .sdi  (mosi),
    .din  (din1),
    .sdo  (miso1),
    .dout (dout1)
  );

  spi_daisy_slave #(.DATA_W(DATA_W), .SPI_MODE(SPI_MODE)) s2 (
    .sclk (sclk),
    .rst  (rst),
    .start(start),
    .cs   (cs),
    .sdi  (miso1),
    .din  (din2),
    .sdo  (miso),
    .dout (dout2)
  );

endmodule
