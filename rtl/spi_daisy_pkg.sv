// spi_daisy_pkg: types and helpers shared by the daisy-chain SPI master,
// slave and top.
//
// SPI modes follow the usual mode numbers: modes 0 and 3 sample data on the
// rising edge of sclk and shift it out on the falling edge, modes 1 and 2
// sample on the falling edge and shift on the rising edge. Because sclk is a
// free-running clock in this design, the idle level (CPOL) has no effect of
// its own; the mode only selects which edge samples and which edge shifts.
package spi_daisy_pkg;

  // Master sequencer states: waiting for start, shifting one word round the
  // ring, and holding the result until start is released.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_XFER = 2'd1,
    ST_DONE = 2'd2
  } master_state_t;

  // True when the given SPI mode samples on the rising edge of sclk.
  function automatic logic sample_on_rise(input int unsigned mode);
    return (mode == 0) || (mode == 3);
  endfunction

endpackage
