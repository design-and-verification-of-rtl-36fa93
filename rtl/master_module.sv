// master_module: master of a daisy-chain SPI ring.
//
// When start is seen with the master idle, it loads din into its shift
// register and pulls the shared chip select cs low. While cs is low every
// sclk period moves one bit: the master samples miso (the output of the last
// slave in the chain) on the sample edge and shifts its register left on the
// shift edge, so mosi always carries the register's MSB (MSB first). After
// DATA_W shift edges cs goes high again and the received word, which is the
// word the last slave sent, is stored in dout. The master then waits for
// start to be released before it accepts a new start, so one start pulse or
// one held start gives exactly one transfer.
//
// Timing (mode 0): cs falls on a falling sclk edge, stays low for exactly
// DATA_W sclk periods and rises on the falling edge of the last shift; dout
// is valid from that edge on.
//
// Interface: sclk is the only clock, rst is an asynchronous active-low reset,
// SPI_MODE (0..3) selects the sample and shift edges as in the usual SPI mode
// table. The port list follows the published block diagram of the design; the
// word width of 8, the shared chip select and the ring order come from the
// design description. Which SPI mode is used, MSB-first order, the idle/busy/
// done sequencer and the active-low reset are choices of this implementation.
module master_module
  import spi_daisy_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned SPI_MODE = 0
) (
  input  logic              sclk,
  input  logic              rst,
  input  logic              start,
  input  logic [DATA_W-1:0] din,
  input  logic              miso,
  output logic              cs,
  output logic              mosi,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned CNT_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(DATA_W - 1);

  // Sample edge is the rising edge of clk_s, shift edge its falling edge.
  logic clk_s;
  assign clk_s = sample_on_rise(SPI_MODE) ? sclk : ~sclk;

  master_state_t     state;
  logic [DATA_W-1:0] shreg;
  logic [CNT_W-1:0]  cnt;
  logic              rx;

  // Sample edge: capture the bit arriving from the last slave.
  always_ff @(posedge clk_s or negedge rst) begin
    if (!rst)     rx <= 1'b0;
    else if (!cs) rx <= miso;
  end

  // Shift edge: sequencer, shift register and chip select.
  always_ff @(negedge clk_s or negedge rst) begin
    if (!rst) begin
      state <= ST_IDLE;
      shreg <= '0;
      cnt   <= '0;
      cs    <= 1'b1;
      dout  <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            shreg <= din;
            cnt   <= '0;
            cs    <= 1'b0;
            state <= ST_XFER;
          end
        end
        ST_XFER: begin
          shreg <= {shreg[DATA_W-2:0], rx};
          cnt   <= cnt + 1'b1;
          if (cnt == LAST) begin
            dout  <= {shreg[DATA_W-2:0], rx};
            cs    <= 1'b1;
            state <= ST_DONE;
          end
        end
        ST_DONE: begin
          if (!start) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign mosi = shreg[DATA_W-1];

  // Chip select is low exactly while a word is being shifted.
  a_cs_matches_state: assert property (@(negedge clk_s) disable iff (!rst)
    (cs == (state != ST_XFER)));
  a_cnt_in_range: assert property (@(negedge clk_s) disable iff (!rst)
    (cnt <= LAST));

  initial begin
    if (DATA_W < 2) $error("master_module: DATA_W must be at least 2");
    if (SPI_MODE > 3) $error("master_module: SPI_MODE must be 0..3");
  end

endmodule
