# Daisy-chain SPI: one master, two slaves

In an ordinary multi-slave SPI bus every slave needs its own chip-select line
from the master, and all slaves drive the one MISO wire. A daisy chain avoids
both. All slaves share a single chip select and the serial clock. The serial
data runs in a ring:

```
          +-------------------------------------------------+
          |                                                 |
 master --mosi--> slave 1 --miso1--> slave 2 --miso---------+--> master
   |                 |                  |
   +-- cs, sclk -----+------------------+   (shared by all nodes)
```

Every node is an 8-bit shift register, so the ring is one 24-bit shift
register. One transfer is 8 sclk periods long and moves each word one place
along the ring:

| node    | sends  | receives after one transfer |
|---------|--------|-----------------------------|
| master  | `din`  | `dout  = din2`              |
| slave 1 | `din1` | `dout1 = din`               |
| slave 2 | `din2` | `dout2 = din1`              |

For example, `din=10110110`, `din1=11001101`, `din2=10010011` give
`dout=10010011`, `dout1=10110110`, `dout2=11001101`.

## Files

| file | contents |
|------|----------|
| `rtl/spi_daisy_pkg.sv` | master state type; maps an SPI mode to its sampling edge |
| `rtl/master_module.sv` | master: start handling, chip select, shift register, result register |
| `rtl/spi_daisy_slave.sv` | slave: load, shift, word counter, result register (used for both slaves) |
| `rtl/daisy_spi_top.sv` | the ring: master `mas1`, slaves `s1` and `s2` |
| `tb/tb_master_module.sv` | master alone, with the testbench playing the rest of the ring |
| `tb/tb_spi_daisy_slave.sv` | one slave alone, with the testbench playing the master |
| `tb/tb_daisy_spi_top.sv` | whole ring at its default parameters |
| `tb/tb_daisy_spi_modes.sv` | whole ring in each of the four SPI modes |

## Top-level interface (`daisy_spi_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `sclk` | in | 1 | serial clock; the only clock in the design |
| `rst` | in | 1 | asynchronous reset, **active low** |
| `start` | in | 1 | starts one transfer |
| `din`, `din1`, `din2` | in | `DATA_W` | words sent by the master, slave 1 and slave 2 |
| `dout`, `dout1`, `dout2` | out | `DATA_W` | words received by the master, slave 1 and slave 2 |

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W` | 8 | word width of every node |
| `SPI_MODE` | 0 | SPI mode 0..3. It selects which sclk edge samples data and which shifts it |

The chip select (`cs`) and the three serial links (`mosi`, `miso1`, `miso`)
are internal nets of the top.

## How a transfer runs

The hard part of this design is the timing. Each node does its work on the
two edges of sclk:

* On the **sample edge** each node copies its serial input into a one-bit
  register `rx`. It does this only while `cs` is low.
* On the **shift edge** each node shifts its register left and puts `rx` in
  the LSB. Its serial output is always the register's MSB, so data goes
  MSB first.

Splitting the work like this means every node samples a stable bit, half a
period after the previous node changed it. That holds however many nodes are
in the ring.

| `SPI_MODE` | sample edge | shift edge |
|------------|-------------|------------|
| 0, 3 | rising | falling |
| 1, 2 | falling | rising |

Internally the sample edge is the rising edge of `clk_s`. `clk_s` is either
sclk or its inverse, chosen by the parameter.

A transfer in mode 0, counting falling (shift) edges after `start` rises:

1. **Edge 1.** The master is idle and sees `start`. It loads `din`, clears
   its bit counter and drives `cs` low. On the same edge both slaves see
   `cs` still high and `start` high, and load `din1` and `din2`. Every MSB is
   now on its link.
2. **Rising edges 1..8.** Every node samples its input bit.
3. **Falling edges 2..9.** Every node shifts. On the 8th shift (edge 9):
   * the master stores its received word in `dout` and raises `cs`;
   * each slave's own word counter reaches 8, and the slave stores its word
     in `dout1` or `dout2`.

`cs` is low for exactly `DATA_W` sclk periods. The results appear
`DATA_W + 1` shift edges after `start` is raised, and all three change on the
same edge.

After a transfer the master waits in a DONE state until `start` is low, so a
held `start` gives exactly one transfer. `start` may be a pulse of at least
one sclk period, or a level. While `cs` is high and `start` is high, the
slaves keep reloading their `din`. This is harmless, since nothing shifts
then.

A slave counts words, not transfers: if `cs` were held low for 16 periods,
each slave would pass the first word it received on to the next node. This
is normal daisy-chain behaviour. With this master, `cs` is always low for
exactly one word.

Reset (`rst` low) is asynchronous. It clears every register and the outputs
and returns the master to idle with `cs` high, including in the middle of a
transfer. An aborted transfer does not resume.

## Where this RTL makes its own choices

The ring structure, the shared chip select, the 8-bit width, the port and
instance names, and the rotation result above are those of the design being
implemented. The following are choices of this implementation:

* **SPI mode.** The design names the four standard SPI modes but does not say
  which one it uses. The default here is mode 0, and `SPI_MODE` selects
  another. sclk runs freely and is the system clock, so the idle clock level
  (CPOL) has no separate effect: a mode only decides which edge samples and
  which shifts. Modes are mapped by their usual numbering: modes 0 and 3
  sample on the rising edge, modes 1 and 2 on the falling edge.
* **Reset** is active low and asynchronous. The reference waveform shows
  `rst = 1` while results are on the outputs.
* **MSB first.** After a whole word, the received words do not depend on bit
  order.
* **Master sequencer** with three states, IDLE, XFER and DONE, and a
  registered chip select.
* **Slave loading** on a shift edge when `cs` is high and `start` is high.
* **Result registers.** The `dout` outputs change only when a word is
  complete, never during shifting.
* **Slave outputs** are always driven. Each serial output has exactly one
  receiver, so no tri-state is needed.
* **One slave module** serves as both slave 1 and slave 2. The two differ
  only in which nets their ports connect to.

The ring has two slaves. To lengthen it, add `spi_daisy_slave` instances
between `miso1` and `miso`. After one transfer each node then holds the word
of the node before it.

## Checking it

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/spi_daisy_pkg.sv tb/tb_daisy_spi_top.sv --top-module tb_daisy_spi_top
./obj_dir/Vtb_daisy_spi_top
```

What each testbench covers:

* **`tb_daisy_spi_top`** runs the ring with all parameters at their
  defaults, using only the top's ports:
  * the three reference data sets (`10110110/11001101/10010011`, `1/10/11`
    and `182/138/7`), then 100 random transfers;
  * the `DATA_W + 1` edge latency;
  * that a held `start` does not repeat the transfer, even when the input
    words change;
  * a reset in the middle of a transfer.

  It counts each of these events and fails if one never happens.
* **`tb_daisy_spi_modes`** runs four rings side by side, one per SPI mode.
  It checks their results, and checks that `mosi` changes only on the shift
  edge of each mode.
* **`tb_master_module`** checks the master's bit stream on `mosi` bit by
  bit, the received word, that `cs` is low for exactly 8 periods, and the
  behaviour of held `start` and of reset.
* **`tb_spi_daisy_slave`** checks the slave's output stream, the received
  word, and the pass-through of a second word when `cs` is held low.

The design has 64 flip-flops at the default size.
