# Four-channel DMA controller with a descriptor buffer

A CPU that uses a plain DMA controller must program source, destination and
control registers before every transfer. This controller removes most of that
work. The CPU writes a whole *task table* of transfers into a descriptor
buffer ahead of time, then raises a single `mode` pin. The controller
works through the table on its own. It hands each descriptor to one of four
channels in rotating-priority order. Each channel copies a burst of data from
its source to its destination through a private FIFO. When the table is done
the controller drops `busy`.

The four channels have different data widths (16, 64, 64 and 128 bits), so
narrow and wide devices each get a channel of their own. They share one
16-bit address output.

## Operating modes

| `mode` | name | what happens |
|---|---|---|
| 0 | descriptor transfer | while `wr` = 1, one 16-bit word on `din` is stored per clock into the descriptor buffer |
| 1 | data transfer | the controller executes the stored descriptors; `busy` = 1 until all are done |

**Table format.** A descriptor is a pair of 16-bit addresses: source, then
destination. The words go in as `src0, dst0, src1, dst1, ...`. Up to 16
descriptors are kept; further words are dropped. An odd last word (a source
with no destination) is not counted.

**Starting and finishing.** Raising `mode` is the CPU's request. `busy` rises
in the same cycle as an acknowledgement. The controller keeps a count of the
descriptors it has not yet handed out. When that count is zero and every
channel is idle, `busy` falls. That falling edge is the completion signal;
there is no separate interrupt pin. Lowering `mode` afterwards empties the
table, so the next table starts again at entry 0. `wr` is ignored in mode 1.

## How a descriptor is executed

```
         mode,wr,din           +-----------------+      add(15:0)
 CPU  ------------------------>|  control unit   |<---- address generator <--+
         busy  <---------------|  + descriptor   |                           |
                               |    buffer (16)  |--src/dst--+               |
                               +-----------------+           |               |
                                     avail / take            v               |
          rq0..3 / grant0..3   +-----------------+    +--------------+       |
        <--------------------->| rotating arbiter|<-->| channel 0..3 |--addr-+
                               +-----------------+    | src/dst regs |
                                                      | FIFO 16 deep |
                                  dinI --> rdI ------>|              |--> doutI, wrI
                                                      +--------------+
```

1. An idle channel raises `rq` while the table still has descriptors.
2. The arbiter grants one requester. In the grant cycle that channel copies
   the offered descriptor into its source and destination registers. It
   pulses `take`, and the control unit moves to the next entry.
3. **Read phase, 16 cycles.** `rdI` = 1 and `add` = source address. The word
   on `dinI` is written into the channel FIFO at the clock edge. The source
   address then increments by one.
4. **Write phase, 16 cycles.** `wrI` = 1 and `add` = destination address.
   `doutI` carries the oldest FIFO word. The destination must take it at the
   clock edge. The destination address then increments by one.
5. The channel drops `rq` for one cycle. The arbiter frees the grant and
   serves the next channel.

A descriptor therefore moves 16 words: one full FIFO. It keeps `busy` high
for exactly 35 clocks: 2 to grant and copy, 16 to read, 16 to write and 1 to
hand over. The source is assumed to have no wait states: data must be
valid on `dinI` in the same cycle as `rdI` and `add`. Outside its write
phase a channel drives `doutI` = 0. When no channel is moving data, `add` is 0.

Only one channel moves data at a time, because all channels share `add`.
"Four channels" therefore means four independently sized data paths that
take turns, not four transfers at once.

## Rotating priority

The starting priority order is ch0 > ch1 > ch2 > ch3. When channel *k* is
granted, channel *k+1* (mod 4) becomes the highest priority and *k* the
lowest. If every channel keeps asking, descriptor *n* of a table therefore
runs on channel `n mod 4` counted from the last channel served. After reset
the order is ch0, ch1, ch2, ch3, ch0, and so on. The table's order of
descriptors is kept. Which channel (and so which data width) a descriptor
gets depends on the rotation, not on the descriptor. The table format has
no field to pick a channel.

The arbiter holds a grant for as long as the granted channel holds `rq`. The
grant is removed one cycle after `rq` falls, and a new winner is chosen in
the following cycle.

## Pins of `dma_main`

| pin | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | clock; every flop uses the rising edge |
| `rst_n` | in | 1 | synchronous active-low reset |
| `mode` | in | 1 | 0 descriptor transfer, 1 data transfer / request |
| `wr` | in | 1 | descriptor write enable (mode 0) |
| `din` | in | 16 | descriptor word |
| `din0`..`din3` | in | 16, 64, 64, 128 | source data of channel 0..3 |
| `add` | out | 16 | source or destination address of the moving channel |
| `dout0`..`dout3` | out | 16, 64, 64, 128 | destination data of channel 0..3 |
| `busy` | out | 1 | table being executed |
| `rd0`..`rd3` | out | 1 | channel I reads its source this cycle |
| `wr0`..`wr3` | out | 1 | channel I writes its destination this cycle |

## Sources

| file | content |
|---|---|
| `rtl/dma_pkg.sv` | sizes (channel widths, depths, burst length) and the channel state type |
| `rtl/dma_main.sv` | top level: wires everything below together |
| `rtl/dma_control_unit.sv` | mode/`wr` decoding, table write and read pointers, descriptor count, `busy` |
| `rtl/dma_descriptor_buffer.sv` | 16-entry two-port store of source/destination pairs |
| `rtl/dma_rotating_arbiter.sv` | registered rotating-priority arbiter |
| `rtl/dma_channel.sv` | channel registers, read/write sequencer and FIFO |
| `rtl/dma_fifo.sv` | single-clock, first-word-fall-through FIFO |
| `rtl/dma_address_generator.sv` | selects the moving channel's address for `add` |

All sizes are parameters of `dma_main` (`AW`, `CH0_W`..`CH3_W`, `FIFO_DEPTH`,
`DESC_DEPTH`, `BURST_LEN`). `BURST_LEN` must lie between 2 and `FIFO_DEPTH`;
an elaboration-time assertion checks this. Concurrent assertions check the
protocol rules in simulation:
- the grant is one-hot;
- at most one channel drives the bus;
- a FIFO never overflows or underflows;
- a `take` happens only while a descriptor is available.

After synthesis the controller has about 220 flip-flops and 4,864 memory
bits: 4,352 in the four FIFOs and 512 in the descriptor buffer.

## Where this design makes its own choices

The controller's structure is fixed: four channels with 16/64/64/128-bit
data paths, 16-word FIFOs, a 16-entry descriptor buffer, rotating priority
starting at ch0, and auto-incrementing 16-bit addresses. So is its pin list.
The following points are this implementation's own choices:

- **Burst length.** Each descriptor moves 16 words, the FIFO depth. The table
  format has no length field.
- **Bus timing.** Zero-wait-state, one word per clock, data sampled at the
  clock edge.
- **FIFO clocking.** The FIFOs are synchronous. Bursty devices are often
  given dual-clock FIFOs, but this controller has only one clock pin.
- **Address step.** Addresses count words, so the step is 1.
- **Reset.** `rst_n` is an addition to the pin list.
- **`busy`.** It falls on completion, as described above.
- **Table handling.** Returning to mode 0 clears the table, and words past 16
  entries are dropped.
- **Bus layer.** No bus-protocol layer (for example AHB) sits between the
  channels and the devices. The channel pins are the device interface.

## Simulating

Each testbench in `tb/` checks its own results. At the end it prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_dma_main \
    rtl/dma_pkg.sv tb/tb_dma_main.sv
./obj_dir/Vtb_dma_main
```

| testbench | what it checks |
|---|---|
| `tb_dma_main` | the whole controller at its default sizes, see below |
| `tb_dma_channel` | a 64-bit channel against a scripted arbiter and memories, including address wrap-around at 0xFFFF |
| `tb_dma_rotating_arbiter` | the ch0→ch1→ch2→ch3→ch0 order and grant period, then random traffic against a reference model |
| `tb_dma_control_unit` | table writes (odd lengths, overflow), descriptor hand-out, `busy` timing, table clear |
| `tb_dma_descriptor_buffer` | half-entry writes and independent read/write ports |
| `tb_dma_fifo` | random push/pop against a queue model, full and empty |
| `tb_dma_address_generator` | address selection and idle value |

`tb_dma_main` uses no parameter overrides. It acts as the CPU and as the
memories of all four channels. It runs four tables:
- a single descriptor after reset, which uses channel 0 only;
- four descriptors, one on each channel;
- six descriptors, so the rotation wraps from ch3 to ch0;
- twenty descriptors, of which only the first 16 are kept.

For every clock it predicts the channel, direction, address and data on the
bus and compares them with the outputs. It also checks the 35-cycle budget
per descriptor. The whole run takes about 1,000 clocks.

To change a size, override the parameter on `dma_main`. To give descriptors
a programmable length, add a third word to each table entry in
`dma_control_unit`/`dma_descriptor_buffer`. Then load it into the channel's
beat counter in place of `BURST_LEN`.
