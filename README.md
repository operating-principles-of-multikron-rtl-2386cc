# MULTIKRON: single-chip performance instrumentation for MIMD nodes

MULTIKRON is a measurement chip that sits on the memory bus of one node of a
multiprocessor. The node may hold up to eight processors. It serves two kinds of measurement:

* **Event tracing.** Instrumented software writes a 48-bit event identifier to one of the
  chip's trigger addresses. The chip turns that single store into a timestamped *trace
  sample*, which records:
  * which of the eight CPUs wrote it;
  * which process that CPU was running;
  * a 40-bit global time.

  Samples go out on a private byte-wide collection network, so the machine's own data
  paths are never used and the cost to the program is one store instruction.
* **Resource utilisation.** Sixteen 32-bit *resource counters* each count one of four
  sources:
  * node clocks;
  * a slow clock;
  * rising edges on a pin of their own;
  * software writes.

  A *resource sample* is a trace sample with a snapshot of all sixteen counters appended.
  It takes 80 bytes instead of 16. The processors can also read the counters directly.

The low four bits of the trigger address select one of sixteen *filter levels*. A
run-time Filter register decides which levels produce samples. Code can therefore stay
instrumented everywhere and report only what a given experiment needs.

This repository holds synthesizable SystemVerilog for the whole digital chip at the
configuration it was built in: a 64-bit processor bus, K = 16 counters and N = 8 CPUs. It
also holds self-checking testbenches for every block and for the chip as a whole.

## Block structure

```
                     processor bus (addr[6:0], data 64, rd_n, wr_n, rdy_n)
                                   |
                              mk_bus_if ---- op_* ----+---------------------------+
                                                      | register decode, read mux |
   ts_clk -> mk_timestamp (56 b) --ts_tick--> mk_slowclk (/10 or /100)             |
                 | 40 b                              | slow_tick                   |
   cpu_id[7:0] -> mk_cpuid_enc -> mk_src_addr (8x32) |                             |
                 |                 | 32 b            v                             |
                 +------> mk_sample_ctrl <--- mk_csr (CSR, Filter)                 |
                             | 129 b word        mk_res_ctrl (MUX SEL/EN/RESET)    |
                             v                        |                            |
                          mk_fifo (4 x 129)   ext_in -> mk_res_counters (16 x 32)  |
                             |                        | take / counter reads       |
                             v                        v                            |
                          mk_net_if <------------ mk_shadow (16 x 32, busy)        |
                             |                                                     |
      net_clk, net_data, net_parity, net_eom, load_ext_fifo_n / ext_fifo_free      |
                                                                                   |
                          mk_err_counters (wait, overrun)   mk_test_reg (48 b) ----+
```

`multikron.sv` is the top. It holds the address decode and the read multiplexer, and
wires the blocks above together. `mk_pkg.sv` holds the register offsets, the sample
layouts and the encodings.

## How a sample is made

A processor write to offsets 96..127 is a trigger:

| address bits | 6 | 5:4                                  | 3:0          |
|--------------|---|--------------------------------------|--------------|
| meaning      | 1 | `10` trace sample, `11` resource sample | filter level |

The CPU that made the write drives one of the eight `cpu_id` lines. The chip then
assembles the 128-bit trace sample below. It is sent as 16 bytes, header first:

| bits    | field | contents |
|---------|-------|----------|
| 127:120 | header | CPU ID (3 bits), class (`10` trace / `11` resource), FIFO overrun, shadow overrun, read error |
| 119:80  | timestamp | low 40 bits of the 56-bit timestamp counter |
| 79:48   | source | the source address register of the writing CPU (node.process identity, kept up to date by the operating system) |
| 47:0    | user data | `data_i[47:0]` of the trigger write |

The word goes into a four-entry FIFO with a 129th bit that says whether resource data
follows. For a resource sample, all sixteen counters are copied at the same instant
into the single rank of **shadow registers**. The counters then keep counting while the
snapshot waits to be sent.

## Overruns and waits

This is the part of the chip that needs the most care. Two buffers can be full when a
new request arrives:

* The **trace FIFO** (4 entries) is full when the network falls behind.
* The **shadow registers** (one rank) stay busy from the moment a resource sample is
  accepted until its last byte has gone out. That is 80 network clocks, or 160 node
  clocks.

Two CSR mode bits decide what happens then:

| request | buffer free | buffer full, wait mode off | buffer full, wait mode on |
|---------|-------------|---------------------------|---------------------------|
| trace trigger | sample queued | sample dropped, FIFO-overrun flag set, overrun counter +1 | RDY held back until the FIFO has room, wait counter +1 per clock |
| resource trigger | snapshot taken, sample queued | dropped, shadow-overrun flag (and FIFO flag if the FIFO was full), overrun counter +1 | RDY held back until both are free |
| counter read (offsets 32..47) | counters copied to the shadow, selected one returned, bit 63 = 0 | the busy shadow's stale value returned at once with **bit 63 = 1** | RDY held back until the shadow frees, then a fresh copy, bit 63 = 0 |

"Wait mode" means CSR bit 2, *write wait on overrun*, for triggers, and CSR bit 4, *read
wait*, for counter reads.

* **Sticky overrun flags.** The flags are visible in CSR bits 8 and 9. They are copied
  into the header of the next sample that is accepted, then cleared. A gap in the trace
  therefore shows up in the data itself.
* **Read-error bit.** The header's read-error bit is always 0. A counter read is one
  indivisible bus operation, and the chip clears its own error indication before that
  operation ends.
* **Counter read with a free shadow.** The read still passes through the shadow
  registers. It costs one extra clock (copy, then return), and it does not leave the
  shadow busy.
* **Filtered triggers.** A trigger whose filter bit is 0, or one that arrives while
  sampling is disabled (CSR bit 0), is finished at once. It has no side effects.

## Resource counters

MUX SEL (offset 8) is 64 bits wide. Counter *i*'s two-bit source field is split across
the two halves: bit *i* is the LSB and bit 32+*i* the MSB. The fields are:

| field | source |
|-------|--------|
| `00` | slow clock: one tick per 10 (CSR bit 15, 1 µs) or 100 (CSR bit 14, 10 µs) timestamp clocks |
| `01` | rising edges on the counter's own `ext_in` pin |
| `10` | software: a processor write to the counter's address |
| `11` | every node clock |

Three more registers control the counters:

* **Enable** (offset 11) sets enable bits where a one is written.
* **Disable** (offset 12) clears them where a one is written.
* **Reset** (offset 10) clears counters where a one is written. It is self-clearing.

Zeros in a write to any of the three leave bits alone. Different pieces of software can
therefore manage disjoint sets of counters without interfering with each other.

A counter sticks at `FFFF_FFFF`; it never wraps. A 50 MHz source fills one in about 86
seconds.

External pins may carry rising edges as fast as the node clock. Each pin clocks a
3-bit Gray-code edge counter of its own. Its value is synchronised into the node clock
domain, and the number of new edges since the previous node clock is added. An edge
therefore shows up in the count three node clocks after it happens.

## Collection network output

Samples leave on a synchronous byte-wide link:

* `net_clk` runs at half the node clock.
* Each network clock carries one 10-bit element:
  * `net_data[7:0]`;
  * `net_parity`, odd parity over the data byte;
  * `net_eom`, high on the last byte of a sample.
* The sample bytes are sent in order:
  1. the 16 trace bytes, most significant first;
  2. for a resource sample, the 64 counter bytes, counter 0 first and each counter most
     significant byte first.

Handshake:

* **`ext_fifo_free`** (input, high = receiver can take data) is sampled on the node clock
  edge that raises `net_clk`.
* **`load_ext_fifo_n`** (output, active low) marks a network clock whose byte the
  receiver must take on the next rising `net_clk`. It is only asserted if
  `ext_fifo_free` was high at the previous rising edge.

Data, flags and `load_ext_fifo_n` change on the node clock edge that lowers `net_clk`.
They are therefore stable for a full node clock period (20 ns at 50 MHz) before the
receiving edge.

At 50 MHz the link moves 25 Mbyte/s. That is 1.56 million trace samples/s (32 node
clocks each) or 0.31 million resource samples/s (160 node clocks each).
`tb_mk_throughput` measures both.

## Processor interface and register map

All signals are sampled on the rising edge of `clk`, the 50 MHz node clock.

Strobes:

* `rd_n` and `wr_n` are active low. The external base-address decoder asserts them only
  when the chip is addressed.
* The chip answers with `rdy_n`, also active low. It falls two clocks after a strobe is
  first sampled, plus:
  * the 0..3 wait states strapped on `ws_pins` during hardware reset;
  * one clock for a counter read;
  * any overrun waits.
* `rdy_n` and, for reads, `data_o`/`data_oe` stay asserted until the strobe is released.

Unused read bits are 0 and unused write bits are ignored. The data bus is split into
`data_i`, `data_o` and `data_oe` for the external tri-state pads.

| offset | write | read |
|--------|-------|------|
| 0 | software reset (everything except timestamp and wait-state straps) | 0 |
| 1 | CSR commands: bit pairs 0/1 sampling on/off, 2/3 write wait / discard, 4/5 read wait on/off, 14/15 slow clock 10 µs / 1 µs | CSR: modes in bits 0, 2, 4, 14; FIFO full 6, shadow full 7, FIFO overrun 8, shadow overrun 9, FIFO bit 128 10, wait states 13:12 |
| 2 | – | timestamp, 56 bits |
| 4 | Filter, 16 bits | Filter |
| 5 / 6 | clear wait / overrun counter | wait / overrun counter (32 bits, wrap) |
| 8 | MUX SEL, 64 bits | MUX SEL |
| 10 | counter reset bits | 0 |
| 11 / 12 | counter enable / disable bits | enable bits (offset 11) |
| 13 | – | FIFO head, selected 32-bit group (test mode) |
| 14 | TEST register, 48 bits (test mode) | TEST register (test mode) |
| 16..23 | source address register 0..7 | same |
| 32..47 | software increment of counter 0..15 | counter value via the shadow, bit 63 = error |
| 96..111 | trace sample trigger, filter level = bits 3:0 | 0 |
| 112..127 | resource sample trigger, filter level = bits 3:0 | 0 |

On a CSR write, each 1 bit performs its action and each 0 bit does nothing. If both bits
of a pair are 1, the clearing bit wins.

## Timestamp

The 56-bit counter counts rising edges of `ts_clk`. This is a system-wide 10 MHz clock
shared by every chip in the machine, so that samples from different nodes can be put in
one time order.

* **Clock-domain crossing.** `ts_clk` is synchronised into the node clock domain, so it
  must stay below one third of the node clock.
* **Reset.** Only the hardware reset clears the counter, which lets a machine-wide reset
  align all chips. The software reset leaves it alone.
* **Width.** The processor can read all 56 bits. Samples carry 40 bits, which wrap after
  2^40 × 100 ns ≈ 30 hours.

## Test mode

With the `test_mode` pin high, the 48-bit TEST register (offset 14) becomes writable.
Normal counting stops. Each write executes the instruction in bits 47:32:

| bits | action |
|------|--------|
| 33:32 | set counters from the data. `01`: wait and overrun counters, each data bit filling four counter bits. `10`: timestamp, same four-bit grouping. `11`: all resource counters, full 32-bit value |
| 35:34 | increment counters (same encoding) |
| 37:36 | which 32-bit group of the FIFO head appears at offset 13 |
| 38 | disable the network output |
| 39 | load the test data into the FIFO now (replicated four times, bit 128 = data bit 0), and use test data for later triggers |
| 40 | shift the FIFO out by one entry and free the shadow registers |

## Files

`rtl/` holds one module per file:

| file | block |
|------|-------|
| `mk_pkg.sv` | constants, offsets, sample structs |
| `mk_bus_if.sv` | processor handshake and wait states |
| `mk_csr.sv` | CSR, Filter, wait-state straps |
| `mk_timestamp.sv` | 56-bit timestamp |
| `mk_slowclk.sv` | 1 µs / 10 µs prescaler |
| `mk_res_ctrl.sv` | MUX SEL, enable, disable, reset |
| `mk_res_counters.sv` | 16 counters with source multiplexers |
| `mk_shadow.sv` | shadow registers and the counter read protocol |
| `mk_src_addr.sv` | 8 source address registers |
| `mk_cpuid_enc.sv` | CPU ID encoder |
| `mk_sample_ctrl.sv` | accept / wait / drop decision, sample word, overrun flags |
| `mk_fifo.sv` | 4 × 129 sample FIFO |
| `mk_err_counters.sv` | wait and overrun counters |
| `mk_test_reg.sv` | TEST register decode |
| `mk_net_if.sv` | network serializer |
| `multikron.sv` | top |

`tb/` holds:

* `tb_<module>.sv` for each block;
* `tb_multikron.sv`, the end-to-end test at default sizes. It runs and counts every
  mechanism above: wait states, trace and resource samples decoded field by field, the
  filter, all four counting sources, both overrun kinds, write and read waits, the read
  error bit, receiver back-pressure, software reset, test mode and saturation.
* `tb_mk_throughput.sv`, the collection-rate workload.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_multikron \
    -y rtl -y tb +libext+.sv -Irtl rtl/mk_pkg.sv tb/tb_multikron.sv -o sim
./obj_dir/sim
```

Replace `tb_multikron` with any other testbench name. All run in well under a second.
Parameters:

* `K`, the number of counters. The address map and sample format assume 16.
* `N`, the number of CPUs.
* `FIFO_DEPTH` on `multikron`.

## What follows the chip's description and what is chosen here

Taken from the published description of the chip:

* register map, widths and access types;
* CSR bit assignments;
* sample formats and field order;
* header encoding;
* MUX SEL encoding and its split layout;
* counter saturation;
* shadow-register behaviour and the wait / discard tables;
* overrun and wait counter rules;
* network element format and handshake signals;
* test-register instruction set;
* two-clock access latency, with one extra clock for counter reads.

Choices made in this design where the description is silent:

* FIFO depth of 4 (described only as small, and deeper than the one-rank shadow).
* Bit placement of the header at the top of the 128-bit word, and most-significant-byte-
  first order within fields.
* Reset values: filter all off, counters disabled with the slow-clock source, source
  registers zero.
* The clearing bit wins when a CSR write sets both bits of a pair.
* Filtered triggers count no overrun.
* Software increments also need the counter's enable bit.
* When several CPU ID lines are active, the lowest-numbered line wins.
* Edge detection of `ts_clk` by sampling, which needs it below a third of the node clock,
  as the original chip also requires.
* The Gray-code edge counter in front of each `ext_in` pin.
* `rdy_n` stays low until the strobe is released.
* Outputs change on the falling network clock, and `ext_fifo_free` is sampled on the
  rising network clock.

Not modelled:

* the pin that puts all outputs in high impedance (a pad function);
* the internal-test pins;
* the power and ground pins.

## Verification status

All sixteen testbenches pass. Each block test compares against values computed in the
testbench: reference models for the counters, FIFO and error counters; byte streams
built independently from the sample words; and cycle counts for the bus timing and the
network rate. Each block testbench has also been shown to fail on a deliberately broken
copy of its module.

Timing closure at 50 MHz and gate-level behaviour have not been examined.
