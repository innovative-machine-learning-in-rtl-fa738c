# FPGA building blocks for machine learning and data acquisition in radiation environments

This repository holds synthesizable SystemVerilog for three separate pieces of hardware. They
come from one reference design for instruments that must work near radiation sources:

1. **A first-layer engine for a CNN accelerator.** The first layer takes a 125 × 125 × 125
   input volume, so every neuron has a fan-in of 1,953,125. That is far too much to compute
   in one clock. The engine streams the inputs through in chunks of 128 values and finishes
   25 neurons per pass.
2. **A radiation-monitor data-acquisition (DAQ) chain.** A 14-bit ADC is read over SPI at
   16 kS/s. Each sample is wrapped with a counter and a microsecond timestamp and streamed
   over TCP through a Wiznet W5500 Ethernet chip.
3. **A genetic-algorithm (GA) engine.** It evolves a parameter, for example a
   discrimination threshold, entirely in logic.

The three share no signals. The top level, `thesis_top`, puts them side by side so that they
build and simulate together.

---

## 1. First-layer engine (`l1_engine`)

### The idea

In the reference design the first layer is split between three kinds of resource on an
adaptive SoC:

- programmable logic moves the data;
- vector processors do the multiplications;
- DSP slices accumulate.

Each neuron gets 8 vector kernels. Each kernel multiplies 16 int8 inputs by 16 int8 weights
per step. One step therefore covers **N = 8 × 16 = 128 inputs** of the fan-in. A block of
**25 neurons** shares the same input chunk, and each neuron has its own weights and its own
DSP accumulator.

```
          RAM (inputs, weights)
                 |  rd_en, in_addr = chunk, w_addr = block*NCHUNK + chunk
                 v
        +------------------+   chunk k+1 is read while chunk k is multiplied
        |    l1_feeder     |   2-entry buffer, credit based, zero padding
        +------------------+
      x[128], w[25][128] | valid/ready
                 v
        +------------------+   25 neurons x 8 kernels, each a registered
        | aie_mac_kernel x |   16-lane int8 dot product (32-bit partial sum)
        |      200         |
        +------------------+
   psum[25][8] |
                 v
        +------------------+   per neuron: sum of 8 partial sums + 58-bit acc,
        | dsp_accum_bank   |   after the last chunk: ReLU, >>> shift, clip 127
        +------------------+
                 v  out_valid/out_ready, out_act[25] (int8), out_acc[25], out_block
```

The whole fan-in takes **NCHUNK = ⌈1,953,125 / 128⌉ = 15,259 beats** per block. The last
chunk is only partly used. The feeder zeroes its unused lanes, so the weight memory may hold
anything there.

### Timing

- One chunk enters per clock. The three stages (read, multiply, accumulate) overlap
  completely.
- `out_valid` rises **NCHUNK + 3 clocks** after the clock edge that samples `start`. That is
  15,262 clocks at the defaults, or 50.9 µs at a 300 MHz fabric clock.
- With `N_BLOCKS > 1` a new block finishes every NCHUNK clocks.
- A result that is not taken (`out_ready` low) does not stop the pipeline at first. The
  accumulators already work on the next block, so the stall only spreads back once that
  block's last beat arrives while the old result still waits. It then stops the kernels and
  the feeder, and the feeder stops reading RAM. The feeder's buffer and credit counter ensure
  that no chunk already read from RAM is lost.

### Memory interface

The RAM is outside the engine. In the reference design it is on-chip block RAM fed from DDR
through the network-on-chip. The engine assumes a plain synchronous RAM: data arrives one clock
after `rd_en` with the address given. The two address spaces are:

- inputs at `in_addr = chunk`, one word of 128 int8 values per chunk;
- weights at `w_addr = block * NCHUNK + chunk`, one word of 25 × 128 int8 values.

At full size that is 1.95 MB of input and 48.8 MB of weights per block. Those sizes are why
the store is external.

### Number formats

- Inputs and weights are signed 8-bit.
- A kernel's 16-term sum needs at most 20 bits and is carried in 32. The sum of the 8
  partial sums needs 23 bits.
- The accumulator is 58 bits wide, like a DSP58 slice. It cannot overflow over
  1,953,125 terms (that needs 36 bits).
- The activation is ReLU followed by an arithmetic right shift of `shift` bits (a run-time
  input) and clipping to 0…127. The reference design folds batch normalisation into the
  weights, so a single rescaling step is all the first layer needs. The shift-and-clip form of
  that step is this design's own choice.

### What is not here

- **Later layers.** The reference design gives them no structure, so the engine ends at the
  25 activations.
- **The vector-processor array itself.** `aie_mac_kernel` is a fabric equivalent of one
  kernel, with the same arithmetic.
- **The processor system, the network-on-chip and DDR.**

---

## 2. Radiation-monitor DAQ (`daq_top`)

### Data path

```
 clk_acq (100 MHz)                                        clk_eth
 daq_timebase --tick 16 kHz--> adc_spi_master --14 bit--> packet_tagger --80 bit--> async_fifo --> w5500_ctrl --SPI--> W5500
      |  1 MHz timestamp                     ^ SPI #1                              512 x 80             (SPI #2, 25 MHz)
      +--------------------------------------|---------------------> (latched at tick)
```

- **`daq_timebase`:**
  - divides the 100 MHz clock by 6,250 to give the 16 kS/s conversion tick;
  - divides it by 100 to advance a 32-bit microsecond timestamp, which wraps after 71.6 min.
- **`adc_spi_master`:**
  - reads one 16-bit frame per tick: two leading zeros, then the 14-bit code;
  - runs SCLK at 10 MHz, idle low, sampling on the rising edge, MSB first;
  - raises `sample_valid` 160 clocks (1.6 µs) after the tick.
- **`packet_tagger`:**
  - latches the timestamp at the tick, which is the sampling instant;
  - builds the packet when the code arrives.

  The 32-bit counter advances for every sample. A sample that meets a full FIFO is dropped and
  counted, and the receiver sees the gap in the counter.
- **`async_fifo`:** a dual-clock FIFO of 512 × 80 bits.
  - Pointers cross domains in Gray code through two-flop synchronisers.
  - The read side is show-ahead and reports its fill level, which is conservative.
  - Assertions flag a write while full and a read while empty.
- **`w5500_ctrl`:** drives the W5500 over a second, independent SPI bus. The W5500 runs the
  TCP/IP stack itself.

### Packet format (80 bits, sent MSB first as 10 bytes)

| bits    | field     | meaning                                         |
|---------|-----------|-------------------------------------------------|
| 79:48   | count     | sample number since reset (gaps = lost samples) |
| 47:16   | tstamp    | microseconds since reset, taken at the tick     |
| 15:14   | spare     | always 0                                        |
| 13:0    | sample    | ADC code                                        |

The three fields and the 80-bit size follow the reference design. The field order is this
design's choice.

### W5500 protocol

Every access is one SPI frame with chip select low: a 16-bit address, then a control byte
`{block select[4:0], R/W, 00}`, then the data bytes at consecutive addresses. The controller
runs this sequence:

1. Write the gateway, subnet mask, MAC and IP address. The defaults are 192.168.1.1,
   255.255.255.0, 02:00:00:00:00:01 and 192.168.1.2, and they are parameters.
2. Put socket 0 in TCP mode on port 5000, then issue `OPEN`. Poll the status register until
   it reads `INIT` (0x13).
3. Issue `LISTEN`. Poll until the status reads `ESTABLISHED` (0x17). `established` then
   rises. The FPGA acts as the server and the computer connects to it.
4. For each block of `BLOCK_PKTS` packets (default 1, so 10 bytes):
   1. wait until the FIFO holds a block;
   2. read the socket's free TX space (`Sn_TX_FSR`), repeating until the block fits;
   3. read the write pointer `Sn_TX_WR`;
   4. write the block's bytes into the TX buffer in one frame, popping each packet after its
      tenth byte;
   5. write back the pointer plus the block size;
   6. issue `SEND` and poll the command register until it reads 0;
   7. increment `blocks_sent`.

A byte takes 32 clocks at 100 MHz. With the default one-packet block, a packet takes about
1,250 clocks, so the link carries about 80,000 packets/s (6.4 Mb/s). That is 5 times the
1.28 Mb/s that 16 kS/s × 80 bits needs. The block size of one packet is my choice, made for
the reference design's measured latency of about 0.1 ms: in the end-to-end test a packet reaches `SEND` within
13 µs of its conversion. A 16-packet block would raise the rate to about 252,000 packets/s
(6,350 clocks per block), but the first packet would wait almost 1 ms for the other fifteen.
If the network stalls, two stores fill in turn:

- first the W5500's 2 KB TX buffer;
- then the FIFO, which holds 32 ms of samples.

After that, samples are dropped and counted.

### Departures from the reference design

The reference design reports a stable 100 Mb/s Ethernet rate. That number cannot be the payload
of this stream. The stream is only 1.28 Mb/s, and an SPI-attached W5500 cannot carry 100 Mb/s
anyway, so it is not a target of this RTL. The following are this design's own choices, because
the reference design does not give them:

- the SPI modes and rates;
- the FIFO depth;
- the block size;
- the server role;
- the poll order.

---

## 3. Genetic-algorithm engine (`ga_engine`)

A population of 32 chromosomes of 16 bits lives in two small memories (`ga_pop_mem`), used
ping-pong: the current generation is read from one while the next is written to the other.
The FSM steps through four states:

| state | clocks          | work                                                                 |
|-------|-----------------|----------------------------------------------------------------------|
| INIT  | 32              | random individuals from a 32-bit LFSR (`lfsr32`)                    |
| EVAL  | 32/4 + 2 = 10   | 4 individuals per clock through `ga_fitness_unit` (2-stage pipeline); fitness stored, best tracked |
| BREED | 32              | slot 0 ← best (elitism); others ← tournament, crossover, mutation   |

Generations alternate BREED and EVAL until `cfg_gens` generations have been bred. A run takes
**(gens + 1) × 42 clocks**.

The operators are:

- **`ga_select_xover`:** two binary tournaments, 4 random entrants, with ties going to the
  first entrant. Single-point crossover happens with probability `xover_prob`/256; the cut
  point is `rnd[11:8] + 1`.
- **`ga_mutate`:** with probability `rate`/256, flips the bit at `rnd[11:8]`.
- **Random numbers:** two LFSRs with polynomial taps 0x80200003, seeded with `seed` and
  `~seed`, supply 24 random bits per child.

All settings (mutation rate, crossover probability, target, generation count, seed) are
run-time inputs sampled at `start`. That is the "reconfigure without new hardware" property the
reference design asks for.

The fitness function here, `0xFFFFFFFF − (c − target)²`, is a stand-in. The reference design
only says that fitness is computed in parallel in hardware for a parameter-tuning problem, and
gives no function, population size or widths. Replace `ga_fitness_unit` with the real
figure of merit, for example a resolution or noise measure from the DAQ, keeping its two-clock
latency or adjusting the side-band pipeline in `ga_engine`.

---

## Top level (`thesis_top`)

`thesis_top` has no parameters and instantiates the three designs at their defaults:

- `clk` clocks the first-layer engine and the GA, and is also the DAQ acquisition clock
  (100 MHz).
- `clk_eth` clocks the DAQ transmit side.
- The port prefixes are `l1_` (RAM and result ports), `daq_` (ADC and W5500 pins, status
  counters) and `ga_` (settings and results).
- `rst_n` is active low. The DAQ synchronises it into each of its clock domains; the rest use
  it synchronously.

---

## How far to trust it

Every module has a self-checking testbench in `tb/`. Each compares the module's outputs with
values computed independently in the testbench, checks the cycle counts quoted above, and
ends with a `TB_RESULT checks=… failures=…` line. Every testbench has also been shown to fail
on a deliberately broken copy of its module.

The end-to-end test `tb_thesis_top` runs the top exactly as shipped, at full size:

- **First-layer engine:** one block over the full 1,953,125-input fan-in. The 25 sums and
  activations are compared with sums computed in the testbench, the 15,262-clock latency is
  checked, and the output is held for a while.
- **DAQ:** about 85 ms at 16 kS/s, against behavioural models of the ADC and the W5500. The
  test covers connection set-up, streaming, a 50 ms network stall that overflows the FIFO,
  and recovery. Every received packet is checked for counter, code and timestamp, and the
  counter gaps must equal the drop count. The time from each conversion to the `SEND` that
  carries its packet must stay under 100 µs while the link is up.
- **GA:** two runs with different settings.

The test counts each mechanism: output stall, results, connection, blocks sent, waits for
TX buffer space, drops, generations and reconfiguration. It fails if any count stays at zero.
It takes about 3 minutes with Verilator.

Where the RTL departs from or goes beyond the reference design:

- **16 lanes per kernel.** The reference design describes its kernels once as 128 MACs per
  call and once as 16 int8 MAC lanes. This design uses 16 lanes per kernel and 8 kernels per
  neuron (128 per neuron).
- **The 0.02 ms latency is not met.** The reference design reports 0.02 ms for the whole
  network. At 300 MHz that is 6,000 clocks, while this first layer alone needs 15,262. The
  15,000 frames/s figure is met for one block of 25 neurons: 20,000 clocks are available per
  frame at 300 MHz.
- **The W5500 and the ADC are not RTL.** They are external chips and are modelled only for
  simulation: `tb/w5500_model.sv` and `tb/adc_model.sv`. The W5500 model covers socket 0 in
  TCP mode. It covers the status changes after OPEN and LISTEN, the TX buffer pointers and
  free-space register, and SEND. Those are exactly the features the controller uses.
- **Own choices.** Widths, handshakes, reset behaviour, the requantisation, the packet field
  order and everything about the GA's sizes and fitness are this design's own. Each file's
  header comment says which parts follow the reference design.

---

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/l1_pkg.sv rtl/daq_pkg.sv tb/tb_thesis_top.sv --top tb_thesis_top
./obj_dir/Vtb_thesis_top
```

Replace `tb_thesis_top` with any other `tb/tb_*.sv`. The block tests run in seconds. Several
of them use reduced sizes where the test would otherwise be slow: `tb_l1_engine` uses 100
inputs, 2 × 4 lanes, 3 neurons and 2 blocks, and `tb_daq_top` uses 200 kS/s with a 64-entry
FIFO. Nothing else needs changing. The RTL contains no vendor primitives, and memories are
plain arrays.

## Files

| file | contents |
|------|----------|
| `rtl/l1_pkg.sv` | sizes and types of the first-layer engine |
| `rtl/l1_engine.sv`, `l1_feeder.sv`, `aie_mac_kernel.sv`, `dsp_accum_bank.sv` | first-layer engine |
| `rtl/daq_pkg.sv` | packet type, W5500 register map and commands |
| `rtl/daq_top.sv`, `daq_timebase.sv`, `adc_spi_master.sv`, `packet_tagger.sv`, `async_fifo.sv`, `spi_byte_master.sv`, `w5500_ctrl.sv` | DAQ |
| `rtl/ga_engine.sv`, `ga_pop_mem.sv`, `ga_fitness_unit.sv`, `ga_select_xover.sv`, `ga_mutate.sv`, `lfsr32.sv` | GA |
| `rtl/thesis_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/adc_model.sv`, `tb/w5500_model.sv` | behavioural models of the external chips |
