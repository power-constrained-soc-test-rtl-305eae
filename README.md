# Core test over the functional bus: buffered test interfaces

Most SOC test schemes add a dedicated test access mechanism (TAM): extra wires
from the tester to the scan chains of every core. This design uses the bus the
SOC already has. The embedded processor acts as the tester. It writes test data
to the cores over the ordinary functional bus and reads the responses back the
same way.

A bus and a scan chain do not fit together directly:

- the bus is `w_b` bits wide, while a core has `s_m` wrapper scan chains;
- the bus is shared by all cores, while every core must be fed at its own steady scan rate;
- the bus may run faster than any core may be scanned.

So every core sits behind a small **test interface**, and inside a wrapper of
boundary cells. An input buffer takes test
words from the bus in bursts ("packets") and feeds the scan chains one
`s_m`-bit chunk at a time. An output buffer does the reverse with the responses.
A FIFO buffer controller, stepped by the core's own clock divider, generates the
scan and capture clocks. It stops whenever the buffer runs dry, so a packet that
arrives late makes the core wait; nothing is lost. The processor's test program
then only has to send packets in a fixed, repeating order (a *packet set*)
that gives each core data in proportion to its scan rate.

```
 processor ──► functional_bus ──┬──► core_test_interface 0 ──► wrapper chains of core 0
 (bus master)                   ├──► core_test_interface 1 ──► ...
                                └──► ...

 core_test_interface:
   bus_protocol_interface ─► input_buffer ──(s_m bits, scan_en)──► core_wrapper chains
            ▲                    ▲  alpha                            │  (input cells,
            │              fifo_controller ◄── clock_divider         │   internal chain,
            │                    ▼  alpha                            ▼   output cells)
          tn_mux ◄────────── output_buffer ◄─────────────────────────┘
            ▲
     core functional output, through the output cells (normal mode)
```

## How a test bit travels

Take an input buffer (`input_buffer.sv`), in data order:

1. **Input register.** It holds one bus word plus a status bit. A bus write waits
   while the register is full. This wait is how a burst is paced when the buffer
   has no room.
2. **Fall-through stack** (`fall_through_stack.sv`). Each slot has its own status
   bit. The top slot copies the input register when it has room, and every word
   falls one slot per clock towards the lowest empty slot. A slot also refills in
   the cycle its own word moves down, so a full stack passes one word per cycle.
3. **Bottom word.** This is the lowest stack row: a `w_b`-bit shift register that
   gives up one bit per serial shift (`e2`), LSB first. When its last bit leaves
   (`e1`), or whenever it is empty, it takes the next word from the stack. While it
   holds nothing, `alpha` (buffer empty) is high.
4. **Output register.** It has `s_m` bits and is wired to the chain inputs. Each
   serial shift moves the next bit in. After `s_m` bits, all chains shift once
   (`scan_en`). Bit `j` of a chunk goes to chain `j`.

The processor sees the test data as one continuous bit stream, word after word,
LSB first. Patterns need not line up with word boundaries.

The output buffer (`output_buffer.sv`) mirrors this, with data flowing the other way:

- at every scan clock, a response register loads the `s_m` chain outputs;
- serial shifts send those bits, chain 0 first, into a `w_b`-bit assembly word;
- each full word is pushed onto a fall-through stack;
- the processor reads the words from a bus register.

The output buffer's `alpha` (stack full) also stops the controller, so responses
are never overwritten.

## The FIFO buffer controller and its timing

`fifo_controller.sv` is three modulo counters. `clk_in` comes from the core's
`clock_divider` as a one-cycle `tick`, at `s_m × f_m`: one tick per bit, where
`f_m` is the scan frequency.

| signal | meaning | when |
|---|---|---|
| `e2` | serial shift | every tick, unless `alpha` or a capture is pending |
| `e1` | refill bottom word | with the `e2` that completes `w_b` shifts (MOD `w_b`) |
| `e3` | scan clock (`scan_en`) | with the `e2` that completes `s_m` shifts (MOD `s_m`) |
| `e4` | capture clock (`capture`) | on the first tick after every `L_MAX`-th `e3` (MOD `max(l)`) |

The details that matter when you connect a core or write a test program:

- **Single clock domain.** All signals are enables in the system clock domain.
  Registers act on them at the next rising edge. No clock is gated. The core's
  chains must shift on `scan_en` and capture on `capture`, both sampled on `clk`.
- **The chunk is ready in the scan cycle.** `scan_in` carries the output
  register's *next* value. The chains take a chunk at the same edge as its
  `s_m`-th bit arrives, so there is no bubble.
- **A capture uses one tick of its own.** No shift happens during it, so
  `scan_en` and `capture` never coincide (an assertion checks this). A pattern of
  `L_MAX` chunks therefore takes `(s_m·L_MAX + 1)` ticks.
- **Both buffers move in lock-step.** Every `e2` moves one test bit in and one
  response bit out. The returned stream has exactly as many bits as the test
  stream, delayed by `s_m` bits:
  - the first `s_m` bits are zeros from reset;
  - next come the chain contents unloaded during the first pattern;
  - after that, the response to pattern `p` comes out while pattern `p+1` goes in.
- **Unloading the last response.** The last response only comes out while another
  pattern goes in. So a test program ends each core's stream with one extra
  pattern, plus at least `s_m` padding bits, rounded up to a whole word.
- **Scan rate.** While nothing stalls, scan clocks are `s_m·(div+1)` cycles
  apart, plus `div+1` when a capture lies between them. The testbenches check
  this interval.

Chains shorter than `L_MAX` are handled by the test data: the bits that would
overflow a short chain are don't-cares.

## Wrapper chains

`core_wrapper.sv` puts a `wrapper_boundary_cell` on each of the core's
bus-facing terminals: `w_b` inputs and `w_b` outputs. It then cascades the
cells with the core's internal scan chains. Wrapper chain `c` runs through three
parts in turn:

1. the input cells of chain `c`;
2. internal chain `c`;
3. the output cells of chain `c`.

Cell `k` goes on chain `k mod s_m`, which keeps the longest wrapper chain as
short as possible when the internal chains are equal. In test mode:

- the input cells drive the core inputs with the stimulus shifted into them, and
  hold it through the capture;
- the output cells capture the core outputs.

In normal mode, both kinds of cell pass values straight through. The test
interface of core `i` is built for `L_MAX = L_INT[i] + 2·ceil(w_b/s_m)` scan clocks
per pattern. The test data for a core must therefore be laid out for its wrapper
chains, not for its internal chains.

## Driving it from the processor

Each core's interface is slave `i` on the bus: word addresses `4i … 4i+3`. The
bus is a single-master valid/ready bus. A transfer completes in the cycle where
`req.valid` and `rsp.ready` are both high, and read data are valid in that cycle.
The types are in `pass_pkg.sv`.

| reg | access | function |
|---|---|---|
| `DATA` (0) | W | test mode: word to the input buffer (waits while the input register is full); normal mode: functional write to the core |
| `DATA` (0) | R | test mode: next response word (waits until one is available); normal mode: the core's functional output, through the T/N mux |
| `CTRL` (1) | RW | bit 0 = test mode (T/N); bit 1 = clear buffers and counters (pulse, not stored); bits `[8 +: DIV_BITS]` = divide-by minus one |
| `STATUS` (2) | R | bit 0 = input register can take a word; bit 1 = input buffer empty; bit 2 = response word available; bit 3 = output buffer full; bit 4 = test mode; `[15:8]` = test words held; `[23:16]` = response words held |
| `CAPCNT` (3) | R | capture clocks since clear |

A test session for one group of cores that are tested together:

1. Write `CTRL` with test mode, clear, and the divider setting chosen for each
   core. The divider has `DIV_BITS` flip-flops and divides by 1 … `2^DIV_BITS`.
2. Repeat the packet set until all data are sent. A core with split ratio `k` gets
   `k` packets per set. Choose packet sizes so that
   `split × packet_bits / scan_rate` is the same for every core. A packet set is
   then a *perfect fit*: every core uses up its share of a set in the same time.
   Example (the top-level testbench): scan rates 1/4, 1/4, 1/2 and 1 bit per
   cycle, split ratios 1, 1, 2 and 4, and 4-word packets. One set is
   `c3 c2 | c3 c0 | c3 c2 | c3 c1`.
3. After every packet, read the response words the core's `STATUS` says are
   waiting.
4. Before a packet, check `STATUS[15:8]` against the capacity (`DEPTH+1` words).
   A blocking write to a core whose output buffer is full would deadlock the bus:
   that core cannot drain while its responses are not read. So wait by polling,
   and collect responses while waiting.
5. At the end, read the remaining responses and compare `CAPCNT`.

How cores are grouped under the power limit and how split ratios and packet
sizes are chosen is an offline computation for the test program. It is not part
of this hardware.

## Files and parameters

| file | contents |
|---|---|
| `rtl/pass_pkg.sv` | bus width `W_B` = 32, address layout, register enum, request/response structs |
| `rtl/soc_test_top.sv` | functional bus plus `N_CORES` core test interfaces; core ports brought out |
| `rtl/functional_bus.sv` | address decode and response return |
| `rtl/core_test_interface.sv` | one core's test interface |
| `rtl/bus_protocol_interface.sv` | register set and routing |
| `rtl/input_buffer.sv`, `rtl/output_buffer.sv`, `rtl/fall_through_stack.sv` | buffers |
| `rtl/fifo_controller.sv`, `rtl/clock_divider.sv`, `rtl/tn_mux.sv` | control |
| `rtl/core_wrapper.sv`, `rtl/wrapper_boundary_cell.sv` | boundary cells and wrapper chains |

Top-level defaults are an example configuration of four cores:

- `S_M = '{16, 8, 4, 2}` wrapper chains;
- `L_INT = '{32, 40, 24, 16}` longest internal chain, which gives wrapper chains
  of 36, 48, 40 and 48;
- `DEPTH = 12` stack rows per buffer. Four cores × (13 input + 12 output words)
  is a total of 100 bus words of buffering. That is the total buffer limit the
  evaluated schedules were held to.

Port arrays are `S_MAX` = 16 chains wide, and bits above a core's `S_M` are
unused. The bus width is a package constant (`pass_pkg::W_B`). Change it there to
study other widths; every module follows it.

## Where this departs from, or goes beyond, the architecture it implements

- **Clocking.** The original scheme gates `clk_in` with `alpha` and drives the
  buffers with separate serial, scan and capture clocks. Here everything is one
  clock domain with enables. The bus/scan decoupling is kept: the bus runs at the
  system clock, and each core advances only on its divider's ticks.
- **Stall on a full output buffer.** Stopping the controller when the output
  buffer is full, and the look-ahead in the stack and input register, are
  additions. They make back-to-back bursts and lossless response capture possible.
- **Wrapper chain balance.** The aim is wrapper chains that are as short as
  possible at their longest. Round-robin placement reaches that only when the
  internal chains are about equal in length. For cores whose chains differ a lot,
  a placement that puts more cells on the short chains would do better. All
  interfaces are sized for the longest wrapper chain, and shorter chains are
  padded in the test data.
- **Chosen here, not given by the architecture:** the bus protocol, the register
  map, the bit order, the reset values, the divide-by-N divider, the
  one-flip-flop boundary cell and the round-robin cell placement.
- **Not included:**
  - boundary cells on terminals that connect to other cores or to chip pins;
  - the cores — their internal chains and terminals are the top's ports;
  - the processor;
  - DMA loading of test data.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Testbench helpers:

- `tb/scan_core_model.sv` — a behavioural scan core that stands in for a real core;
- `tb/tb_ref_pkg.sv` — a software reference for the returned response stream,
  with or without the wrapper.

Example, the whole SOC at its default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/pass_pkg.sv tb/tb_ref_pkg.sv tb/tb_soc_test_top.sv --top-module tb_soc_test_top
./obj_dir/Vtb_soc_test_top
```

`tb_soc_test_top` covers a complete test session of about 8,500 cycles:

- normal-mode access to every core;
- a switch to test mode at four different frequencies;
- 16 packet sets (128 packets);
- every response word checked, including what the output cells capture;
- captures, split ratios and the scan-clock spacing checked;
- the return to normal mode.

Along the way it sees bus wait states and cores waiting for data.
`tb_core_test_interface` also forces the output-buffer-full stall.

## Fit to the evaluated benchmark SOCs

The original evaluation uses the ITC'02 SOCs d695, p22810 and p93791, at bus
widths of 12 to 128 bits. These SOCs have 10, 28 and 32 cores (figures from the
benchmark suite itself). The default four-core top, with a 32-bit bus and at most
16 chains per core, holds none of them as configured. `N_CORES`, the per-core
arrays and `W_B` must be set for each. The benchmark test data are not included,
so no benchmark run is part of the testbenches.
