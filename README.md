# A FIFO-buffered shared memory for an array of independently clocked processors

Small processors in a globally-asynchronous array each run on their own
clock and have only a few hundred words of local storage. This design gives
four such processors shared access to one 8K x 16 SRAM. The memory has its own
oscillator, so it sits in a fifth clock domain. Each processor talks to it
through a pair of dual-clock FIFOs: requests go into an input FIFO, and read
data comes back through an output FIFO. The FIFOs do three jobs at once:

- they synchronize between clock domains;
- they match rates;
- they let a processor queue many requests ahead of time.

A processor therefore never waits for the memory unless it needs a result that
has not arrived yet.

Inside the module, each input FIFO feeds an input port that decodes the request
stream. A least-recently-served arbiter picks one port per cycle for the
single-port SRAM. Besides plain reads and writes, the module offers:

- four address generators, for bursts of up to 255 strided, wrapping accesses;
- four hardware mutexes;
- port modes that let one processor send addresses while another supplies the
  data.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable except for the
oscillator, which is a behavioural model.

## Block map

```
 processor p (p = 0..3, own clock)
   mem_port ── DCmem 28..31 ──┐                      ┌── fifo_mem (own clock) ───────────────────────────┐
     prefetch_buf (5)         │   in FIFO (dc_fifo)  │  input_port p ── stage 1: prefetch_buf(3) + FSM    │
                              ├──────── 18-bit ──────┼─►              └─ stage 2: one request register   │
                              │   out FIFO (dc_fifo) │        │ memory ──► lrs_arbiter ─► sram_sp ─► out reg ─┐
                              ◄──────── 16-bit ──────┼────────┼──────────────────────────────────────────────┘
                                                     │        │ mutex  ──► mutex_prim x4 (each with an lrs_arbiter)
                                                     │        │ bursts ──► addr_gen x4
                                                     │  cfg_block (configuration bus)   mem_osc (pausable clock)
                                                     └───────────────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/smm_pkg.sv` | token, request and register types; command opcodes |
| `rtl/smm_system.sv` | top: four processor memory ports plus the module |
| `rtl/fifo_mem.sv` | the memory module: FIFOs, ports, arbiters, SRAM, output routing, clock pause |
| `rtl/input_port.sv` | request decoder and issue logic of one port |
| `rtl/prefetch_buf.sv` | read-ahead buffer that hides a FIFO's read latency |
| `rtl/dc_fifo.sv` | dual-clock FIFO with reserve space |
| `rtl/lrs_arbiter.sv`, `rtl/lrs_tracker.sv`, `rtl/prio_resolve.sv` | least-recently-served arbiter |
| `rtl/mutex_prim.sv` | one test-and-set mutex |
| `rtl/addr_gen.sv` | modular address generator and burst counter |
| `rtl/sram_sp.sv` | 8K x 16 single-port synchronous SRAM (array model of a macro) |
| `rtl/cfg_block.sv` | static configuration registers on the global configuration bus |
| `rtl/mem_osc.sv` | behavioural model of the pausable, programmable ring oscillator |
| `rtl/mem_port.sv` | the memory port inside a processor |

## Talking to the memory: tokens

Everything a processor sends is an 18-bit token: a 16-bit word plus two flags,
`cfgen` and `wren`. The processor's memory port is mapped onto four locations
of its dynamic configuration memory (DCmem). Writing to location 28 + {cfgen, wren}
sends the word with those flags. Reading location 28 returns the next word from
the output FIFO.

A request is one command token, sometimes followed by data tokens:

| Request | cfgen wren | Command word | Followed by |
|---|---|---|---|
| memory read | 0 0 | address | - |
| memory write | 0 1 | address | one data token |
| port configuration | 1 0 | `0000 rrrr dddddddd` (register r, value d) | - |
| address generator configuration | 1 1 | `1000 gggg aaaaaaaa` (one-hot generator g, register a) | one data token |
| burst read | 1 0 | `1100 gggg llllllll` (generator g, length l) | - |
| burst write | 1 1 | `1100 gggg llllllll` | l data tokens |
| mutex request | 1 0 | `1111 xxxx 0001 mmmm` (one-hot mutex m) | - |
| mutex release | 1 0 | `1111 xxxx 0010 mmmm` | - |

A data token is any token that follows a command which expects one. Its flags
are ignored. A port executes its own requests strictly in order. Requests from
different ports are interleaved by the arbiters.

Read data goes to the output FIFO named in the port's registers. This is normally
the port's own FIFO, but it can be another processor's, which lets one
processor fetch data for another.

### Port registers

Port configuration writes two 8-bit registers per port:

- Register 0: `p . . o o o m m`
  - `p`: priority bit;
  - `ooo`: output port for reads in address-data mode;
  - `mm`: mode.
- Register 1: `. . D D D d d d`
  - `DDD` (data_out): output port for reads in address-only mode;
  - `ddd` (data_in): the data-only port that supplies write data.

| mode | Behaviour |
|---|---|
| 00 disabled | every token except port configuration is dropped |
| 01 data-only | every token except port configuration is a data word for the address-only partner |
| 10 address-only | writes take their data from the head of the data_in port's queue; reads go to data_out |
| 11 address-data | normal mode: addresses and data in one stream |

After reset every port is in address-data mode and sends read data to its own
output FIFO.

Address-data writes need two tokens, so they issue at best every other cycle.
The other two ways of writing avoid that:

- **bursts:** one command token followed by the data tokens;
- **an address-only/data-only pair:** one processor sends write addresses and
  another sends the data.

## Inside an input port

The port has two stages.

**Stage 1** is the decoder. It looks at the head of a 3-deep prefetch buffer. The
dual-clock FIFO returns data two cycles after a read request, and the buffer
keeps requesting ahead. So a token is at the head every cycle, not every third
cycle. The buffer counts outstanding requests against free slots, so it can
never overflow.

A five-state machine tracks multi-token requests:

| State | Code | Meaning |
|---|---|---|
| init | 000 | waiting for a command token |
| mem_wr | 001 | a write address is held in AR; the next token is its data |
| cfg_wr | 011 | a generator register address is held; the next token is its value |
| burst | 100 | burst read in progress |
| burst_wr | 101 | burst write in progress |

Bit 2 of the code means "burst" and bit 0 means "the next token is data". The
burst command leaves the queue in the cycle that loads the generator's burst
counter. The port then issues one access per cycle from the generator until
the counter runs out.

**Stage 2** is a single register holding one issued request (a memory access,
mutex request or mutex release). It waits there until the shared resource
accepts it:

- a memory access is accepted when the memory arbiter grants it;
- a mutex request is accepted when the mutex grant arrives;
- a release is accepted at once.

Stage 1 moves a request into stage 2 only when stage 2 is empty or is being
accepted in that cycle. This is what keeps a port's requests in order. It is
also why everything behind a mutex request waits until the lock is held.

Reads are not issued until their destination output FIFO has more free entries
than the output reserve (default 6). The reserve covers the reads already
inside the memory pipeline. Reads therefore never overflow an output FIFO,
even when its processor stops reading.

## Arbitration: least recently served, with an override

Registers F0..F3 hold port numbers in priority order, with F0 highest. At reset
they hold 0..3.

The resolution network finds the first position whose port is requesting, grants
that port, and reports the served position. Every register from that position
onward takes the value of its successor, and the served port drops into F3. The
last register served becomes the lowest priority.

For the priority override, each port's request is ANDed with its priority bit.
If any masked request remains, a second network working on the masked requests
decides instead. Both networks run in parallel and a multiplexer picks one.

The grant is combinational: a request in stage 2 is granted in the same cycle.
The SRAM therefore performs one access per memory cycle whenever any port has a
request ready.

Each mutex has its own copy of this arbiter and an owner register. A grant is
registered, so a lock is obtained two cycles after it is requested at the
earliest. A release from a port that does not own the mutex is ignored. There
is no deadlock avoidance: two ports that take two mutexes in opposite orders
will hang.

## Address generators

Each generator has three registers:

| Register | Address | Meaning |
|---|---|---|
| offset | 0 | base address; writing it also clears the count |
| block size | 1 | length of the block the count wraps in |
| stride | 2 | step added on each access |

Each access produces `offset + count`. The count then steps to
`(count + stride) mod blocksize`. This is done with one adder and one
subtractor: the subtractor computes `count + stride - blocksize`, and its sign
bit chooses between the sum and the difference. The wrap is therefore exact
only while `stride <= blocksize`.

An 8-bit counter limits a burst to 255 accesses. A burst of length 0 does
nothing. A generator advances when its access enters stage 2, so a burst
stalled by the arbiter does not skip addresses.

The four generators are shared by all ports. Two ports that use the same
generator at the same time get an unspecified mix of addresses.

## Memory pipeline and timing

From an input FIFO to an output FIFO, a read passes four registers:

1. the prefetch head;
2. stage 2;
3. the SRAM input (the read data register of the synchronous SRAM);
4. the memory output register, which is then decoded into the output FIFO
   write enables.

Writes end at the SRAM.

Measured in the end-to-end testbench with all clocks at 1.8 ns:

- a processor read, from the write of the address token to the cycle in which
  the word is available, takes **20 cycles**. The original design's budget is 23:
  10 processor cycles and 13 memory cycles. The FIFOs here have the same
  three synchronizer stages, but their internals are this design's own and
  make a word visible to the reader a little sooner;
- 1024 address-data writes from one processor stream at one token per processor
  cycle: 2048 cycles;
- with four ports loaded, 96 reads take exactly 96 memory cycles in
  `tb_fifo_mem`.

## Clocking, pausing and configuration

`mem_osc` models the module's ring oscillator. The frequency word `freq` sets the
half period to `0.9 ns * 256 / (freq + 1)`. The reset value 0xFF gives 1.8 ns, or
555 MHz. An external clock can be selected instead.

When the module is idle, `fifo_mem` asks the oscillator to pause. Idle means all
of the following:

- every input FIFO and prefetch buffer is empty;
- every port is in init with stage 2 empty;
- the SRAM and output register carry no read.

The clock output is gated by a latch that changes only while the clock is low,
so no runt pulse is produced. The ring itself is not stopped. A token written
into any input FIFO restarts the clock immediately. The wake signal is the
unsynchronised not-empty of the FIFO's pointers.

The static registers sit on the array's global configuration bus. A write uses a
16-bit address, node in the upper byte and register in the lower byte. The node
number is the `NODE_ID` parameter, 0x80 by default.

| Register | Bits | Function | Reset |
|---|---|---|---|
| 0x00 | 0 | halt (stored, no effect) | 0 |
| 0x00 | 1 | clk_enable (oscillator on) | 1 |
| 0x00 | 2 | stall_disable (never pause) | 0 |
| 0x00 | 3 | reset (synchronous reset of the module's blocks) | 0 |
| 0x00 | 6 | reset_fifo (resets the input FIFOs) | 0 |
| 0x01 | 7:0 | freq | 0xFF |
| 0x04 | 0 | clk_ext (use external clock) | 0 |
| 0x10..0x13 | 2:0 | connect_in: source of each input FIFO | i |
| 0x14..0x17 | 2:0 | connect_out: destination of each output FIFO | i |
| 0x18 | 4:0 | input FIFO reserve | 2 |
| 0x19 | 4:0 | output FIFO reserve | 6 |

## The processor side

`mem_port` is the part that would live inside a processor:

- A write to DCmem 28..31 becomes one token. It stalls only while the input FIFO
  reports full. The input reserve (2) covers the registers between port and
  FIFO.
- A read of 28 returns the head of a 5-word prefetch buffer and stalls only
  while that buffer is empty.

With one register stage each way (`STAGES = 1`), the round trip to the output
FIFO is 4 cycles. The buffer holds one word more than the round trip, five
words, which keeps reads at one per cycle. With `STAGES = 0` it holds three.

## Workload results

`tb_workloads` runs two workloads on the full-size system with processor models
in place of real processors. All figures are in memory cycles of 1.8 ns.

**Array copy.** A 1024-element array is written with address generator bursts,
copied one element per iteration, and read back with bursts.

- On one processor at equal clocks, each element costs about 25 cycles, which
  is the read latency: every iteration waits for its read.
- The whole copy takes 25.6k cycles at 1x the memory clock period, 30.8k at
  1.33x, 41.0k at 2x and 73.8k at 4x.
- Split across 1, 2 and 4 processors at equal clocks, it takes 25.6k, 14.9k and
  9.5k cycles. The reads of different processors overlap.
- With computation between the read request and the use of its word (idle
  processor cycles, at equal clocks), 0, 8 and 16 idle cycles per element all
  take 25.6k cycles: the work is hidden behind the 20-cycle read latency.
  Above the latency each idle cycle adds one cycle per element: 41.0k cycles
  at 32 and 73.8k at 64.

**Block write then read.** 1024 words are written and then read back, at equal
clocks:

| Coding | Cycles |
|---|---|
| one processor in address-data mode, each read waiting for its word | 22.5k |
| one processor using address generator bursts | 3.1k |
| an address-only processor paired with a data-only processor | 3.1k |

The two decoupled codings issue reads far ahead of consuming the data, so the
latency is paid once rather than per word.

**Address and data computation.** The same block work is given idle cycles per
iteration for address computation and for data computation. It is run on the
address-only/data-only pair and, for an equal processor count, split between
two address-data processors (memory cycles, equal clocks):

| Address load | Data load | Address-only + data-only | Two address-data |
|---|---|---|---|
| 0 | 0 | 3.1k | 11.3k |
| 16 | 0 | 34.8k | 27.6k |
| 0 | 16 | 35.8k | 19.5k |
| 16 | 16 | 35.9k | 35.8k |

The pair runs at the pace of whichever of its two processors has more work.
It wins only when there is little computation, because each of its loops is
shorter. Once one side carries a real load, two address-data processors, which
share both kinds of work, are at least as fast.

## Where this design departs from, or fills in, the original

- The register table places both stall_disable and reset at bit 3 of register
  0x00. Here stall_disable is bit 2 and reset is bit 3.
- `dc_fifo` uses the original's typical three synchronizer stages (`SYNC = 3`),
  but its Gray-pointer internals are this design's own. A read takes 20 cycles
  against the original's 23-cycle budget.
- Output FIFOs are reset by the global reset. In the original they are reset from
  the processor that reads them, and no processor is modelled here.
- The interconnect that routes any processor to any port is not built. Processor i
  is wired to port i, and the connect_in/connect_out registers are brought out
  as ports of `smm_system`.
- The processors themselves are not built. `tb_smm_system` drives the memory
  ports the way a processor's DCmem accesses would.
- Choices the original leaves open:
  - reset values of the port registers;
  - dropping of unknown configuration tokens;
  - behaviour of a disabled port;
  - burst length 0;
  - the configuration bus address format and node number;
  - the oscillator's frequency law;
  - the DCmem address width (5 bits).
- The SRAM macro is replaced by a plain array with a registered read. It is
  synthesizable, but a real implementation would substitute a macro with the
  same one-cycle read.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/smm_pkg.sv tb/tb_smm_system.sv \
  --top-module tb_smm_system -o sim && ./obj_dir/sim
```

Replace `tb_smm_system` with any other testbench name.

| Testbench | What it establishes |
|---|---|
| `tb_smm_system` | Full size, default parameters. Processor clocks at 1, 1.33, 2 and 4 times the memory period. Runs the 1024-word block workload, c = a + 2b over 1024 points on four processors, the priority override, a wrapping burst write and read, an address-only/data-only pair, output-reserve blocking, a mutex-protected shared counter, read latency, and a frequency change. It counts every mechanism and fails if one never occurred. |
| `tb_workloads` | Full size. The array copy on one processor at four clock ratios, on 1, 2 and 4 processors, and with five computation loads. The block workload in three codings, and the address-only/data-only pair against two address-data processors under four loads. It checks the data and the relative timings listed above. |
| `tb_fifo_mem` | Token-level test of the module: data integrity on all ports, one access per cycle, clock pause, clk_enable, stall_disable, halt, reset_fifo. |
| `tb_input_port` | Every request type against an expected issue sequence, with a randomly stalling arbiter. |
| `tb_mem_port` | Write stall on full, read stall on empty, token flags from the DCmem address, one read per cycle once primed. Run with one pipe stage (five-word buffer) and, read side only, with none (three-word buffer). |
| `tb_lrs_arbiter`, `tb_lrs_tracker`, `tb_prio_resolve` | Compared with a reference model of least-recently-served order, with and without priority bits. |
| `tb_mutex_prim`, `tb_addr_gen`, `tb_dc_fifo`, `tb_prefetch_buf`, `tb_sram_sp`, `tb_cfg_block`, `tb_mem_osc` | Unit behaviour. |

The system test finishes in well under a second of host time.
