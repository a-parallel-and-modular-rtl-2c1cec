# Parallel, modular LDPC decoder for the IEEE 802.16e rate-1/2 code

This is synthesizable SystemVerilog for a partly parallel LDPC decoder. It follows the
architecture of *A Parallel and Modular Architecture for 802.16e LDPC Codes*. The main idea is
to cut the parity-check matrix H along its block structure:

- a **check-node set** CS_j is one block row: z check nodes;
- a **bit-node set** BS_j is one block column: z bit nodes.

Each set is handed to a **processing module**, which works through its nodes one per cycle.
Four modules run side by side, and each holds the messages of the edges it is responsible
for in its own banks. A shared **bus interconnect** moves messages between modules, and only
when bit nodes are updated from banks in another module.

The decoder handles the rate-1/2 code of 802.16e: a 12 x 24 base matrix and block size z from
24 to 96, so codeword lengths run from 576 to 2304 bits. It uses normalized min-sum with
6-bit messages and a fixed number of iterations. It streams out hard decisions.

## How the code is spread over the hardware

| item | size |
|---|---|
| modules | 4 (`proc_module`) |
| check-node sets per module | 3 (12 block rows) |
| banks per module | 20, each 3 x 96 six-bit words (`msg_bank`) |
| buses | 20; bus i reaches bank i of every module; rate 1/2 uses 10 |
| bit-node scenarios | 6, each updating 4 bit-node sets, one per module |

**Check-node sets.** They are placed as M0: CS0, CS11, CS10; M1: CS4, CS3, CS6;
M2: CS2, CS1, CS8; M3: CS7, CS9, CS5. The position of a set in its module's list is its
*slot* (0..2). Slot t occupies words t*96 .. t*96+z-1 of every bank of that module.

**Edges and banks.** Each non-zero block (r, c) of H is an edge block of z messages. It is
stored in one bank of the module that owns row r. The rate-1/2 memory organization
(`FIG5_MAP` in `ldpc_pkg`) is the published one and uses banks 0..9. It lists, for every
module, bank and slot, which bit-node set's block is stored there. Two properties make it
work:

1. Within a block row, all edge blocks are in different banks. A check node can then read all
   its edges in one cycle, one word per bank.
2. Within a block column, all edge blocks sit at different bank indices. A bit node can then
   collect all its edges in one cycle, because bus i serves only bank i.

**Scenarios.** A scenario updates four bit-node sets, one on each module. The schedule is
`COL_OF[s][k]`: the set that module k processes in scenario s. Scenario 0 is the published
example: BS23 on M0, BS3 on M1, BS2 on M2, BS21 on M3. The other five were chosen to obey the
rules the hardware needs:

- a bank is read at most once per scenario;
- a bus carries at most one message per scenario.

Messages that the processing module holds itself are **local**. They go straight to its bit
node unit and use no bus. Only the other messages cross the interconnect. The whole rate-1/2
schedule needs 10 of the 20 buses. `ldpc_pkg::layout_ok` re-checks every rule at elaboration,
and an error stops elaboration if a table is changed into something inconsistent.

**Channel LLRs.** Module k keeps the LLRs of the six sets it processes in a 6 x 96-word
memory, at the slot of their scenario.

### Message layout and the circular address generators

This is the part that takes the most care. A z x z block with shift p joins check node i of
row r to bit node (i + p) mod z of column c. Word i of the block holds the message of that
edge. Messages are stored in place:

- after a bit-node pass, a word holds v (bit to check);
- after a check-node pass, it holds w (check to bit).

Every bank port has its own `addr_gen`. It emits base + ((start + j) mod z) for j = 0..z-1.

- **Check-node pass**: start = 0 for all banks. Cycle j reads word j of every enabled bank,
  which is check node j of the slot.
- **Bit-node pass**: start = (z - p) mod z. Cycle j reads the word of bit node j, which is
  check node (j - p) mod z. Each bank of a bit-node set's edges starts from its own offset,
  so the banks feeding one bit node all deliver its messages in the same cycle.

The shift p is scaled from the 96-based table as floor(p*z/96), the 802.16e rule for rate 1/2.

## One iteration, pass by pass

The controller (`ldpc_ctrl`) runs **passes**. Every pass has this shape:

1. One cycle in which `config_mem` produces the pass's bank and bus configuration.
2. `rd_start`, then z read cycles.
3. A drain of LAT = 3 cycles. Reads take 2 cycles, and the node unit registers its output
   after 1 more.

The write address generators start LAT cycles after the read generators, with the same base
and start offset. Each result therefore lands on the word it came from. A pass lasts
z + LAT + 2 cycles, and configuration never changes while data is in flight.

- **Bit-node pass (scenario s).** For each edge of the scenario's four sets, the bank that
  holds it is read. A local word goes straight to the bit node unit of its own module. Any
  other word goes onto the bus with the bank's index, to the processing module. That unit
  adds the channel LLR and its messages: s = u + Σ w. It returns v_i = sat(s - w_i) by the
  same path, and outputs the decision (s < 0). In the first iteration every w is taken as
  0, so v starts at u.
- **Check-node pass (slot t).** Each module reads the edge words of its t-th set from its own
  banks. Its check node unit writes back w_i = (product of the other signs) x
  floor(3/4 x smallest other magnitude). No bus is used.

A decode of N iterations runs N x (6 bit-node passes + 3 check-node passes), then 6 final
bit-node passes. During the final passes the decisions are streamed out. From the cycle in
which `start` is sampled until `done` takes (9N + 6)(z + 5) + 1 cycles. At z = 96 and
N = 20 that is 18,787 cycles.

## Arithmetic

- **Messages and LLRs**: 6-bit two's complement, saturated to ±31. A zero counts as positive.
- **Check node**: min-sum divided by a normalization factor alpha = 4/3, computed as
  floor(3m/4). Only "a factor greater than one" is prescribed, so the value is a choice of
  this design. The unit finds the smallest and second-smallest magnitudes and the position of
  the smallest, for up to 20 edges in one cycle.
- **Bit node**: the total is kept at full width (12 bits). Only the outgoing messages
  saturate. The decision is 1 when the total is negative.

## Interface (`ldpc_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the control state |
| `llr_we`, `llr_col[4:0]`, `llr_idx[6:0]`, `llr_data[5:0]` | in | load the LLR of codeword bit n = col x z + idx while idle; positive favours 0 |
| `start`, `z[6:0]`, `n_iter[5:0]` | in | start a decode. z is 24..96 in steps of 4; z and n_iter must be held until `done` |
| `busy`, `done` | out | busy for the whole decode; `done` pulses for one cycle |
| `dec_valid[k]`, `dec_col[k]`, `dec_idx[k]`, `dec_bit[k]` | out | module k's decision stream during the final passes. Each bit appears exactly once |

Assertions check that `start` comes only while idle and that no LLR is written during a
decode. The memories are not reset: load all n LLRs before each decode.

## Files

| file | role |
|---|---|
| `rtl/ldpc_pkg.sv` | constants, message and configuration types, base matrix, set placement, memory layout, scenario schedule and its check |
| `rtl/ldpc_decoder.sv` | top: controller, configuration memory, interconnect, four modules |
| `rtl/ldpc_ctrl.sv` | pass and iteration sequencer |
| `rtl/config_mem.sv` | per-pass bank and bus configuration, shifts scaled to z |
| `rtl/ldpc_interconnect.sv` | 20 buses, each a read multiplexer and a write multiplexer over the modules |
| `rtl/proc_module.sv` | one module: 20 banks with read and write address generators, LLR memory, both node units |
| `rtl/cn_unit.sv`, `rtl/bn_unit.sv` | check node and bit node units |
| `rtl/msg_bank.sv` | dual-port bank with two-cycle read latency |
| `rtl/addr_gen.sv` | circular address generator |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ldpc_decoder` is the end-to-end test. It runs at the design's only configuration. It
  decodes noisy all-zero codewords at z = 24, 48 and 96, including a full 20-iteration
  decode of n = 2304. Every decision is compared with a bit-exact reference written in the
  testbench: a plain flooding min-sum over the expanded H, with no notion of banks, buses or
  scenarios. The testbench also checks:
  - the start-to-done cycle count;
  - that moderate-noise codewords decode to zero;
  - that each mechanism happened at least once: scenarios, check-node passes, the first
    pass, transfers between modules, local reads without a bus, and a change of code length;
  - that only buses 0..9 are used, and never within one module.
- `tb_proc_module` loops one module's buses back to itself and decodes a small code. It
  checks each bit-node pass's decisions and their timing.
- The leaf testbenches compare against independent models: bank latency, address sequences,
  min-sum and bit-node arithmetic, bus routing, configuration contents and pass order.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
    --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```

The full end-to-end run takes well under a second.

## Departures and limits

- **Rate 1/2 only.** The architecture is meant to cover every 802.16e rate: 20 banks and
  buses match the 20 edges of a rate-5/6 check node. But only the rate-1/2 tables are in
  `ldpc_pkg`. The rate-1/2 base matrix is the standard's; its first two block rows also
  appear in the published material. Adding a rate means adding its base matrix, set
  placement, memory layout and schedule, and a rate select for `config_mem`.
- **Memory organization and schedule.** The bank of every edge is the published rate-1/2
  organization, with four entries set by this design to meet the constraints above:
  - BS1-0 in bank 3 of M0;
  - BS6-4 in bank 2 of M1;
  - BS9-3 in bank 1 of M1;
  - BS2-6 in bank 1 of M1.

  Only one scenario is published. The other five scenarios, and the modules that process
  BS23, BS2 and BS21, are this design's own.
- **Throughput.** Passes do not overlap, and each pipeline is drained between passes. An
  iteration therefore costs 9(z + 5) cycles: 909 at z = 96. That gives about 9.8 Mbit/s of
  payload at 160 MHz with 20 iterations. The published four-module core reports fewer cycles
  per iteration and 10 to 30 Mbit/s with four or six modules. Overlapping the passes would
  close much of the gap. That needs read-before-write ordering checks between consecutive
  passes.
- **Sizes.** Module, bank and bus counts, bank size, message width and read latency are the
  published ones. The LLR memory, the interface and the pass timing are choices of this
  design, and so is alpha.
