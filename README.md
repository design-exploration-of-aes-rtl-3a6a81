# Four-lane AES-128 counter-mode accelerator

This is an FPGA-style accelerator that encrypts or decrypts a whole
on-board memory with AES-128 in counter (CTR) mode. It is built for a
board with four independent 32-bit SRAM banks of 2 MB each (8 MB in all),
whose memory cannot be clocked faster than about 33 MHz. The AES logic
itself can run at about 70 MHz.

The design uses two ideas:

* **One lane per memory bank.** Each bank has its own fetch unit, AES
  processor and write-back unit. The four lanes never share data, so four
  blocks are in flight at once.
* **Two clock domains joined by FIFOs.** Fetch and write-back run on the
  slow memory clock. The four AES processors run on the fast core clock.
  Eight FIFOs carry the blocks across, one into and one out of each
  processor. As a result, reading new blocks, encrypting, and writing
  results back all overlap.

CTR mode makes this simple. Every block is encrypted independently by
XOR-ing it with `AES_K(counter)`. The same operation also decrypts, so the
hardware only contains the forward cipher. Running the same job twice
gives back the original data.

At 70 MHz / 33 MHz, the full 8 MB job simulates in 2,039,237 memory
cycles. That is 61.8 ms, or 1086 Mb/s, which is the peak the four cores
can deliver (4 × 128 bit every 33 core cycles).

## Block diagram

```
            +--------------------------- clk_mem (33 MHz) ----------------------------+   clk_core (70 MHz)
 SRAM bank0 |<-> control_ram_if --> mem_retrieve --> async_fifo ==================|==> aes_processor 0
            |   (job regs, timer,                                                 |        |
            |    4 x bank_semaphore,  <-- mem_store <-- async_fifo <===============|========+
            |    bank port muxes)                                                 |
 SRAM bank1 |<->        ...           (same for lanes 1..3)                       |   aes_processor 1..3
   ...      +-------------------------------------------------------------------------+
```

Inside each `aes_processor`:

```
 FIFO entry {idx, data} --> ctr = seed + lane_base + idx --> aes_cipher --> keystream ^ data --> FIFO
 aes_cipher = state register + sub_shift (16 x sbox_rom) + mix_columns + AddRoundKey XOR
              + key_expander (4 x sbox_rom), sequenced by a 6-phase FSM
```

## The AES round engine (`aes_cipher`)

This is the part to read first. The cipher has one round circuit, which
is reused for all ten rounds of AES-128. Each round is split into three
clock cycles:

| cycle | phase  | state register gets                                      | round key register gets |
|-------|--------|----------------------------------------------------------|-------------------------|
| 1     | LOAD   | `blk_in` (the counter value)                             | `key`                   |
| 2     | ARK0   | `state ^ key`                                            | round key 1             |
| 3k    | SBSR   | `ShiftRows(SubBytes(state))`, all 16 bytes at once       | –                       |
| 3k+1  | MC     | `MixColumns(state)`; unchanged in round 10               | –                       |
| 3k+2  | ARK    | `state ^ round key k`                                    | round key k+1           |
| 33    | OUT    | `blk_out <= state`, `done` pulses                        | –                       |

Here k runs from 1 to 10, so the rounds take cycles 3 to 32.

* **SubBytes and ShiftRows share a cycle.** ShiftRows is only wiring, so
  it costs nothing to merge it with SubBytes. SubBytes uses sixteen
  separate S-box ROMs (`sbox_rom`), one per byte, so all sixteen bytes
  are substituted in one cycle. This design reads the ROMs
  asynchronously.
* **MixColumns** (`mix_columns`) needs one `xtime` per byte (multiply by
  {02} in GF(2^8)) and XOR trees. {03}·s is computed as xtime(s) ^ s.
* **The key schedule runs on the fly.** `key_expander` has four S-box ROMs
  of its own. It computes the next round key in the ARK cycle, using the
  round constant `rcon(round+1)`. Only the current round key is stored.
  No 44-word schedule is kept.
* **Round 10 skips MixColumns but still spends the cycle.** This keeps
  every round at three cycles. With the load, ARK0 and output cycles, one
  block takes 33 cycles in total.
* **Handshake.** `start` is accepted only while `ready` is high (idle).
  `done` is a one-cycle pulse after the 33rd edge, counted from the edge
  that sampled `start`. `blk_out` keeps its value until the next result
  arrives.

The S-box contents are not stored in a table file. `aes_pkg::make_sbox_table()`
computes them at elaboration time: first the multiplicative inverse in
GF(2^8) with modulus x^8+x^4+x^3+x+1 (computed as a^254, with 0 mapped to
0), then the affine transform b_i = x_i ⊕ x_(i+4) ⊕ x_(i+5) ⊕ x_(i+6) ⊕
x_(i+7) ⊕ c_i, where c = 0x63. Synthesis therefore still gets a
256 × 8 ROM per instance: 20 per core, 80 in total.

Byte order is the same everywhere. Block bits [127:120] hold AES byte 0.
Byte i sits in row i mod 4 and column i div 4 of the state. A bank block
is four consecutive 32-bit words, and the first word holds bytes 0–3.

## Counter values and how the stream is laid out

A job processes blocks 0 … n−1 of every bank, where n =
`host_blocks_per_bank`. Results are written back over the source blocks.
The four banks together hold one CTR stream:

```
bank l, block b  =  stream block  s = l*n + b
counter(s)       =  host_ctr_seed + s        (mod 2^128)
```

`control_ram_if` computes `lane_base[l] = l*n`. Each FIFO entry carries
the block's index `b` next to its 128 bits. The processor adds
`seed + lane_base + b` to form the counter value. The store block uses
the same index to find the write address. The counter is incremented as
a full 128-bit number, so it is compatible with NIST SP 800-38A CTR.

## Memory side: fetch, write-back and the semaphores

Each bank has a single port, and two units share it. `mem_retrieve`
reads new blocks and `mem_store` writes results back. A `bank_semaphore`
per bank keeps them apart:

* A unit raises `req` and keeps it high for as long as it uses the bank.
  The grant is registered and lasts until the unit drops `req`.
* If both units wait for a free bank, the one that did not hold it last
  wins. A release hands the bank directly to a waiting unit on the same
  edge.
* Fetch only asks for the bank when its input FIFO has room. It then
  issues four reads on consecutive cycles. The bank returns read data one
  memory cycle after each read. The block is pushed into the FIFO in the
  cycle the fourth word arrives. Fetch holds the bank for five cycles per
  block.
* Write-back asks for the bank when its output FIFO has an entry. It pops
  the entry once granted, then issues four writes on consecutive cycles.

On average, fetch plus write-back of one block takes about 13 memory
cycles. That is roughly 390 ns at 33 MHz, which is less than the core's
471 ns per block. So the memory side keeps up and the cores set the pace.
The end-to-end testbench checks this: once the FIFOs are primed, cipher
starts in each lane are exactly 33 core cycles apart.

## Clock crossing

`async_fifo` is a standard dual-clock FIFO. It has a register array,
binary read and write pointers one bit wider than the address, Gray-coded
copies of the pointers, and two-flop synchronisers. Its `full` and
`empty` flags are conservative. The read side is first-word fall-through.

Three configuration values go from the memory domain to the core domain
without a synchroniser: `cfg_key`, `cfg_ctr_seed` and `lane_base`.
Control changes them only when it accepts a new job, and only while every
lane is idle and every FIFO is empty. They are quasi-static. Do not
change this without adding a proper handshake.

## Host interface (`aes_accel_top`)

All host signals are on `clk_mem`.

| signal | dir | meaning |
|--------|-----|---------|
| `host_start` | in | one-cycle pulse. It is ignored while a job is running |
| `host_key`, `host_ctr_seed` | in | 128-bit key and first counter value, latched at start |
| `host_blocks_per_bank` | in | n, from 0 to 2^(BANK_AW−2) |
| `host_busy` | out | a job is running |
| `host_done` | out | the last job has finished. It stays high until the next start |
| `host_cycles` | out | on-board timer: memory cycles the last job took |
| `bank_*[l]` | out/in | synchronous SRAM port of bank l, with read data one cycle after `bank_re` |

`host_done` rises only when all four store blocks have written all of
their blocks. Each clock domain has its own asynchronous active-low reset.

Parameters, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_LANES` | 4 | banks, lanes and AES processors |
| `BANK_AW` | 19 | word address width of a bank (2^19 × 32 bit = 2 MB) |
| `FIFO_DEPTH` | 4 | entries in each of the 2 × NUM_LANES FIFOs |

## Performance

| quantity | this RTL | figure for the original FPGA design |
|----------|----------|-------------------------------------|
| cycles per block, one core | 33 | 33 (0.48 µs at 70 MHz) |
| one core at 70 MHz | 271 Mb/s | 259 Mb/s |
| four cores, memory at 33 MHz, full 8 MB job (simulated) | 1086 Mb/s, 61.8 ms | 1036 Mb/s |

The rates leave out the host's transfers into and out of the board
memory. Those transfers are outside this design.

The RTL does not depend on the clock ratio. With the memory clock held at
33 MHz, simulated runs over 5 jobs each averaged these rates:

| core clock | rate | compared with the core bound |
|------------|------|------------------------------|
| 70 MHz | 1080 Mb/s | within 0.5 % |
| 50 MHz | 773 Mb/s | within 0.5 % |
| 35 MHz | 542 Mb/s | within 0.5 % |
| 140 MHz | 1297 Mb/s | memory-bound |

At 140 MHz the memory side sets the limit: about 13 memory cycles per
block per bank.

## How far to trust it, and where it departs

What follows the original design: four lanes, one per bank; the 33/70 MHz
split; eight 128-bit FIFO channels; four semaphores between fetch and
write-back; 16 parallel S-box ROMs; SubBytes and ShiftRows merged into
one cycle; three cycles per round; 33 cycles per block; AES-128 in CTR
mode.

What is this implementation's own choice:

* how the 33 cycles are split: load, ARK0, 10 × 3, output;
* the on-the-fly key schedule with its own four S-boxes;
* asynchronous S-box ROM reads;
* FIFO depth and construction;
* the 17-bit block index carried next to the 128 bits in each FIFO entry;
* in-place write-back;
* the counter formula and stream layout;
* the semaphore protocol and its priority rule;
* the host register interface and timer;
* the reset scheme;
* the quasi-static configuration crossing.

One known inconsistency in the source: the original design is described
elsewhere as needing 48 cycles per block. This RTL uses 33, which matches
the stated 0.48 µs latency and the stated throughput figures.

Not included: the SRAM chips themselves, clock generation, the PCI/DMA
path from the host, and host software. The testbenches model the SRAM
banks with `tb/sram_bank_model.sv`.

Verification:

* Every block has a self-checking testbench. The reference model
  (`tb/aes_ref_pkg.sv`) is written separately from the RTL. It finds the
  S-box inverse by exhaustive search, computes the affine step with
  rotations, and keeps the full key schedule.
* The checks include the FIPS-197 AES-128 examples, the NIST SP 800-38A
  CTR example, exhaustive S-box comparison, and random vectors.
* The cipher's 33-cycle latency and the processor's 33-cycle block
  interval are checked exactly.
* The end-to-end test runs four jobs: encrypt, decrypt back, an empty job,
  and a whole-bank job. It counts the mechanisms that must occur:
  semaphore contention, fetch stalled by a full FIFO, fetch overlapping
  encryption, all four cores busy at once, and a CTR round trip.
* The full-size test encrypts all 8 MB at the default parameters. It
  checks every word and the throughput.
* Assertions check for FIFO overflow and underflow, semaphore exclusivity,
  writes without the bank, and results that would be overwritten.

## Simulating

Verilator 5 with `--timing` is enough. The packages must come first.
From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_accel_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_aes_accel_top.sv -o sim --Mdir obj_top
./obj_top/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself.
Each also has a watchdog.

| testbench | what it covers | time |
|-----------|----------------|------|
| `tb_sbox_rom`, `tb_sub_shift`, `tb_mix_columns`, `tb_key_expander` | combinational datapath | < 1 s |
| `tb_aes_cipher` | vectors, random blocks, 33-cycle latency | < 1 s |
| `tb_aes_processor` | SP 800-38A CTR, decrypt, back-pressure, 33-cycle rate | < 1 s |
| `tb_async_fifo`, `tb_bank_semaphore`, `tb_mem_retrieve`, `tb_mem_store`, `tb_control_ram_if` | memory side and crossing | < 1 s |
| `tb_aes_accel_top` | end to end, banks reduced to 64 blocks | < 1 s |
| `tb_aes_accel_bench` | 20 jobs: encrypt and decrypt in turn, core at 70/50/35/140 MHz, each checked | < 1 s |
| `tb_aes_accel_full` | full 8 MB job at default parameters | about 10 s |

Building the larger testbenches takes one to two minutes, most of it
C++ compilation.

## Files

`rtl/aes_pkg.sv` holds the shared types and GF(2^8) helpers. Each other
`rtl/*.sv` file holds one module, named after its file. The header
comment of each file describes the module's interface and timing.
`tb/` holds one testbench per module, the AES reference package, and the
SRAM bank model.
