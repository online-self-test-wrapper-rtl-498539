# Online self-test wrapper for a partially reconfigurable FPGA region

FPGAs made in 28 nm processes develop defects over their lifetime. A system
that can reconfigure part of its fabric at run time can also test that part
while the rest of the chip keeps working. It loads the region with a *test
configuration* (TC): many identical copies of one kind of CLB resource (LUTs
as XOR, carry chains, shift registers, LUT RAM, latches...) wired as
C-testable arrays. It drives them with a known stimulus and compares the
copies with each other. If they disagree, the region has a defect and
should not be used again.

This RTL is the static logic around such a region. It is an AXI4-Lite slave
peripheral for an embedded processor such as the ARM core of a Zynq-7000. It
contains:

* a test pattern generator (TPG) and an output response analyser (ORA) for
  each of nine test configurations;
* multiplexers that connect the selected TPG/ORA pair to the region;
* a generator for the two non-overlapping clocks the latch tests need;
* a software reset for the region;
* six registers through which the processor starts tests and reads the
  results.

Two functional modules, an inverter and a 32-bit adder, can also be loaded
into the region. They check that the bus path and reconfiguration work at all.

The processor, the AXI interconnect and the configuration port that writes
partial bitstreams (PCAP/HWICAP) are outside this RTL. So is the real
content of the region: the test configurations are placed FPGA netlists,
not HDL. A behavioural model of the region, `container_interface`, stands in
for it so that the wrapper can be simulated end to end.

## How a test is run

The processor runs the wrapper entirely through registers. For every module
to be tested it does the following:

1. Write the partial bitstream of the module into the region through the
   configuration port. In simulation this is the `pr_config` input of the
   top.
2. Write `0xA` to `C_BASEADDR + 0x100`. This resets `user_logic` and the
   freshly loaded region for 16 clocks.
3. Functional module:
   * write the operands to WR1 and WR2;
   * write Control = `0x1` (MUX_ctrl = 0, Start = 1);
   * read Result_LSB and Result_MSB.

   Test configuration *k*:
   * write Control = `(k << 1) | 1`;
   * poll Status until Done = 1;
   * Flag = 1 means that the copies in the region disagreed, so a defect was
     found.
4. Write Control = 0. This clears the TPG and ORA, so the next test starts
   from scratch. Writing Start = 0 and then Start = 1 repeats a test.

## Register map

The peripheral window is 64 KiB at `C_BASEADDR` (default `0x66E00000`). It
has two ranges:

* `+0x000..0x0FF` holds the registers below;
* `+0x100..0x1FF` is the soft reset.

Any other address in the window returns DECERR.

| Offset | Name        | Access | Contents |
|--------|-------------|--------|----------|
| 0x00   | WR1         | R/W    | operand A for the functional modules (container input `ain`) |
| 0x04   | WR2         | R/W    | operand B (`bin`) |
| 0x08   | Result_LSB  | R      | container output `result_lsb` (functional mode only) |
| 0x0C   | Result_MSB  | R      | container output `result_msb` (functional mode only) |
| 0x10   | Control     | R/W    | [0] Start, [4:1] MUX_ctrl, [31:5] reserved |
| 0x14   | Status      | R      | [0] Done, [1] Flag (error), [31:2] zero |

* All registers reset to 0.
* Byte strobes are honoured on the writable registers.
* Writes to the read-only registers are acknowledged and ignored.
* Offsets 0x18..0xFF read 0.
* Reads of the soft-reset range return 0. Writes there of any value other
  than `0xA` are ignored.

MUX_ctrl selects the test:

| MUX_ctrl | Test | TPG | Region inputs used | ORA inputs |
|---|---|---|---|---|
| 0 | functional (inverter / adder) | WR1, WR2 | all 64 bits | result registers |
| 1 | xor_test | 5-bit counter on `ain[4:0]` | 5 | 2 groups of 4 |
| 2 | xnor_test | 6-bit counter on `ain[5:0]`, toggle on X `ain[6]` | 7 | 2 groups of 4 |
| 3 | carry_test_cout_and_ff | one toggle feeding A4 and X | 2 | 2 groups of 4 |
| 4 | sr_test | toggle on clock enable `ain[7]`, toggle on data `ain[6]` | 2 | 1 group of 4 |
| 5 | ram_test | MATS++: address `ain[5:0]`, data `ain[6]`, write enable `ain[7]` | 8 | 1 group of 4 |
| 6 | latch_test_cy | toggle on X, stepped once per latch-clock period | 1 | 1 group of 4 |
| 7 | latch_test_o5 | as 6 | 1 | 1 group of 4 |
| 8 | carry_test_sum_ff | X toggles, A turns to 1 and holds | 2 | 2 groups of 4 |
| 9 | carry_test_sum_mux | as 8 | 2 | 2 groups of 4 |

The region's port names map onto the 8 low bits as follows:

* `ain[7]` = `en`, `ain[6]` = `in_tpg`, `ain[5:0]` = `in_tpg5..0`;
* `result_lsb[3:0]` = `out_ora0..3`, `result_lsb[7:4]` = `out_oraMUX0..3`.

Tests with two groups also compare the `out_oraMUX` nibble.

## Test hardware (`user_logic`)

`user_logic` holds the registers and the following blocks:

* `clock_generator`;
* nine TPGs;
* `datain_mux`;
* the region (`container_interface`);
* `dataout_mux`;
* nine ORAs.

Only the selected TPG/ORA pair runs, and only while Start = 1. Every other
pair is held cleared. Each TPG raises `done` a fixed number of clocks after
it starts. The count is the length of its pattern plus a flush time, so that
the last pattern reaches the end of the arrays in the region:

| Test | Patterns | Flush | Done after (clocks) |
|---|---|---|---|
| xor | 32 | 16 | 48 |
| xnor | 64 | 16 | 80 |
| carry_cout_ff | 16 | 16 | 32 |
| sr | 32 | 24 | 56 |
| ram | 384 (MATS++ on 64 cells) | 8 | 392 |
| latch_cy, latch_o5 | 16 | 16 | 32 latch-clock periods = 128 |
| carrysum_ff, _mux | 16 | 16 | 32 |

Status is registered. It copies the selected Done and Flag one clock after
they change, and a poll sees Done about two clocks after the TPG finished.

**ORA.** All nine ORAs are the same module. Each group of four outputs
comes from identical arrays, so the four bits must be equal. An XOR tree
reduces the group to one mismatch bit. A sticky flip-flop collects that bit
on every clock while the test runs. Flag in the Status register is
`done & error`: an error is reported only once the test is complete. The
ORA only compares the copies with each other and never with a stored golden
response. A defect that hits all four copies the same way would therefore
not be seen. This is the nature of mutual comparison.

**RAM test.** `tpg_ram` runs MATS++ on the 64 × 1 LUT RAMs:

1. ascending, write 0;
2. ascending, read (0 expected) then write 1;
3. descending, read (1 expected), write 0, read (0 expected).

That is one operation per clock, 6 × 64 = 384 operations. The expected read
value is available on a debug output (`expect_o`/`rd`). The ORA uses only
mutual comparison.

**Latch clocks.** The latch tests need two clocks that are never high at the
same time. `clock_generator` divides the bus clock by four with a 2-bit phase
counter. `clk_0` is high in phase 0 and `clk_1` in phase 2: a 25 % duty cycle
with a 180° shift. Both come straight from flip-flops, so they are free of
glitches. A one-clock `step` strobe in phase 1 tells the latch TPGs when they
may change X, because at that moment no latch of the first stage is open.

**Carry-sum stimulus.** X (`ain[0]`) toggles every clock and starts at 0. A
(`ain[1]`) starts at 0 and turns to 1 one clock after X was first 1, then
stays there. The carry chain therefore sees all four (A, X) combinations.

## The region model (`container_interface`)

This is the part to read with the most care, because it is invented. The
real region holds placed CLB netlists. The model describes what each loaded
module does at the region's ports, so that the wrapper has something
meaningful to drive:

* **Ports.** The ports are the ones a real region must have: `clk`, `clk_0`,
  `clk_1`, `rst`, 32-bit `ain` and `bin`, 32-bit `result_lsb` and
  `result_msb`.
* **`cfg`** (enum `rm_e`) says which of the 11 modules is loaded.
* **`fault`** inverts the outputs of copy 0. This models a defect that only
  one copy has.
* **Inverter:** `result_lsb = ~ain`, `result_msb = ~bin`.
* **Adder:** `result_lsb = ain + bin`, carry out in `result_msb[0]`.
* **Test configurations:** `COPIES` = 4 identical arrays of `LEN` = 8 cells
  of the tested resource, with the array outputs on the ORA bits. The cells
  are XOR/XNOR chains, carry chains, shift chains, one 64 × 1 RAM per copy,
  latch chains, and carry-sum chains with flip-flop or multiplexer outputs.
* **Latches.** The latch chains are real level-sensitive latches, opened
  alternately by `clk_0` and `clk_1`. Synthesis reports them as latches on
  purpose.

Neither `cfg` nor `fault` exists on real hardware. `cut_fault` on the top is
there so that a testbench can check that each test catches a defect. The
model is meant for simulation and is not meant to be synthesised into an
FPGA region.

## AXI4-Lite front end (`axi_lite_ipif`, `soft_reset`)

`axi_lite_ipif` turns each AXI4-Lite transaction into an IPIC cycle. IPIC is
the simple interface that `user_logic` sees. Its signals are:

* `Bus2IP_CS`, one per address range;
* one-hot `Bus2IP_RdCE`/`WrCE`, one per register;
* `Bus2IP_Addr`, `Data`, `BE` (the write strobes), `RNW`;
* the same-clock `IP2Bus_RdAck`/`WrAck`/`Error` replies.

The front end handles one transaction at a time:

* A read and a write arriving in the same clock are served read first.
* `AWREADY` and `WREADY` rise together once both channels are valid.
* The response comes two clocks after the handshake.
* `RVALID`/`BVALID` are held until accepted. Assertions in the module
  check this.
* `IP2Bus_Error` turns into SLVERR.

`soft_reset` acknowledges writes to its range. The key starts a 16-clock
pulse. The pulse is ORed with the bus reset to reset `user_logic` and the
region.

## Where this design departs from the original

* **Latch clock period.** The original derives `clk_0`/`clk_1` from the FPGA
  clock manager at the system clock rate. Here they come from a
  divide-by-four counter, so a latch test takes four times as many clocks.
* **Latch test timing.** In the original, `clk_0` or `clk_1` clocks the
  latch-test TPG and ORA. Which one each gets depends on the number of
  slices in the test. Here both run on the system clock:
  * the TPG changes X only at the phase-1 strobe;
  * the ORA compares the copies on every clock.

  Because the copies are identical, this works for any chain length.
* **Pattern and flush lengths** (table above) are chosen here. Which inputs
  toggle or count, and their bit positions, follow the original test
  descriptions.
* **sr_test phase.** The original says only that the clock-enable and data
  toggles are 180° apart. Here the enable toggles every clock and the data
  toggles while the enable is high. The data is then steady whenever the
  chain shifts, and the chain is loaded with 0,1,0,1…
* **MUX_ctrl codes 1..9** follow the order in which the tests are
  described. The original does not print its encoding.
* **Result registers** are loaded only in functional mode. Status is a
  live copy of the selected Done/Flag. To restart, write Start = 0 and then
  Start = 1.
* **Soft-reset key and width** (`0xA`, 16 clocks) are chosen here.
* **Inverter example values.** The original's published inverter example
  shows result words that are not the bitwise complement of the operands it
  wrote. This design returns the complement. The adder example
  (0x123 + 0x456 = 0x579, Result_MSB = 0) is reproduced exactly.
* **Not built:** the processor, the interconnect, the configuration port,
  the test configurations as FPGA netlists, and the hardware state-machine
  alternative to processor control. The original mentions that alternative
  only as an option.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `selftest_wrapper`, `axi_lite_ipif` | `C_BASEADDR` | `0x66E00000` | peripheral base address |
| `soft_reset` | `RESET_WIDTH`, `RESET_KEY` | 16, `0xA` | pulse length, magic value |
| `tpg_counter` | `WIDTH`, `TOGGLE_X`, `FLUSH` | 6, 1, 16 | counter width (5 for xor), X toggle, flush |
| `tpg_toggle` | `MASK`, `PATTERNS`, `FLUSH` | `0x48`, 16, 16 | toggled bits of `ain[7:0]` |
| `tpg_sr`, `tpg_carrysum` | `PATTERNS`, `FLUSH` | 32/24, 16/16 | |
| `tpg_ram` | `AW`, `FLUSH` | 6, 8 | address width (64 cells) |
| `ora` | `N_IN`, `N_GRP` | 4, 1 | copies per group, groups |
| `container_interface` | `LEN`, `COPIES` | 8, 4 | cells per array, identical arrays |

Shared types and constants are in `selftest_pkg`: the register indices, the
bit positions, the `test_sel_e` and `rm_e` encodings, and the `tpg_vec_t`
stimulus bundle.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. To compile and run one
with Verilator 5 from the repository root:

    verilator --binary --timing --assert -Irtl --top-module tb_user_logic \
        rtl/selftest_pkg.sv rtl/*.sv tb/tb_user_logic.sv
    ./obj_dir/Vtb_user_logic

`tb_selftest_wrapper` is the end-to-end test, and it runs at the default
parameters. It plays the processor over AXI4-Lite and does the following:

* loads modules through `pr_config` and soft-resets them;
* runs the inverter and the adder with fixed and random operands;
* runs all nine test configurations on a clean region (Flag must be 0);
* runs them again with `cut_fault` set (Flag must be 1);
* restarts a running test;
* reloads a module while the bus reset is held, as control software does
  around reconfiguration; all registers must then read 0;
* fails an SR test with a transient defect and passes it on retry;
* checks that an unmapped address gets DECERR.

It counts each of these events and fails if one never happened.

The simulator is two-state, so every register that is read has a reset.
