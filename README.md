# Station Board MCB fan-out FPGA

A correlator Station Board carries 46 FPGAs that are all monitored and
controlled by one small computer card, the PCMC. The card has a single
monitor-and-control bus (MCB): 16-bit address, 16-bit data, chip select,
read/write. One bus cannot be wired to 46 chips, electrically or by level:
the card's FPGA drives 3.3 V and most of the board's chips do not tolerate
it. The fan-out FPGA sits between the two. It

* looks at the top address byte, which names a chip on the board;
* repeats the bus onto **nine separate group buses** of at most seven chips
  each, and raises only the addressed chip's select line;
* returns the addressed chip's read data to the PCMC;
* answers chip address `0x00` itself, with five small registers: board ID,
  firmware version, a read-back test word, the front-panel LED colour, and
  the control of the board's analog monitoring mux.

The logic is tiny on purpose. The device is chosen for its pin count, and
the path through it is meant to be pin-to-pin only (at most 12 ns each way on
the original Virtex-4 SX35 part). So everything except the register writes
is combinational.

## Addressing

`address[15:8]` picks the chip, `address[7:0]` the register inside it.

| chip addr | chip | group | select bit |
|---|---|---|---|
| 00 | this FPGA (internal registers) | — | — |
| 01 | CFG (configuration FPGA) | TC | 0 |
| 02 | WBC (wide band correlator) | bG1 | 6 |
| 03 | IC (input FPGA) | IC | 0 |
| 04, 05 | DMA, DMB (delay modules) | DM | 0, 1 |
| 06 | TC (timing FPGA) | TC | 1 |
| 07, 08 | OUTA, OUTB (output FPGAs) | TC | 2, 3 |
| 09 | VSIA | aG3 | 6 |
| 0A | VSIB | IC | 1 |
| 0B–10 | filter bank A chips 0–5 (UA1–UA6) | aG1 | 0–5 |
| 11–16 | filter bank A chips 6–11 (UA7–UA12) | aG2 | 0–5 |
| 17–1C | filter bank A chips 12–17 (UA13–UA18) | aG3 | 0–5 |
| 1D–22 | filter bank B chips 0–5 (UB1–UB6) | bG1 | 0–5 |
| 23–28 | filter bank B chips 6–11 (UB7–UB12) | bG2 | 0–5 |
| 29–2E | filter bank B chips 12–17 (UB13–UB18) | bG3 | 0–5 |
| 2F–FF | nothing | — | — |

The group index used on every `grp_*` port array is `mcb_pkg::grp_e`:
aG1=0, aG2=1, aG3=2, bG1=3, bG2=4, bG3=5, IC=6, TC=7, DM=8. The groups
hold 6, 6, 7, 7, 6, 6, 2, 4 and 2 chips. The filter groups were laid out for
six chips each. The WBC and VSIA FPGAs were later added to one bank-B and
one bank-A filter group, so those two groups have a seventh select line.

The chip addresses, the group membership and the filter chips' select-bit
order are the board's. Select bit 6 for WBC and VSIA, and the bit order
inside the IC, TC and DM groups (the order in which the chips are drawn),
are choices of this design. Adjust them in `mcb_addr_decode` if the board
wires them differently.

## Bus cycle

The specification of the MCB bus timing lives in a separate document, so
the conventions below are this implementation's:

* `pcmc_cs` and every `grp_cs` bit are **active high**; `rw` high is a
  **read**, low a write (`mcb_pkg::RW_READ` / `RW_WRITE`).
* Bidirectional data are split into `_i`, `_o` and `_oe`. The tri-state pads
  and the 3.3 V-to-lower-voltage translation belong to the I/O cells, not to
  this RTL.
* **Forward path** (combinational). `address[7:0]` and `rw` go to all nine
  groups. The decoded select goes to one group only. Write data appear on
  all group data outputs, but `grp_data_oe` rises only on the addressed
  group and only for a write. No group's data lines are ever driven while
  its chips might be answering a read.
* **Read return** (combinational). During a read, the addressed group's
  `grp_data_i` is routed to `pcmc_data_o`. Chip `0x00` returns the internal
  register. Unmapped chips return `0000h`. `pcmc_data_oe` is high for
  every read with `pcmc_cs` high.
* **Internal register writes** happen at the rising edge of `mcb_clk` while
  `pcmc_cs` is high, `rw` low and `address[15:8] = 00`. `rst_n` (active
  low, asynchronous) resets the registers.

So a read completes within the cycle in which it is presented. An
internal write is visible right after the next rising clock edge.
Immediate assertions guard two bus rules: never more than one group
selected, and never a group driven during a read.

## Internal registers (chip 00h)

| addr | name | access | reset | bits |
|---|---|---|---|---|
| 00h | SBID | R | pins | `board_id[15:0]`: rack, crate and slot straps from the backplanes, read live |
| 01h | FVR | R | 0001h | [7:4] version, [3:0] revision (parameters `VERSION`, `REVISION` of `mcb_regs`) |
| 02h | RBT | R/W | 0000h | any 16-bit word; read back unchanged, to test the bus |
| 03h | CC | R/W | 0000h | [2:1] SBST: front-panel LED 00 off, 01 red, 10 green, 11 orange |
| 04h | AM | R/W | 001Fh | [4:0] AMUX_ADDR, [5] nAMUX_ENA, [6] nAMUX_WR |

Unused bits read 0 and ignore writes. Addresses 05h–FFh read 0. SBST
drives a two-colour LED: `led_red` = bit 1, `led_green` = bit 2, and both
together give orange. The AM fields go straight to the external analog
mux. After reset the mux is enabled (both active-low enables 0) and
selects input 11111b. The mux chooses among the board's supply-voltage and
temperature monitor points; what each input means, and its scale factor,
is a matter for software and the board, not for this logic.

## Where this departs from, or settles, the specification

* **Chip count.** The specification says 47 ICs, and groups of "3 or 4"
  beyond the six-chip ones. Its address table and group drawings give 46
  external chips (47 addresses counting this FPGA) and groups of 2, 4 and
  2. The drawings are followed.
* **Group size.** The stated limit is six chips per group. Two groups carry
  seven because WBC and VSIA were added to them. This is built as drawn, but
  it is an electrical question to check on the board.
* **UB3's address.** One drawing labels filter B chip UB3 with the same
  address as UB2. The address table's `0x1F` is used.
* **RBT.** The specification says both "writes have no effect" and
  "keeps its last value until the next write". The register is built R/W,
  which is what a read-back test needs.
* **FVR.** The reset value `0001h` means version 0, revision 1. The text
  also says the first release is version 1. The parameters default to
  `0001h`.
* **SBID.** Its reset value is given as both `xxxxh` and `0001h`. It is
  built as a live read of the backplane pins, so no reset value applies.
* **Register count.** Described as "four internal registers", but five are
  listed (AM was added later). All five exist.
* **Not built.** The block diagram also shows an interrupt line from the
  timing FPGA and a board-serial-number input entering this FPGA. Their
  function is not defined, so they have no ports. Bus timing (setup, hold,
  strobe widths) is not modelled.

## Files

| file | contents |
|---|---|
| `rtl/mcb_pkg.sv` | widths, group enum, register addresses and reset values, LED colour enum |
| `rtl/mcb_addr_decode.sv` | chip-address decoder: internal select, group and select bit |
| `rtl/mcb_bus_fanout.sv` | nine-way bus repeater with write-enable and read-return mux |
| `rtl/mcb_regs.sv` | SBID, FVR, RBT, CC, AM registers, LED and mux outputs |
| `rtl/mcb_fanout_fpga.sv` | top level |
| `tb/mcb_chip_model.sv` | simulation model of a board chip: 256 registers, word *r* of chip *c* starts as `{c, r}` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog that ends it with a failure if it hangs. For
example, the end-to-end test (the top with its default configuration and
all 46 chip models):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_mcb_fanout_fpga \
  rtl/mcb_pkg.sv rtl/mcb_addr_decode.sv rtl/mcb_bus_fanout.sv \
  rtl/mcb_regs.sv rtl/mcb_fanout_fpga.sv \
  tb/mcb_chip_model.sv tb/tb_mcb_fanout_fpga.sv
./obj_dir/Vtb_mcb_fanout_fpga
```

What the testbenches cover:

* `tb_mcb_addr_decode` checks all 256 chip addresses, with select low and
  high, against an independent per-group list of chips.
* `tb_mcb_bus_fanout` runs 2000 random read, write and idle cycles and
  checks every group output and the read return.
* `tb_mcb_regs` checks reset values, random writes to 00h–07h against a
  shadow model, single-cycle write timing, all four LED colours, the mux
  pins, and a reset during operation.
* `tb_mcb_fanout_fpga` writes and reads back every one of the 46 chips
  through its group. In the same cycle it checks that only that chip's
  select is high and only its group is driven. It also exercises the
  internal registers and the LED colours, sends unmapped addresses and idle
  cycles, and counts bus contention. Every kind of cycle must occur at
  least once.

All four pass. Each of them also fails, as it should, against a copy of its
module with a deliberate bug.
