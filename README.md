# A register file and CAM built from reversible gates

This design is a 32-entry, one-byte-per-entry register file in which every
logic function is built from *reversible* gates. These gates have as many
outputs as inputs and map inputs to outputs one-to-one, so no information is
erased. They are the Feynman (CNOT), Fredkin (controlled swap), Toffoli (CCNOT)
and a modified Fredkin gate. Constant inputs (*ancilla*) turn the gates into
ordinary logic functions. Outputs that the function does not need (*garbage*)
are left open. The storage elements are level-sensitive D latches, also made
of reversible gates, so the file needs no clock.

A small content-addressable memory (CAM) is built around the register file as
its application. A 5-bit search word is matched against four stored words. The
index of the matching word then reads the data kept with that word out of the
register file.

The RTL models each reversible gate as a module and wires the gates together
as the circuit describes. Simulation and synthesis therefore see the same gate
structure, but as ordinary CMOS-style Boolean logic. Nothing here models
energy, quantum cost or adiabatic behaviour.

## Files

| file | what it is |
|---|---|
| `rtl/rf_pkg.sv` | sizes (32 x 8 file, 4 x 5 CAM) and the `rf_ctrl_e` read/write type |
| `rtl/feynman_gate.sv`, `fredkin_gate.sv`, `toffoli_gate.sv`, `mfrg_gate.sv` | the gate library |
| `rtl/rf_control.sv` | control line to READ1 / READ2 / WRITE strobes |
| `rtl/rev_decoder.sv` | N:2^N write-address decoder (5:32 by default) |
| `rtl/rev_mux.sv` | 2^N:1 read multiplexer of MFRG cells (32:1 by default) |
| `rtl/rev_dlatch.sv`, `rev_register.sv` | D-latch memory cell and the 8-bit register |
| `rtl/register_file.sv` | the register file |
| `rtl/cam_cell.sv`, `cam_lut.sv` | NOR-type CAM cell and the 4 x 5 look-up table |
| `rtl/cam_encoder.sv`, `cam_decoder.sv` | 4:2 match encoder and 2:4 reversible decoder |
| `rtl/rev_cam.sv` | top level: the CAM with its register file |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The gate library

| gate | inputs to outputs | how it is used here |
|---|---|---|
| Feynman | (a, b) to (a, a^b) | b=1 gives a and ~a; b=0 copies a |
| Fredkin | (a, b, c) to (a, a?c:b, a?b:c) | c=0 splits b into ~a&b and a&b (decoders); feedback on c makes a latch |
| Toffoli | (a, b, c) to (a, b, (a&b)^c) | c=0 gives a&b (write enables, read-port gating) |
| MFRG | (a, b, c) to (a, a?b:c, a?c:b) | 2:1 multiplexer cell whose first output passes the select on |

The MFRG equations are this design's own choice. The source design names the
gate as a Fredkin variant, with input A as the select and the second output as
the multiplexed value. Here it is a Fredkin gate that swaps when the select is
0, so select 1 picks input b.

## Register file

```
 ctrl ─► rf_control ─► read1, read2, write
 waddr ─► rev_decoder (5:32) ─► dec[31:0] ─┐
                             write ────────┴► 32 x Toffoli AND ─► we[i]
 wdata ───────────────────────────────────► 32 x rev_register (8 D latches, en = we[i])
                                                │ q[i][7:0]
 raddr1 ─► 8 x rev_mux (32:1) ─► Toffoli AND read1 ─► rdata1
 raddr2 ─► 8 x rev_mux (32:1) ─► Toffoli AND read2 ─► rdata2
```

**Control.** One control line selects the operation for the whole file.
`rf_control` feeds it into two Feynman gates with constant 1. Gate 1 gives
`read1 = ctrl` and `write = ~ctrl`, and gate 2 gives `read2 = ctrl`. A high
line (`RF_READ`) enables both read ports. A low line (`RF_WRITE`) enables the
write port and disables both read ports, which then output 0. Reads and writes
never happen at the same time.

**Write path.** The 5:32 decoder uses one Feynman gate and 30 Fredkin gates in
five stages of 1, 2, 4, 8 and 16 gates. The Feynman gate turns the most
significant address bit `a` into `a` and `~a`. Each later stage takes the next
address bit `x` as the Fredkin control. Every line from the previous stage goes
on the gate's second input, with a constant 0 on the third. The gate's two data
outputs are then `~x & line` and `x & line`, so each stage doubles the number
of lines. A Toffoli gate per register ANDs the decoder line with `write`; its
output is the latch enable of that register.

**Memory cell.** Each bit is a Fredkin gate plus a Feynman gate. The Fredkin
gate has the enable on its control input, data on its second input and the
stored bit fed back on its third. Its third output is `en ? d : q`. A Feynman
gate with constant 0 copies that value into the cell output and the feedback
line. So the cell is transparent while `en` is high and holds its value when
`en` falls. In the RTL the loop runs through an explicit `always_latch`. As a
result, lint and synthesis see a latch, but they also report the feedback as a
combinational loop. That warning is expected: see the header of
`rev_dlatch.sv`. Eight cells with a shared enable form a register.

**Read path.** Each read port has one 32:1 multiplexer per data bit, 8 per
port. Each multiplexer is a tree of 31 MFRG cells in five stages (16, 8, 4, 2,
1). Within a stage, each cell passes the select line to the next cell on its
first output and hands its multiplexed second output to the next stage. Its
third output is garbage. Stage 1 is selected by address bit 0, and the last
cell by bit 4. A Toffoli gate then ANDs each multiplexed bit with the port's
read strobe.

**Gate count at the default size:**
- Control: 2 Feynman gates.
- Decoder: 1 Feynman and 30 Fredkin gates.
- Write enables: 32 Toffoli gates.
- Storage: 256 Fredkin and 256 Feynman gates.
- Read multiplexers: 2 × 8 × 31 = 496 MFRG gates.
- Read-port gating: 16 Toffoli gates.

### Timing and protocol

There is no clock; every path is combinational or a transparent latch.

- **Read.** Hold `ctrl` high. `rdataN` follows `raddrN` and the stored data
  after the gate delays.
- **Write.** Set `waddr` and `wdata` while `ctrl` is high. Drive `ctrl` low
  for as long as the latches need to capture, then raise it again. Only then
  may `waddr` change: while `ctrl` is low, a change of address opens another
  register's latches. `wdata` must also be stable until `ctrl` has risen,
  because that is when the register closes.
- **Reset.** There is none. Registers and CAM words hold unknown values until
  written.

## Content-addressable memory (`rev_cam`, the top)

```
 key ─► cam_lut (4 x 5 NOR cells) ─► match[3:0] ─► cam_encoder ─► match_addr, found
                                                        │
                                   match_addr ─► cam_decoder (2:4) ─► match_loc
                                   match_addr ─► register_file read port 1 ─► match_data
```

- **`cam_lut`** is a 4-word by 5-bit array of `cam_cell`s. Each cell stores a
  bit in a latch and flags a mismatch with the search bit. A row's match line
  is the NOR of its cells' mismatches, so all four words are compared in
  parallel. The table is written one word at a time through `lut_we`,
  `lut_waddr` and `lut_wword`, level-sensitively like the register file.
- **`cam_encoder`** turns the match lines into a 2-bit index and a `found`
  flag. When several words match, the lowest index wins.
- **`cam_decoder`** is a 2:4 reversible decoder: one Feynman and two Fredkin
  gates, the first two stages of the register file's decoder. It turns the
  index back into a one-hot location (`match_loc`).
- **The index** drives read port 1 of the register file. Register `i` holds
  the data belonging to CAM word `i`, and `match_data` returns it.
  `match_data` reads 0 while the register file is writing.

The register file's write port and its second read port are top-level ports,
so the file can be loaded and inspected independently of searches.

## Where this RTL makes its own choices

The gate-level structure of the register file, its decoder, multiplexer, AND
gates and latch follows the source design. The following were chosen here:

- **Register width.** The width is 8 bits. The source describes one-byte
  registers but also mentions 32-bit register data in one place. The width is
  the `DATA_W` parameter.
- **Read-port enable.** The read strobe gates each output bit through a
  Toffoli gate. The source says only that the strobe enables the multiplexer.
- **Select-bit order.** The multiplexer's stage 1 takes the least significant
  select bit.
- **Decoder bit order.** The decoder treats the first (most significant)
  address bit as the one split by the Feynman gate.
- **CAM encoder.** It has the 4:2 encoder's function with lowest-index
  priority and a `found` output. The source's own encoder is a three-gate
  reversible circuit whose gates are not identified.
- **CAM decoder.** The gates are chosen here to match the stated count of
  three.
- **Connecting the CAM parts.** The index addresses the register file, and
  the decoded one-hot location is an output. The look-up-table write port
  and multiple-match behaviour are also this design's choices.
- **NOR match lines.** They are modelled as logic (XOR and NOR), not as
  precharged dynamic lines.

The source's cost figures for each component (quantum cost, delay, depth,
garbage and ancilla counts) describe the reversible realisation. This RTL
does not model them. The gate and ancilla counts of the decoder (31 gates,
31 ancilla) and of the multiplexer (31 gates, 36 garbage outputs including
the five select lines left at the end of each stage) agree with that
realisation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog that counts a failure
if the test hangs.

- **Gates, encoder and decoders.** All input combinations are tested.
- **Multiplexer.** Every select value is tested with one-hot, one-cold and
  random data.
- **Latch and register.** The tests check transparency while enabled and
  holding while disabled, with the data changing in both phases.
- **Register file.** This test compares against an array model. It writes
  every register, then runs 400 random writes and dual-port reads. Full
  sweeps check that writes do not disturb other registers, and both ports
  must read 0 during writes.
- **`tb_rev_cam`.** This test runs the whole design at its default sizes. It
  does 20 rounds of loading the CAM and all 32 registers, then searching all
  32 keys. It counts look-up-table writes, register writes, hits, misses,
  multiple matches, port-2 reads and reads blocked by writes, and fails if any
  of these never happened.

Each testbench was also run against a deliberately broken copy of its module,
and each one detected the fault.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/rf_pkg.sv tb/tb_rev_cam.sv \
          --top-module tb_rev_cam -Mdir obj_rev_cam
./obj_rev_cam/Vtb_rev_cam +verilator+rand+reset+2
```

Replace `tb_rev_cam` with any other testbench name. `-Wno-fatal` is needed
because Verilator otherwise stops on the latch-loop warning described below.

Lint with `-Wall` gives these warnings, all expected:
- Unused package constants.
- The unused end of each multiplexer stage's select chain (a garbage output).
- `UNOPTFLAT` on the latch feedback loop. Verilator still simulates it
  correctly.

The file sizes are parameters: `DATA_W` and `ADDR_W` on `register_file` and
`rev_cam`, `KEY_W` on `rev_cam` and `cam_lut`. The CAM index is fixed at
2 bits (four words).
