# 1 kbit asynchronous SRAM with self-holding control

A small static RAM (1024 one-bit words) whose control unit runs every access by
itself. The user gives an address, a read/write choice and, for a write, the
data bit, and pulls chip select low. From then on the control unit holds
everything the access needs: the address, the operation and the data bit. It
produces the precharge, word-line, sense-enable and write-enable signals
internally. A read result stays on the output until the next read. So there is
no sense-enable pin, no output-enable pin, and no requirement to keep the inputs
stable after the request has been taken. That is what "self-holding" means here.

The organisation follows the classic SRAM block diagram:

```
 addr[9:5] -> row decoder ----- R[31:0] ------> cell array (32 x 32)
                                                  |  bitline pairs BL/BLB
                                   pull-up circuitry (precharge) on the bitlines
 addr[4:0] -> column decoder -- C[31:0] ------> column multiplexer
                                                  |  data lines DATAP / DATAN
 din -> data in buffer -> write driver <----------+----------> sense amplifier
                              | write_ack                  |  valid   | bit
                              v                            v          v
 csnb, wenb ------------> control unit --- dout_load ---> data out buffer -> dout
```

What the RTL follows and what is this implementation's own:

- **Taken from the design:** the 1 kbit capacity; the blocks and how they connect
  (decoders, cell array, pull-ups, multiplexer, write driver, sense amplifier,
  data in/out buffers, control); the active-low pins CSNB and WENB; DataIn and
  OUTPUT; the data-line pair DATAP/DATAN; the completion arrows from the write
  and sense blocks into the control; and dropping sense-enable and output-enable
  as pins.
- **Chosen here:** the 32 x 32 arrangement and 1-bit word; the address split
  (row = `addr[9:5]`, column = `addr[4:0]`); a clock for the control unit; the
  two-phase access sequence; the reset; and the logic stand-ins for the analog
  parts (pull-ups, sense amplifier, write driver).

## The access sequence

The control unit (`control_unit.sv`) alternates between two phases. Each lasts
at least one `clk` cycle.

| phase      | bitlines   | word line / column | sense amp | write driver |
|------------|------------|--------------------|-----------|--------------|
| PRECHARGE  | pulled up  | off                | off       | off          |
| ACCESS     | released   | on (captured addr) | on (read) | on (write)   |

- **Accept.** In PRECHARGE, a rising `clk` edge that sees `csnb` low accepts a
  request. At that edge the address and the operation (`wenb`) go into the
  control unit's registers. For a write, `din` goes into the data in buffer.
  From the next cycle on, all inputs may change freely.
- **Access.** The selected word line and column are turned on.
  - On a read, the selected cell pulls one line of its bitline pair low. The
    multiplexer passes that pair onto DATAP/DATAN. The sense amplifier raises
    `valid` once the two lines differ.
  - On a write, the driver pulls DATAP low for a 0 or DATAN low for a 1. It
    raises `write_ack` once the lines show the bit.
- **Completion.** ACCESS ends at the first edge at which the active block
  reports completion (`valid` for a read, `write_ack` for a write). On a read,
  the same edge loads the sensed bit into the data out buffer. On a write, the
  same edge writes the cell. Without completion the control unit stays in
  ACCESS. In this RTL, completion always comes in the first access cycle.
  The wait path is still real logic, and its testbench exercises it.

Timing seen from the pins:

```
clk edge      k            k+1           k+2          k+3
csnb          low          (ignored)     low          ...
              request      access        next request access
              captured     completes     captured     completes
dout                       = read bit, held until the next read completes
```

With `csnb` held low, one operation completes every two cycles. A `clk` of
133 MHz therefore gives 66 MHz operations, the rate of the original transistor
design. Gate delays and the 2.85 ns access time of that circuit are not
modelled.

`dout` changes only at the completion edge of a read. Writes, idle cycles and
deselect leave it unchanged. Reset clears it to 0.

## How the analog parts are represented

The model is two-state. A bitline pair carries data only when one of its two
lines is low.

- **Cell array (`cell_array.sv`).** A cell on a raised word line pulls BL low if
  it stores 0 and BLB low if it stores 1. The outputs are these pull-down
  requests. A cell is written at the rising `clk` edge when both its word line
  and its column write strobe are high. The cells are clocked bits, not the
  cross-coupled latches of silicon. They are not reset.
- **Pull-up circuitry (`bitline_pullup.sv`).** `bl = precharge | ~bl_pd`. During
  precharge both lines of every pair read 1, which carries no data.
- **Column multiplexer (`column_mux.sv`).** DATAP/DATAN copy the selected pair,
  or read 1/1 when no column is selected. When the write driver pulls a data
  line, the driver wins: the data lines take its levels, and the selected column
  gets its write strobe with the driven bit.
- **Sense amplifier (`sense_amp.sv`).**
  - `q = se & DATAP`.
  - `valid = se & (DATAP ^ DATAN)`.
- **Write driver (`write_driver.sv`).** Pulls one data line low. Acknowledges
  when DATAP equals the bit and DATAN its complement.

Because precharge and word line are never on together, no cell fights a
pull-up. Assertions in `control_unit.sv` check this. Assertions in `sram_1k.sv`
check that at most one word line and one column are ever selected.

## Files

| file | block |
|------|-------|
| `rtl/sram_pkg.sv` | sizes (`ROWS`, `COLS`), `ctrl_t` control bundle, `state_t` |
| `rtl/sram_1k.sv` | top: ports `clk, rst_n, csnb, wenb, addr[9:0], din, dout` |
| `rtl/control_unit.sv` | self-holding control, two-phase FSM with completion feedback |
| `rtl/row_decoder.sv`, `rtl/column_decoder.sv` | one-hot decoders with enable |
| `rtl/cell_array.sv` | 32 x 32 storage, bitline pull-down outputs |
| `rtl/bitline_pullup.sv` | precharge / pull-up of the bitline pairs |
| `rtl/column_mux.sv` | bitline pair to data lines, write strobe steering |
| `rtl/write_driver.sv`, `rtl/sense_amp.sv` | data-line drive and sensing, with completion |
| `rtl/data_in_buffer.sv`, `rtl/data_out_buffer.sv` | input capture, self-held output |

`ROWS` and `COLS` are parameters of the top and of the array blocks. Any powers
of two work, and the address width follows them. The defaults give the 1 kbit
memory.

## Departures and limits

- **Clock.** A clock drives the control unit. The source design calls itself
  asynchronous because the user does not time operations against clock edges.
  Its control unit still synchronises the inputs internally. Here that
  synchronisation is a plain `clk` sample. A request must therefore meet set-up
  time to the accepting `clk` edge. It needs no hold time after that edge.
- **Write data.** For a write, DataIn must be valid at the accepting edge,
  together with WENB. In the classic asynchronous write timing, the data can
  follow WENB.
- **No OEB pin.** There is no output-enable pin. The general SRAM diagram has
  one; this design drops it, and `dout` is always driven.
- **Not modelled.**
  - Analog behaviour: bitline swing, sense margins, timing.
  - The speed comparison with a version without the self-holding control.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/sram_pkg.sv tb/tb_sram_1k.sv --top-module tb_sram_1k
./obj_dir/Vtb_sram_1k
```

`tb_sram_1k` runs at the default size. It writes all 1024 bits, reads them
back, and then runs 3000 random operations with idle gaps. After every edge it
checks `dout` against a reference memory. It also checks the
two-cycle timing and that `dout` holds its value. During every access cycle it
scrambles the inputs, to show that they are not needed after acceptance. It
counts each mechanism (back-to-back operations, idle cycles, output held across
writes and idle cycles, inputs changed during access) and fails if one never
occurs. `tb_control_unit` drives random completion signals to cover the wait
path.
