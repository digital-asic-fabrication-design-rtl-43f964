# A multi-project framework for a shared Caravel user area

A shuttle chip has one user area, and a student team has many small designs.
This framework lets up to 32 independent user projects share that user area,
and with it the chip's resources: the management core's Wishbone bus and
128-line logic analyzer port, the 38 GPIO pads and the three interrupt lines.
Only one project is connected to those resources at any time. Firmware on the
management core picks that project by writing its number to a register. It
can also hold any one project in reset without disturbing the others.

Each project is written as if it owned the whole user area. It sees the
standard Caravel user-area signals (`wbs_*`, `la_*`, `io_*`, `user_irq`). The
only rule it must follow is to keep its Wishbone registers below `0x3800_0000`.

## Firmware view

There are two 32-bit registers on the management core's Wishbone bus:

| address       | name          | meaning                                                               |
|---------------|---------------|-----------------------------------------------------------------------|
| `0x3800_0000` | `PROJ_SELECT` | index of the active project; `0xFFFF_FFFF` selects none               |
| `0x3800_0004` | `PROJ_RESET`  | index of the project held in reset; `0xFFFF_FFFF` releases the reset |

Both registers read `0xFFFF_FFFF` after `wb_rst_i`: nothing is selected and
nothing is held in reset. A typical bring-up sequence for project 1 is:

```c
PROJ_SELECT = 0x00000001;   // connect project 1
PROJ_RESET  = 0x00000001;   // hold project 1 in reset ...
PROJ_RESET  = 0xFFFFFFFF;   // ... and release it
// project 1's own registers are now reachable below 0x38000000
PROJ_SELECT = 0xFFFFFFFF;   // disconnect every project
```

A write to `PROJ_RESET` keeps that project in reset until a different value is
written. Any value that is not a slot number (`>= NUM_PROJECTS`) means "none"
in either register. Both registers can be read back. Byte writes through
`wbs_sel_i` are honoured.

## How the selection works

```
                         +------------+   PROJ_SELECT   +---------+  one-hot  +------------+
 Wishbone  --------------> wb_control +-----------------> decoder +-----------> input_gate | x32 --> proj_in[i]
 (from mgmt core)        |            |   PROJ_RESET    +---------+           |  (2:1 vs 0) |
                         |            +-----------------> decoder +-----------> reset OR   |
                         +-----+------+                 +---------+           +------------+
                               | ack / read data
                               v
 shared outputs  <----  OR / select  <----  output_mux (32:1, zero if none)  <---- proj_out[i]
```

The framework has four parts, one module each:

* **`wb_control`** is a Wishbone slave for the two registers. It acknowledges a
  request one clock after `cyc & stb` and drops the acknowledge on the next
  clock, so a request that is held high is acknowledged once per two cycles.
  A write takes effect at the acknowledging edge. Each register is made of four
  8-bit `nbit_register`s, one per byte lane. The module also reports `hit`
  when the address is one of its two registers.
* **`onehot_decoder`** (5-to-32) turns each register's low five bits into one
  line per slot. The top ANDs the lines with "the whole register is below
  `NUM_PROJECTS`". Without that check, `0xFFFF_FFFF` (low bits 31) would
  select slot 31.
* **`input_gate`** (one per slot) makes a 2-to-1 choice between each shared
  input and zero. The active slot sees the Wishbone request, `la_data_in`,
  `la_oenb` and `io_in`. Every other slot sees all zeros, so an inactive
  project never sees a bus cycle or a pin change. The slot reset is
  `wb_rst_i | PROJ_RESET line`. Selection does not gate the reset, so a
  project can be reset whether or not it is active.
* **`output_mux`** (32-to-1) returns the active slot's whole output bundle:
  Wishbone ack and data, `la_data_out`, `io_out`, `io_oeb` and `user_irq`. It
  returns zeros when no slot is selected. So with nothing selected, every
  GPIO has `io_oeb = 0` (enabled as an output) and drives 0.

Two details of the Wishbone path matter when you write a project:

* Requests to the two control addresses are masked before they reach the
  projects (`cyc` and `stb` forced low). A project therefore never answers
  them, and the bus never sees two acknowledges.
* Every other address goes to the active project, whatever its value. The
  acknowledge returned to the management core is the OR of the control ack
  and the project's ack. The read data comes from the control block while it
  acknowledges, and from the active project otherwise. If no project is
  selected, a request to a project address is never acknowledged. The
  management core's bus timeout has to deal with that.

Only the acknowledge and the two registers are clocked. A project's response
reaches the shared pins through one multiplexer in the same cycle.

### What an inactive project does

Inactive projects keep their clock, which they take directly from
`wb_clk_i` / `user_clock2`. Their inputs are all zero. So an inactive project
keeps its state unless its own logic changes it with zero inputs. When it is
selected again it continues from where it stopped. If you need a clean start,
reset it through `PROJ_RESET`. The framework does not gate clocks and does not
reset a project when it is deselected.

## Files

| file | contents |
|------|----------|
| `rtl/framework_pkg.sv` | widths, register addresses, `proj_in_t` / `proj_out_t` / `shared_in_t` slot bundles |
| `rtl/user_project_wrapper.sv` | top: the framework, with `NUM_PROJECTS` slots brought out as ports |
| `rtl/wb_control.sv` | `PROJ_SELECT` / `PROJ_RESET` Wishbone slave |
| `rtl/nbit_register.sv` | N-bit register with write enable and synchronous reset |
| `rtl/onehot_decoder.sv` | binary to one-hot decoder (5-to-32 by default) |
| `rtl/output_mux.sv` | N-to-1 multiplexer with enable (32-to-1 by default) |
| `rtl/input_gate.sv` | input gating and reset combining for one slot |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_tapeout_config.sv` | framework with 8 used and 24 empty slots, bring-up sequence |
| `tb/tb_adder_project.sv` | behavioural Wishbone adder project, used to fill slots in the top-level test |

### Top-level ports

`user_project_wrapper` has the Caravel user-area signal names on the
management side: `wb_clk_i`, `wb_rst_i`, `wbs_*`, `la_data_in/out`, `la_oenb`,
`io_in/out/oeb` and `user_irq`. It has no `analog_io` pins, because the
framework carries no analog signals. The projects are not instantiated inside
it. Each slot is a port instead:

* `proj_in[i]` (`proj_in_t`): `rst`, `cyc`, `stb`, `we`, `sel`, `adr`, `dat`,
  `la_data_in`, `la_oenb`, `io_in`, all already gated.
* `proj_out[i]` (`proj_out_t`): `ack`, `dat`, `la_data_out`, `io_out`,
  `io_oeb`, `irq`.
* `proj_active` and `proj_in_reset` show the decoded state for debugging.

To build a chip, instantiate the projects next to the framework in a wrapper
and connect slot `i` to project `i`. Tie an unused slot's `proj_out[i]` to
zero. It is never selected unless firmware writes its index, and then it
returns zeros.

`NUM_PROJECTS` (default 32) can be lowered. The select width becomes
`$clog2(NUM_PROJECTS)`, and indexes at or above `NUM_PROJECTS` select nothing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. With plain Verilator, for example:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/framework_pkg.sv rtl/*.sv tb/tb_adder_project.sv tb/tb_user_project_wrapper.sv \
  --top-module tb_user_project_wrapper -Mdir obj && obj/Vtb_user_project_wrapper
```

For a unit testbench, replace the last file and the `--top-module` with
`tb_wb_control`, `tb_nbit_register`, `tb_onehot_decoder`, `tb_output_mux` or
`tb_input_gate`.

`tb_user_project_wrapper` runs the framework at its default size, with 32
slots. Every slot holds an instance of `tb_adder_project`. That model has
registers A and B at `0x3000_0000` / `0x3000_0004`, reads A+B at
`0x3000_0008`, and reads its slot number at `0x3000_000C`. The model drives
its logic-analyzer, GPIO and IRQ outputs from its slot number and inputs, so
the testbench can tell which project is driving each shared pin. The test
does the following:

* selects all 32 slots in random order, programs each one and reads it back;
* checks after each change that the shared outputs come only from the
  selected slot and that all 31 other slots receive zeros;
* revisits each slot to show that its state was kept while it was deselected;
* resets one project while another one is active, and resets the active
  project;
* deselects all projects, including with the out-of-range index 32;
* applies the bus reset;
* checks the Wishbone acknowledge latency on every access.

It counts each of these mechanisms and fails if any of them never happened.
The whole run takes well under a second.

`tb_tapeout_config` models the chip as it was built. Slots 0-7 hold eight
projects (the same adder model) and slots 8-31 are empty, with their outputs
tied to zero. The test follows the bring-up sequence for two adder projects:
select, reset, release, add, switch, and reset each project on its own. It
then checks that selecting an empty slot connects nothing.

The RTL holds assertions for the register acknowledge (one cycle after the
request, never two cycles in a row), for at most one active slot, and for
control requests never reaching a project. Compile with `--assert` to check
them.

## Design choices beyond the source description

The framework's structure follows the design it implements:

* up to 32 slots;
* a Wishbone-written select register and reset register at `0x3800_0000` and
  `0x3800_0004`;
* `0xFFFF_FFFF` meaning "none";
* a one-hot decoder driving 2-to-1 selections against zero on every project
  input;
* 32-to-1 multiplexers on every project output;
* all clocks passed straight through.

These points are choices made here:

* **Out-of-range indexes select nothing.** This applies to both registers and
  uses a full 32-bit compare with `NUM_PROJECTS`.
* **Control-register requests are hidden from the projects.**
* **Register timing:** registered one-cycle acknowledge, byte-lane writes,
  read-back, and synchronous reset.
* **One multiplexer for the whole output bundle.** It replaces separate
  multiplexers per resource and has the same function.
* **Slot reset is `wb_rst_i OR` the slot's reset line.** Selection does not
  gate it.
* **Project slots are ports of the top** rather than instantiated projects.

Some parts of the original plan are not here:

* **Shared SRAM:** the 4 × 8-bit OpenRAM macros and their Wishbone wrapper.
* **Separate "large project" slots.**
* **Clock gating of inactive projects.**

The final framework dropped the first two. Clock gating was only ever a
stretch goal. The student projects themselves are also not part of this RTL.
