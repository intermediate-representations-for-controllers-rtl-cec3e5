# Table-driven controllers: one RTL for flexible and fixed control

A chip generator should be able to produce many specialised chips from one
design. Data paths are easy to parameterise; controllers are harder. This
library writes every controller as **tables**: a finite state machine is a
next-state table plus an output table, and a microcoded controller is a
microcode table plus a dispatch table. The tables are the intermediate
representation of the controller. The same RTL can be built two ways:

* **flexible**: `PROGRAMMABLE = 1`. The tables live in writable
  configuration memories. Reset loads default contents and a write port can
  change them at run time.
* **specialised**: `PROGRAMMABLE = 0`. The tables are bound as constant
  parameters. A synthesis tool then folds them into fixed logic by constant
  propagation. A generator only has to emit different table contents, not
  different RTL.

Both builds behave the same for the same table contents, and the testbenches
check this.

The library holds three designs that stand side by side in the top module
`ctrl_ir_top`:

| part | module | what it is |
|---|---|---|
| configurable truth table | `cfg_table` | an m-input, n-output function stored as a 2^m x n table |
| table-based FSM | `table_fsm` | state register plus next-state and output tables (default 5 inputs, 4 states, 3 outputs) |
| microcode sequencer | `ucode_seq` | micro-PC, microcode table, dispatch table, +1 / dispatch mux |
| one-hot example | `onehot_mux` | decoder, flop, AND, mux: logic that is redundant only if you know the flop holds a one-hot value |
| protocol-controller unit | `pctrl_unit` (`pctrl_arb`, `pctrl_dispatch`, `pctrl_fifo`) | arbiter, microcoded Dispatch block and queues for four data pipes |
| shared package | `ctrl_pkg` | types, microinstruction layout, table-building functions |

## The table primitive (`cfg_table`)

Any function with `AW` inputs and `DW` outputs is its truth table, `DW` bits
wide and `2**AW` entries deep. The inputs are the address. The read is
combinational, like an asynchronously readable memory.

* Flexible build: the table is an array of flops. A synchronous reset loads
  `INIT`. Each write (`wr_en`, `wr_addr`, `wr_data`) changes one entry at the
  next rising edge.
* Specialised build: `data = INIT[addr]`. The write port is ignored.

`INIT` is a packed vector with entry `i` at bits `[i*DW +: DW]`. The defaults
(`AW = 7`, `DW = 3`) are the output table of the FSM below.

## Table-based FSM (`table_fsm`)

The state register has `SW = clog2(S)` bits. Two `cfg_table`s are addressed
by `{state, in}`, with the state in the high bits:

* the next-state table, `SW` bits wide;
* the output table, `N` bits wide.

With the default `M = 5`, `S = 4`, `N = 3`, each table has 7 address bits and
128 entries. `MEALY = 0` addresses the output table by the state alone
(Moore outputs). Reset is synchronous and puts the FSM in state 0. In the
flexible build, reset also reloads the tables. So program the tables after
reset, or pass the wanted contents as `NS_INIT` / `OUT_INIT`.

State counts that are not a power of two (3, 17, ...) leave unused state
codes. No table entry should name one of them.

## Microcode sequencer (`ucode_seq`)

```
opcode --> [dispatch table] --+--> mux 0 \
                              |           >--> micro-PC --> [microcode table] --> uinstr
           micro-PC + 1 ----------> mux 1 /                         |
                                    select = uinstr[SEQ_BIT] <------+
```

The next micro-PC is chosen by one bit of the microinstruction, `SEQ_BIT`:

* 1 steps to micro-PC + 1.
* 0 jumps through the dispatch table, which maps each opcode to the start of
  its routine.

Every jump is therefore a dispatch, and the dispatch table stays small. `en`
low holds the micro-PC, which is a stall. Reset sets the micro-PC to 0.
`uinstr` is combinational from the micro-PC.

The generic defaults (`OPC_W = 4`, `UPC_W = 5`, `UW = 16`) are placeholders.
The protocol controller uses 3 / 6 / 14.

## Protocol-controller unit (`pctrl_unit`)

This is the realistic example. It is one functional unit of a cache and
protocol controller shared by four two-processor tiles. The unit moves cache
lines between the tiles' local memories. The timing of every transfer depends
on the cache line size and on the access width (single or double words), and
that timing is not wired in: it is microcode.

```
 3 requesters -> pctrl_arb -> pctrl_dispatch -+-> in-queue 0 -> [data pipe 0] -> out-queue 0 -> other units
 (valid/ready)  round robin   (ucode_seq)     +-> in-queue 1 -> [data pipe 1] -> out-queue 1 ->
                                              +-> in-queue 2 -> [data pipe 2] -> out-queue 2 ->
                                              +-> in-queue 3 -> [data pipe 3] -> out-queue 3 ->
                                              +-> reply_valid / reply -> [processor reply FSM]
```

The data pipes and the processor reply FSM are not part of this RTL. Their
connections are ports:

* `pipe_cmd_*` goes out to the pipes.
* `pipe_rsp_*` comes back from the pipes.
* `reply_*` goes to the reply logic.

### Requests and commands

A request (`ctrl_pkg::pctrl_req_t`, 43 bits) holds these fields:

* `op` (3 bits);
* source pipe `src` (2 bits);
* destination pipe `dst` (2 bits);
* a line-aligned word address `addr` (32 bits);
* a `tag` (4 bits).

The opcodes are:

| `op` | meaning | steps (B = LINE_WORDS / (DBL ? 2 : 1)) |
|---|---|---|
| 0 `OP_NONE` | nothing; taken and dropped, no reply | - |
| 1 `OP_LINE_RD` | read the line from pipe `src` | B |
| 2 `OP_LINE_WR` | write the line into pipe `dst` | B |
| 3 `OP_LINE_XFER` | cache-to-cache move from `src` to `dst`; writes trail reads by 2 steps | B + 2 |
| 4 `OP_WORD_RD` | one single-word read from `src` | 1 |
| 5 `OP_WORD_WR` | one single-word write into `dst` | 1 |
| 6, 7 | unsupported: reply with `err` | 1 |

In the uncached mode, line operations are also answered with `err`.

Each step sends at most one command per pipe (`pipe_cmd_t`, 71 bits). A
command holds the `rd` and `wr` flags, `dbl`, `rd_addr`, `wr_addr` and the
`tag`. A read and a write to the same pipe in one step (a transfer whose
`src` equals `dst`) share one command.

### Microinstruction format

The microinstruction is `ctrl_pkg::uinstr_t`, 14 bits, horizontal:

| bits | field | meaning |
|---|---|---|
| 13 | `err` | reply with the error flag |
| 12 | `last` | last step of a routine: pulse `reply_valid` |
| 11 | `dbl` | double-word access for this step's commands |
| 10:7 | `wr_off` | word offset of the write |
| 6:3 | `rd_off` | word offset of the read |
| 2 | `wr` | write to pipe `dst` at `addr + wr_off` |
| 1 | `rd` | read from pipe `src` at `addr + rd_off` |
| 0 | `seq` | 1: next micro-PC = +1; 0: dispatch on the incoming opcode |

### How a request runs

1. The idle microinstruction (address 0) has `seq = 0`. Each cycle it
   dispatches on `req_valid ? req.op : OP_NONE`. In a cycle where a
   microinstruction with `seq = 0` executes, `req_ready` is high. The offered
   request is then taken and latched, and the micro-PC jumps to its routine.
2. Each step of the routine issues the commands in its fields. The addresses
   are the latched line address plus the offsets.
3. The last step has `last = 1`, which sends the reply. It also has
   `seq = 0`, so a waiting request is taken in the same cycle. Requests run
   back to back without idle cycles.
4. Suppose a step addresses a queue that cannot take a command. Then the
   whole step waits: the micro-PC holds, nothing is issued and no request is
   taken. A command is never offered to a full queue.

**Timing.** Take a request accepted in cycle t, with no stalls:

* its first commands enter the input queues at the end of cycle t + 1;
* a line read with B beats replies in cycle t + B;
* a transfer replies in cycle t + B + 2;
* a word operation replies in cycle t + 1.

A queue adds one cycle before the pipe sees the command.

### Microprogram layout and configurations

`ctrl_pkg::build_ucode(line_words, dbl, cached)` computes the microcode table
and `ctrl_pkg::build_dispatch(...)` the dispatch table:

| address | routine |
|---|---|
| 0 | idle |
| 1 | error reply |
| 2 | line read (cached only), B steps |
| 2 + B | line write (cached only), B steps |
| 2 + 2B | line transfer (cached only), B + 2 steps |
| next | word read |
| next + 1 | word write |

The tables have these sizes:

* Cached, 8-word lines, single-word access (the default): 30 of the 64
  entries.
* Cached, 16-word lines, single-word access: 54 entries (double-word
  access halves the steps: 30).
* Uncached: 4 entries.

Line sizes up to 16 words fit the 4-bit offsets and the 64-entry table.

`pctrl_unit` parameters:

* `LINE_WORDS` (default 8);
* `DBL` (default 0);
* `CACHED` (default 1);
* `PROGRAMMABLE` (default 1);
* `QDEPTH` (default 4).

With `PROGRAMMABLE = 1` the tables are loaded at reset. They can be replaced
while the unit is idle through `disp_wr_*` (8 entries of 6 bits) and
`uc_wr_*` (64 entries of 14 bits). To change configuration without
re-synthesis, wait for the unit to drain, then write both tables. The
end-to-end test does this three times. With `PROGRAMMABLE = 0` the same
tables become constants, and the unit can only run the configuration it was
built for.

### Arbiter and queues

`pctrl_arb` is round robin. After an accepted transfer, the requester just
served drops to the lowest priority. `out_valid` depends only on the request
valids, so there is no combinational loop through the Dispatch block.

`pctrl_fifo` is a circular buffer with a count. `in_ready` is low only when
the queue is full and nothing is being popped. An item pushed in one cycle is
visible at the output in the next.

## The one-hot example (`onehot_mux`)

`in` is decoded to one-hot and registered as `y`. The AND of all bits of `y`
selects a mux between `y` (input 0) and zero (input 1). While `y` is one-hot
(N >= 2) the AND is always 0. The mux and the AND are then dead logic, but
proving that needs the fact that `y` is one-hot after the flop.

That fact is a property of the signal's encoding, and a synthesis tool does
not carry such properties across a register by itself. The module states it
as an assertion, `a_y_onehot`. `RESET_MODE` selects no reset, a synchronous
reset or an asynchronous reset to zero, and `N` sets the width. The output
follows the input one clock later.

## Where this RTL departs from or adds to the description it follows

* **Not included:** the data pipes and the processor reply FSM. Only their
  place in the unit is known, so their signals are ports.
* **Own choices in the protocol controller:**
  * the request/command/reply formats and all widths;
  * the microinstruction fields and the routine layout;
  * the 2-step lag in transfers;
  * the stall rule and the error reply;
  * round-robin arbitration;
  * queue depth 4;
  * the default 8-word line.
* **Uncached mode:** it is modelled as "word operations only", which matches
  the statement that uncached memory needs far fewer controller states.
* **Programming the tables:** the reset load of the tables, the one-entry
  write ports and the sequencer's stall input are additions.
* **Encoding annotations:** the original flow passes state-encoding knowledge to
  synthesis with tool commands. RTL cannot carry those, so the one-hot
  property is an assertion here.
* **Area and timing:** no area or clock-rate figures are reproduced. The structures are given so that
  the flexible and specialised builds can be synthesised and compared.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and ends with
`$finish`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ctrl_pkg.sv \
          tb/tb_ctrl_ir_top.sv --top-module tb_ctrl_ir_top -o sim
./obj_dir/sim
```

Swap in any other testbench name. Files are found by module name through
`-Irtl -Itb`. The testbenches are:

| testbench | covers |
|---|---|
| `tb_cfg_table` | reset contents, combinational read, write timing, constant build ignores writes |
| `tb_table_fsm` | default-size FSM with random tables written through the ports, constant and Moore variants, against a model |
| `tb_ucode_seq` | sequencing, dispatch and stalls against a micro-PC model, flexible vs constant build |
| `tb_onehot_mux` | all three reset styles, widths 2, 8 and 128 |
| `tb_pctrl_arb`, `tb_pctrl_fifo` | arbiter rotation and grants; queue against a model, including full-queue pushes |
| `tb_pctrl_dispatch` | four configurations (8/16-word, single/double, cached/uncached, flexible/constant); each step's commands, reply latency, stalls, back-to-back dispatch, error replies |
| `tb_pctrl_unit` | whole unit, behavioural data pipes, random back-pressure, three microcode reprogrammings (mode switches) |
| `tb_pctrl_specialised` | the unit with constant microcode (`PROGRAMMABLE = 0`) in cached, uncached and cached 16-word double-word builds |
| `tb_ctrl_ir_top` | whole design at default parameters: the unit as above, the FSM programmed twice and run against a model, the one-hot example |
| `tb_sweeps` | all table sizes 2..1024 deep x 2..64 wide, all FSM sizes m in {2,8}, n in {2,8,16}, s in {2,3,8,16,17}, one-hot widths 2..128 in all reset styles |

The unit tests use `pctrl_harness` and `dispatch_harness`. They check against
models written from the request semantics, not from the microcode tables. The
tables are built only to program the hardware. `tb_sweeps` takes about a
minute to compile because it builds 86 instances.

## Changing the design

* **A new cache configuration:** call `build_ucode` / `build_dispatch` with
  other arguments, or extend them. Keep the routine start addresses in
  `routine_start` consistent with the layout.
* **A new operation:** add an opcode to `op_e`, a routine to `build_ucode` and
  its start to `routine_start`. If the operation needs new control, widen
  `uinstr_t` by a field and decode it in `pctrl_dispatch`.
* **A specialised controller:** set `PROGRAMMABLE = 0` on `pctrl_unit`,
  `table_fsm` or `ucode_seq`.
