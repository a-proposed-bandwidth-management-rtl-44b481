# Burst-level bandwidth management for multicast ATM networks

ATM links carry bursty traffic: a file transfer may send a burst of a
thousand cells at a high peak rate, then nothing for seconds. Switch buffers hold
only a few hundred cells, so buffer space cannot be given out by average rates.
It cannot be set aside for every circuit's peak rate either, because then most
of it would sit unused. This design handles the problem **per burst**:

* At each switch output, a circuit **reserves buffer slots when its burst
  starts**. The start is signalled by a *start* cell. The reservation is
  released by the *end* cell or by a timeout. The switch accepts or refuses the
  burst in one cell time, with no signalling messages. If it refuses, the
  burst's cells are discarded.
* At the **user–network interface**, a token pool per circuit checks that the
  user keeps to the peak and average rates it declared. Cells that break the
  contract are marked or discarded, and the user is sent flow control.
* **Multicast circuits with several sources** share one bandwidth budget.
  Each source counts its bursts with *begin* and *end* cells. Each access point
  also charges the circuit's pool for cells it delivers towards its user.

The RTL covers both ends of a reference connection:

* the **access resource manager** (ARM) at the host's network interface;
* one **switch output port**: the translation table and the **integrated
  buffer controller**, which is the internal resource manager (IRM) at the
  output buffer.

Everything is synthesizable SystemVerilog. Each testbench runs under plain
Verilator.

```
 host ──► ARM (tp_pred / tp_unpred) ──► [switch fabric] ──► VCXT ──► IBC ──► link
   ▲          ▲  flow control                      (not built)   RMI    │
   └──────────┴──── cells leaving the network ◄──────────────────────────┘
```

## Cell types

Every managed cell carries a type (`atm_pkg::pt_e`):

| type   | meaning at a switch |
|--------|---------------------|
| start  | asks for a reservation for this circuit's burst |
| middle | part of a reserved burst |
| end    | last cell of the burst; releases the reservation |
| loner  | not part of a burst; always queued as *excess* (discardable) |
| begin  | like start, for multi-source circuits; counted per source |

Circuits are split into two classes:

* **Predictable** circuits are constant-rate circuits, or bursty ones with a
  low peak rate. The switch does not reserve buffers for them. They carry the
  reserved resource management index (RMI) 0 and pass the reservation logic
  unmarked. Their share of the buffer is taken out of `B` when the switch is
  configured.
* **Unpredictable** circuits are bursty circuits with a high peak rate. Each
  one has an entry in the switch's buffer allocation table (BAT).

## The switch output: integrated buffer controller (`ibc`)

### One memory, two buffers, no copying

The output port has a single cell memory of `NRQ + NXB` slots. The defaults
are 64 + 192 = 256. The memory is shared by two buffers:

* a **resequencer** (`reseq`, 64 records). The fabric may deliver cells out of
  order, so they wait here until they are older than `AGE_TH`;
* a **transmit buffer** (`xmbc`, 192 control slots), which sends cells in
  arrival order.

A cell never moves in memory. Each resequencer record and each transmit
control slot owns exactly one memory slot number. When a cell passes from the
resequencer to the transmit buffer, the two sides **swap slot numbers**:

* the cell's slot number goes into the transmit buffer;
* a free slot number from the transmit buffer (register Z) goes back into the
  resequencer record that was just emptied.

This invariant is the key to reading `ibc.sv`: slot numbers are only swapped,
never created or lost.

### The operation cycle

One operation cycle handles at most one cell arriving and one leaving, in three
clocks. The published description numbers the phases 1 to 3; here they are
0 to 2, the value of the `phase` output:

| phase | what happens |
|-------|--------------|
| 0 | The oldest resequencer record moves into X, if it is older than `AGE_TH` and the transmit buffer has an idle or excess slot. The head of the transmit buffer is offered on `out_*`. With `out_ack`, it is sent and its slot goes back idle. |
| 1 | The BAT and its state machine decide on X: discard, admit unmarked, or admit marked (excess). A discarded cell's slot number simply stays with its emptied resequencer record. The result goes to register Y. The circuit's timer is started, restarted or removed. Z takes the slot that Y will occupy. All ages advance. |
| 2 | Y is written into the transmit buffer (details below) and Z goes into the resequencer. An arriving cell (`in_valid`, `in_ready` is high in this phase) takes a free resequencer record, preferably the one X left. It is dropped if no record is free or if it is already too old. An expired timer releases its circuit. The cell-time clock `tclk` advances. |

How Y enters the transmit buffer in phase 2:

* **Idle slot free:** Y is written into the idle slot.
* **Buffer full, Y unmarked:** Y **overwrites the leftmost excess cell**, the
  excess cell queued most recently. That cell is lost (`ev_overwrite`).
* **Buffer full, Y marked:** Y is dropped (`ev_drop_ex`). Its slot number
  stays with the emptied resequencer record, as for a discarded cell.

### Fast buffer reservation (`bat_sm`)

Each BAT entry holds three fields:

* `B_i`: the number of slots the circuit needs;
* `b_i`: the number of its unmarked cells now in the buffer;
* `s_i`: its state, idle or active.

The port also keeps `B`, the number of slots not yet reserved. The decisions:

* **idle, start/begin:**
  * If `B ≥ B_i` and a timer is free, the circuit becomes active and `B -= B_i`.
  * Otherwise the cell is discarded and the circuit stays idle.
* **idle, middle/end:** discarded. The burst was refused.
* **active, any type:** the timer is restarted.
* **active, end:** the circuit becomes idle, `B += B_i` and the timer is
  removed.
* **timer expiry:** the circuit becomes idle and `B += B_i`. This covers lost
  end cells.
* **marking of admitted non-loner cells:** a cell is unmarked while
  `b_i < B_i`, and `b_i` counts up. Otherwise it is marked. `b_i` falls when an
  unmarked cell of the circuit is transmitted.
* **loners:** always marked.
* **RMI 0:** passes unmarked, without any of the above.

### Transmit buffer controller (`xmbc`, `xmbc_slot`)

The controller is a chain of control slots. Each slot holds three things:

* a busy bit;
* an excess bit;
* a memory slot number.

The slots are ordered for transmission:

* the rightmost slot is the next to send;
* busy slots are packed to the right;
* idle slots are on the left.

Two prefix chains run left to right:

* `lex/rex` finds the **leftmost excess** slot;
* `rbi` finds the **rightmost idle** slot.

The strobes `ld1`, `ld2`, `ld3`, `mxs`, `oe1` and `oe2` perform the three
operations, each in one clock:

| op | effect |
|----|--------|
| read | Every slot shifts right. The head's slot number re-enters at the left as an idle slot. |
| write | The rightmost idle slot becomes busy with the new excess bit. Its slot number is put on the bus. |
| overwrite | The leftmost excess slot is removed. Everything to its left shifts right. The new cell enters at the left end of the busy part, reusing the removed cell's slot number, which is put on the bus. |

The chains are built from one signal per generate block rather than a packed
vector. This keeps the simulator from seeing a false combinational loop.

### Timers (`timer_bank`, `timer_slot`)

The timer bank uses the same slot-chain idea. Each slot holds a busy bit, an
8-bit expiry time and an RMI. Busy timers sit in expiry order, with the head at
the right end.

* **Start:** a new timer is written into the rightmost idle slot. All timers
  share one timeout, so this keeps the order.
* **Remove:** an `lmatch/rmatch` chain finds the slot holding the RMI. Every
  slot on its left shifts right over it.
* **Restart:** remove and start together, in one clock.
* **Expiry test on the head:** the check is `now - head_time` with its sign
  bit clear, which is a modular "≥". **Any time span the bank handles must
  therefore stay under 128 cell times.**

## The access side: token pools (`arm`, `tp_pred`, `tp_unpred`)

### Minitokens

A pool does not add tokens every cell time. It brings itself up to date when a
cell arrives:

```
Q := min(P, Q + (T − t)·2^K);   t := T
```

* Time `T` is the cell-time clock.
* One token, the right to send one cell, is `INC = 2^K / rate` minitokens.
* The factor 2^K is a shift.
* `K = 8` lets rates be set to about 1/256 precision.

### Predictable circuits (`tp_pred`)

Each predictable circuit has an average pool: 32-bit `P` and `Q`, 24-bit `INC`
and `t`.

* If `Q ≥ INC`, the cell passes and `Q -= INC`.
* Otherwise the cell is marked and a flow-control request (`ent_fc`) is raised.

The peak rate is checked at the same time. A mode bit per circuit chooses how:

* a second small pool (`K = 6`, 12-bit fields);
* or a spacing monitor, which requires `T − t ≥ d`.

A cell is marked if either check fails.

For multi-source circuits (`msrc`), cells delivered to the user are charged to
the same average pool. `Q` can therefore go negative, so it is signed and held
at its minimum rather than wrapping.

### Unpredictable circuits (`tp_unpred`)

This pool has to mirror the switch's reservation. While the circuit is active
it drains at the peak rate λ, and it fills at the average rate μ. The ratio
λ/μ is stored as `z·2^h`, with a 4-bit `z` and a signed 6-bit `h`. The update
is then a small multiply and a shift:

```
Q := min(P, Q + dt·2^K − [active]·((dt·z) << (h+K)))
```

Entering cells follow the same state machine as the switch, with a tokens
test added:

* **loner:** passes.
* **idle, start/begin:** becomes active if `Q ≥ INC` and a timer is free.
  Otherwise the cell is discarded.
* **idle, middle/end:** discarded.
* **active:** `begin` counts `s` up and `end` counts it down.
* **active, closing:** the burst closes on an `end` with `s = 1`, or on any
  cell once `Q < INC`. The cell is then **re-typed as an end cell**, `Q -= INC`
  and the timer is removed. This guarantees that the switches downstream
  release the burst's reservation.

Cells leaving the network run the same state machine without the tokens test.

The ARM has its own 64 timers. A silent circuit returns to idle after
`TIMEOUT` cell times, the same as in the switch.

### Operation cycle of the ARM

The ARM also works in three-clock cycles, and `now` (T) counts cycles:

* phase 0 handles one entering cell;
* phase 1 handles one leaving cell;
* phase 2 handles the timer step.

A configuration write holds off the step of the clock it arrives in.

## Translation table and top level

`vcxt` maps the VCI of a cell arriving at the switch to three things: its
outgoing VCI, its RMI and a valid bit.

`atm_rm_top` places the ARM and one switch output port side by side, as they
sit in a real network. The parts around them are ports:

* the switch fabric: `acc_*` out and `sw_*` in. The fabric supplies each cell's
  age;
* the control processor: the `cfg*`, `vx_*`, `bat_*` and `b_*` writes;
* the host and the output link.

A one-cell register holds a translated cell until the buffer controller's
arrival phase. Cells on unknown VCIs are dropped there.

## Parameters (defaults)

| module | parameter | default | note |
|--------|-----------|---------|------|
| ibc | NRQ / NXB | 64 / 192 | 256-slot memory |
| ibc, bat_sm | NRMI, BW, S_W | 256, 8, 1 | 17-bit BAT entry |
| ibc, tp_unpred | NTIMER | 64 | |
| ibc, tp_unpred, arm | TIMEOUT | 100 | cell times; must be < 128 (8-bit time) |
| ibc | AGE_TH | 8 | resequencer release age, in cell times |
| ibc | CELL_W | 424 | one 53-byte cell |
| ibc, bat_sm | PRED_RMI0 | 1 | RMI 0 bypasses the reservation |
| tp_pred | K, PW, GW, TW / KP, PPW | 8, 32, 24, 24 / 6, 12 | |
| tp_unpred | K, PW, GW, TW, ZW, HW, S_W | 8, 48, 24, 24, 4, 6, 4 | |
| arm, atm_rm_top | NVC | 64 | pools of each class |
| vcxt | VCI_W | 10 | table of 1024 entries |

## Departures from the published scheme, and this design's own choices

The published scheme describes the mechanisms, the field sizes and the phase
steps. It does not fix clocking, handshakes or encodings. The list below covers
every point where this RTL departs from the scheme or fills a gap in it:

* **One clock per phase.** The strobes of each slot operation are applied in a
  single clock.
* **Timer restart in one clock.** A restart is a removal and an allocation in
  the same clock.
* **No free timer means refusal.** A start cell that finds no free timer is
  refused, in the switch as well as at the access.
* **Timeout of 100 cell times.** Reservations are meant to be held for "a few
  hundred" cell times, but with 8-bit time and the modular comparison the
  limit is 127. Widening `TIME_W` lifts this limit.
* **The end cell at the switch.** An end cell is queued under the normal
  marking rule before the reservation is returned.
* **One state bit in the switch.** The switch keeps `s` as one bit, so a
  multi-source circuit there is released by the first end cell. The ARM counts
  begins with a 4-bit saturating counter.
* **Restart on an end with `s > 1`.** An entering end cell with `s > 1`
  restarts the timer, as for leaving cells.
* **Slot number loaded on a write.** In the integrated controller a write can
  also load a slot number from the bus (`lds`), so that the slot-number swap
  fits in the write. Plain writes keep the slot's own number.
* **RMI 0 bypass is switchable.** RMI 0 marks predictable circuits. Clear
  `PRED_RMI0` to use RMI 0 as an ordinary circuit.
* **Resequencer release rule.** It releases the oldest record, with the lowest
  position on a tie. Ages saturate at 255, so **per-circuit order is
  guaranteed only while cells wait less than 255 cycles**.
* **Arriving cells need their age.** The age comes with each cell (`in_age`,
  `sw_age`), from the fabric.
* **Table depth, handshakes and reset.** The VCXT depth, the class bit and pool
  index that arrive with each host cell, every valid/ready handshake and the
  reset values are this design's own.
* **Not built:** the host interface card, the switch fabric and the
  call-acceptance software.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`,
and it has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_xmbc` | An eight-slot worked example: read, write, overwrite, with every reported slot number and the final state. Then 3000 random operations against a model. |
| `tb_timer_bank` | 4000 random start/restart/remove/pop operations against an ordered-list model. |
| `tb_ibc` | The whole buffer controller at small sizes against a transaction model, for 6000 cycles. It checks every transmitted cell, `B`, ni, nx, the clock and the three-clock cycle. It requires each mechanism: admit, mark, discard, overwrite, excess drop, arrival drop, timeout and predictable bypass. |
| `tb_vcxt` | Reset state, writes, invalidation and lookups against a model. |
| `tb_tp_pred` | 20000 random cells against a 64-bit model of both pools and the spacing monitor. |
| `tb_tp_unpred` | 30000 random entering, leaving and timer steps against a model of the algorithms, with only three timers. |
| `tb_arm` | Directed tests: phase order, rate of T, average-rate marking, a shared pool drained by leaving cells, the unpredictable state machine, timeout and timer exhaustion. |
| `tb_ibc_fileserver` | The file-server workload at the default sizes. 50 bursty circuits, each needing 12 slots, share one port; bursts go out at peak spacing, some are abandoned, and the link is slower than the arrivals. It checks that no cell admitted unmarked is lost, per-circuit order, that no burst cell leaves without its start, cell conservation, and that `B` stays a whole number of reservations, reaches zero and comes back. Bursts are scaled down to 40–120 cells. |
| `tb_arm_multicast` | The 20-Ethernet multicast workload at the default ARM size: average rate 1 Mb/s, peak rate 10 Mb/s (`z = 5`, `h = 1`), 325-cell bursts. Up to four sources' bursts overlap, one from the local host and the rest as cells leaving the network. Every cell must pass and the circuit must be idle after each group. A host burst that outruns its pool must be cut with an end cell and flow control, and its remaining cells discarded. |
| `tb_atm_rm_top` | End to end at the **default sizes**, for 12000 cycles plus a drain. The testbench plays the host, the fabric, the control processor and the link. It checks translation, per-circuit order and conservation of cells: accepted = delivered + refused + dropped + overwritten. It also checks that every reservation is returned, and it requires each of 20 mechanisms across both ends to occur. |

To run one testbench, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
          rtl/atm_pkg.sv tb/tb_ibc.sv --top-module tb_ibc -Mdir obj_ibc
obj_ibc/Vtb_ibc
```

`-y rtl` lets Verilator find each module in its own file. Name the package
file on the command line because a package is not found that way.
`-Wno-fatal` keeps the testbenches' width warnings from stopping the build.
The last line of output is `TB_RESULT checks=N failures=0`. The full-size
end-to-end testbench runs in about a second. The two workload testbenches take
2 and 10 seconds.

## Files

* `rtl/atm_pkg.sv`: cell type and decision enums, cell width
* `rtl/xmbc_slot.sv`, `rtl/xmbc.sv`: transmit buffer controller
* `rtl/timer_slot.sv`, `rtl/timer_bank.sv`: time-ordered timer bank
* `rtl/reseq.sv`: resequencer records
* `rtl/bat_sm.sv`: buffer allocation table and reservation state machine
* `rtl/ibc.sv`: integrated buffer controller, the switch output port
* `rtl/vcxt.sv`: VCI translation table
* `rtl/tp_pred.sv`, `rtl/tp_unpred.sv`: token pools
* `rtl/arm.sv`: access resource manager
* `rtl/atm_rm_top.sv`: top level
* `tb/*.sv`: testbenches as above
