# OCP crossbar bus: four masters, four memory slaves

This is a small on-chip bus whose ports speak the basic Open Core Protocol
(OCP). The bus is a crossbar, not a shared bus. Every slave has its own
arbiter, so two masters that address different slaves transfer in the same
cycle. Masters contend only when they address the same slave. Each master is
a finite-state machine (FSM-M) that turns a simple system command into OCP
requests. Each slave is a finite-state machine (FSM-S) in front of a small
store. Together they handle single transfers, bursts and "alternate-address"
sequences for both reads and writes. A burst can be of either type:
multi-request (one address per beat) or single-request (one address for the
whole burst). Each master keeps the burst type of its IP core. A lock keeps
a burst together against higher-priority masters. A decoder answers illegal addresses with an OCP
error.

Default configuration: 4 masters and 4 slaves, a 13-bit address, 8-bit data,
a 3-bit burst size (1 to 8 beats) and 256 words per slave. Masters 0 and 1
issue multi-request bursts; masters 2 and 3 issue single-request bursts.

## The OCP handshake used here

| signal | direction | meaning |
|---|---|---|
| `MCmd` (3) | master → slave | `IDLE`=000, `WR`=001, `RD`=010 |
| `MAddr` (13), `MData` (8) | master → slave | address and write data, held until accepted |
| `SCmdAccept` | slave → master | the slave takes the request in this cycle |
| `SResp` (2) | slave → master | `NULL`=00, `DVA`=01 (data valid), `FAIL`=10, `ERR`=11 |
| `SData` (8) | slave → master | read data, valid with `DVA` |
| `MBurstLength` (4), `MBurstSeq` (2), `MBurstSingleReq` | master → slave | beats in the burst; step 1 (`INCR`) or step 2 (alternate); single-request burst |
| `MDataValid` / `SDataAccept` | master ↔ slave | data phase of a single-request write burst |

The master holds `MCmd`, `MAddr` and `MData` until it sees `SCmdAccept`. That
ends the request phase. A read also has a response phase, which ends on
`SResp=DVA`. The memory slaves always answer a read in its accept cycle
(`SCmdAccept=1` together with `DVA`). The master also handles a split answer:
an accept with `NULL` takes it to `WAIT`, where it drops `MCmd` to `IDLE` and
waits for the response. The error responder uses the split answer.

The request is the packed struct `ocp_req_t` in `rtl/ocp_pkg.sv`. It has an
address/control part, `ocp_ctrl_t`, and a write-data part, `ocp_wdat_t`; each
part has its own multiplexer. The response is the packed struct `ocp_rsp_t`.
The signal names and encodings above are the standard OCP ones, with one
exception: the alternate `MBurstSeq` is this design's own code.

## System commands and the master FSM (`ocp_master`)

The system gives a command on `Control`, `addr`, `data_in` and `size`. It
pulses `enable[m]` for one cycle to hand the command to master `m`. An idle
master takes it; a busy master ignores it.

| `Control` | command | beats | addresses |
|---|---|---|---|
| 000 | idle | – | – |
| 001 | single write | 1 | `addr` |
| 010 | single read | 1 | `addr` |
| 011 | burst write | `size`+1 | `addr`, `addr`+1, … |
| 100 | burst read | `size`+1 | `addr`, `addr`+1, … |
| 101 | alternate ("out-of-order") write | `size`+1 | `addr`, `addr`+2, `addr`+4, … |
| 110 | alternate ("out-of-order") read | `size`+1 | `addr`, `addr`+2, … |
| 111 | ignored | – | – |

Codes 000, 001 and 010 come from the original description of the master.
The codes of the four multi-beat commands are this design's choice.

The master has four states: `IDLE`, `WRITE`, `READ` and `WAIT`, plus `WDATA`
for single-request bursts. It stays in `WRITE` or `READ` until the slave side
accepts. A beat counter tracks the beats. How the burst addresses are
produced depends on the parameter `SINGLE_REQ`:

- **Multi-request burst (`SINGLE_REQ=0`).** The counter produces the address
  of every beat, and every beat is an OCP request of its own. Each beat takes
  two cycles at the slave.
- **Single-request burst (`SINGLE_REQ=1`).** The master sends a single request
  that carries the start address, `MBurstLength` and `MBurstSeq`. The slave
  produces the remaining addresses.
  - Read: the first word arrives with the accept. The master collects the
    remaining words in `WAIT`, one per cycle.
  - Write: the first word travels with the request. The remaining words follow
    in `WDATA`, with `MDataValid`, and the slave answers each with
    `SDataAccept`.

  An *n*-beat burst takes *n*+1 cycles instead of 2*n*.

After the last beat the master returns to `IDLE`.

- **Write data.** Write data comes from the shared `data_in`. The master
  samples `data_in` at the command edge and again when each write beat is
  accepted and more beats follow. `data_take[m]` is high in each cycle whose
  clock edge samples `data_in`. A system that feeds a burst keeps the next
  byte on `data_in` and moves on when it sees `data_take`. Only one master can
  take a burst from `data_in` at a time.
- **Read data.** Each word read appears on `data_out[m]`, with a one-cycle
  `data_valid[m]` pulse.
- **Errors.** An `ERR` or `FAIL` answer stops the command at once and sets
  `error[m]`. `error[m]` stays set until the next command starts.
- **Lock.** `mlock` is high on every request that more beats follow. The
  arbiter then keeps the slave for this master until the burst is over.
  In `WAIT` and `WDATA`, `MCmd` is idle. `mhold` then keeps the request to the
  arbiter alive, so the slave's remaining words stay routed to this master.

The original state diagram does not draw some of these transitions, which
this design adds:

- a `READ` beat that gets `DVA` in its accept cycle completes at once;
- `WAIT` also ends on `ERR` or `FAIL`, not only on `DVA`;
- `WDATA` is a new state for the data phase of a single-request write burst.

## Slave FSM and store (`ocp_slave`)

The slave's basic states are `IDLE`, `WRITE` and `READ`. In `IDLE` it captures
the request. In `WRITE` it asserts `SCmdAccept` with `SResp=NULL` and stores
the word on the way back to `IDLE`. In `READ` it asserts `SCmdAccept` with
`SResp=DVA` and the word (read from the store a cycle earlier).

Each transfer therefore takes **two cycles**, and a multi-request burst of
*n* beats keeps its master busy for 2*n* cycles. The slave sees such a burst
as a run of single transfers.

A single-request burst continues after the `WRITE` or `READ` beat in
`BURST_WR` or `BURST_RD`. There the slave produces the next address itself:
step 1 for `INCR`, step 2 for the alternate sequence.

- `BURST_RD` returns a `DVA` word every cycle.
- `BURST_WR` stores each word that comes with `MDataValid`, and answers it with
  `SDataAccept` in the same cycle.

The store is `2**MEM_AW` words (256 by default). It is not reset.

## Arbitration and lock (`ocp_arbiter`)

There is one arbiter per slave. A master requests a slave when its decoder
selects that slave and either its `MCmd` is not idle or `mhold` is high.

- **Priority.** When the slave is free, the grant goes in the same cycle to the
  lowest-numbered requesting master. This fixed priority is this design's
  choice.
- **Ownership.** The granted master becomes the owner. It keeps the slave as
  long as it keeps requesting, so a transfer in progress is never taken away.
- **Release.** When the slave asserts `SCmdAccept`, the owner lets go unless
  its `mlock` is high. A burst from a low-priority master therefore runs to the
  end even while higher-priority masters wait. A master that is not locked
  competes again for every transfer.

## Decoding, errors and the partial crossbar

Each master has its own decoder (`ocp_decoder`). The address map is this
design's choice:

```
 12 11 | 10 9 8 | 7 ........ 0
 slave | must 0 | store word
```

An address is illegal if any of these holds:

- bits 10:8 are not zero;
- the slave index is out of range;
- `CONNECT` removes the path from this master to that slave.

A request to an illegal address goes to the master's error responder
(`ocp_err_slave`) and never to a slave. For a write, the responder accepts
with `SResp=ERR` and drops the data. For a read, it accepts with `NULL`, so
the master goes to `WAIT`, and answers `ERR` one cycle later.

`CONNECT` is a top-level bit mask. Bit `m*N_SLAVES+s` set means master `m`
can reach slave `s`. All ones, the default, is a full crossbar. Clearing bits
gives a partial crossbar for systems where not every master needs every
slave.

## Multiplexers and the top (`ocp_top`)

- Per slave: `ocp_addr_mux` forwards the address/control part of the request,
  and `ocp_wdata_mux` the write-data part, of the master that the slave's
  arbiter grants.
- Per master: `ocp_rdata_mux` returns the response. The response comes from
  the slave that the master's decoder selects, but only while that slave's
  arbiter grants this master. For an illegal address it comes from the error
  responder instead.

Top-level ports:

| port | width | |
|---|---|---|
| `Clk`, `rst_n`, `EnableClk` | 1 | clock, synchronous active-low reset, synchronous clock enable for every register |
| `addr`, `Control`, `data_in` | 13, 3, 8 | command, shared by all masters |
| `size[m]`, `enable[m]` | 3, 1 per master | burst size and command strobe |
| `data_out[m]`, `data_valid[m]` | 8, 1 per master | read data |
| `data_take[m]`, `busy[m]`, `error[m]` | 1 per master | status |

Top parameters: `N_MASTERS`, `N_SLAVES`, `MEM_AW`, `CONNECT` and `SINGLE_REQ`.
`SINGLE_REQ` has one bit per master and defaults to `4'b1100`. Address, data
and size widths are constants in `ocp_pkg`.

## What this design does not do

The bus follows the OCP idea of bursts, locks, pipelining and out-of-order
completion. It does not implement all of it:

- **"Out-of-order" means alternate addresses.** It is a sequence at stride 2.
  Responses to different requests are not reordered, and there are no
  transaction tags or threads.
- **No pipelining.** A master has one request outstanding at a time and waits
  for each response before the next request.
- **One shared command port.** `addr`, `Control` and `data_in` are shared by
  all masters. The system can hand out one command per cycle and feed one
  burst write at a time.

Other choices made where the original description gives no detail:

- the reset;
- the meaning of `EnableClk` (clock enable) and of `enable` (command strobe);
- the codes of the multi-beat commands;
- which masters issue single-request bursts;
- the single-request write data phase;
- the one-word-per-cycle rate of single-request bursts;
- beats = `size`+1;
- the address map and the store depth;
- fixed priority;
- the timing of the error answer.

The description mentions a burst length of 8 and a waveform with four beats;
`size` = 7 and `size` = 3 give these.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ocp_master`, `tb_ocp_master_single` | Random commands, for multi-request and for single-request bursts, against a testbench responder with random delays, gaps and split reads. Addresses, lock, write data and read data are checked beat by beat. One busy cycle per beat with a zero-wait responder; error abort. |
| `tb_ocp_slave` | Two-cycle accept, `NULL`/`DVA` responses, single-request read and write bursts with generated addresses and `SDataAccept`, and data against a reference copy of the store. |
| `tb_ocp_arbiter` | Random requests, locks and accepts against a reference model of the rules above. |
| `tb_ocp_decoder` | Every address, with a full and a partial connection mask. |
| `tb_ocp_err_slave`, `tb_ocp_*_mux` | Directed and random checks of the responder and the three multiplexers. |
| `tb_ocp_top` | End to end at the default size: see below. |
| `tb_ocp_top_partial` | Partial crossbar: missing paths end in `error` and leave the store untouched. |

`tb_ocp_top` runs in three parts:

1. It writes four bytes as a burst and reads them back, then does the same as
   an alternate-address sequence. It checks the store contents and the cycle
   counts: 2*n* for multi-request bursts (4 and 8 beats), *n*+1 for an 8-beat
   single-request burst.
2. It freezes a running burst with `EnableClk`.
3. It runs 20,000 random command attempts, from all four masters at once,
   against a reference model of the stores. Some of them use illegal
   addresses.

It also counts how often each mechanism happens and fails if one never does.
The mechanisms are: accepts on different slaves in the same cycle,
contention, a lock holding off a higher-priority master, the `WAIT` state,
error answers, each command kind, and the data phases of single-request
bursts.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ocp_pkg.sv tb/tb_ocp_top.sv --top-module tb_ocp_top -o sim
./obj_dir/sim
```
