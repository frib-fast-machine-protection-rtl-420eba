# Fast protection system: polled daisy-chain fault collection

This is SystemVerilog RTL for the fast protection system (FPS) of an accelerator machine
protection system, modelled on the one built for the FRIB heavy-ion linac. Hundreds of
devices (RF controllers, beam-loss and beam-current monitors, ...) spread over about 200 m
each report a single OK/NOK signal. When any of them reports NOK, the beam must be stopped
within 35 µs in total. Of that budget, 10 µs is for the protection network: it must collect
the signals and drive the mitigation outputs.

The network is one **master** and a **daisy chain of slaves**. Each slave reads 96 device
inputs. The master **polls** the chain: every 4.096 µs it sends a query down the chain. Every
slave answers with a data package holding its 96 status bits. The master checks the packages
against its masks and its operation state, and drives three mitigation outputs:

| output  | mitigation                                         |
|---------|----------------------------------------------------|
| `mit_a` | remove high voltage from the front-end E-bends      |
| `mit_b` | trip the LEBT chopper (deflect the beam)            |
| `mit_c` | disable the ion-source extraction high voltage      |

The default configuration is the published prototype's: one master, one chain of 8 slaves,
and 96 inputs per slave (768 inputs). The clock is 125 MHz (8 ns), and the query period is
512 clocks.

## The chain and why the response time is what it is

```
          q (queries)        q                  q
 master ------------> slave 1 ------> slave 2 ------> ... ------> slave 8
        <------------         <------         <------     <------
          d (packages)       d                  d
```

Each link is a pair of byte streams (`fps_pkg::link_t`: `valid`, control-character flag `k`,
and `data`). Queries travel away from the master on `q`, and packages travel towards it on
`d`. A slave repeats every `q` byte one clock later. When it sees a query, it first sends its
**own** package on `d`. It then forwards, from a FIFO, the packages that arrive from the
slaves behind it. So after each query the master gets all 8 packages back to back, slave 1's
first and slave 8's last.

A NOK is reported at the next query, not at once. The worst case is therefore a NOK at the
last slave that arrives just after that slave has taken its snapshot for a package. The
error waits about one query period (512 clocks) in the slave's latch. It is then reported
behind the 7 packages of the slaves in front of it (7 × 23 bytes), plus a few clocks of
latency per hop. Simulated at the default size with direct links:

| case                                         | response          |
|----------------------------------------------|-------------------|
| NOK at slave 1 just before a query           | 34 clocks, 0.27 µs |
| NOK at slave 8, best phase (Monitor-only)    | 189 clocks, 1.5 µs |
| NOK at slave 8, worst phase                  | 700 clocks, 5.6 µs |

The response spread is exactly one query period, whatever the phase. The links in
`fps_top` are direct wires with no fibre delay.

`tb_prototype_response` adds the prototype's fibre as delay lines: 210 m to slave 1, then
20 m per hop, at about 4.9 ns/m. It builds the chain from the same RTL nodes. In that setup,
each slave's package travels back separately, because the slaves further down answer later.
The read-out queue therefore vanishes, and the fibre delay dominates:

| with prototype fibre                         | response             |
|----------------------------------------------|----------------------|
| NOK at slave 8, best phase (Monitor-only)    | 261 clocks, 2.1 µs   |
| NOK at slave 8, worst phase (Monitor-only)   | 772 clocks, 6.2 µs   |
| trip in Enabled, from the two time stamps    | 6.1 µs               |

The published prototype measured 4.1–8.1 µs with the same spread of one period. The
remaining difference of about 2 µs is most likely latency in the serial transceivers and the
clock-domain crossings, and neither is modelled here. The worst case stays inside the 10 µs network budget.

A one-clock (8 ns) NOK pulse is enough. The slave latches it until a package has carried it
to the master (`slave_io_latch`).

## Frames on the link

The frame delimiters use the usual 8b/10b control-character code points. The field order of
the data package is the one the system defines. The exact codes, the 32-bit time stamp, the
byte order and the kind of checksum are choices of this RTL.

Query, master → slaves (4 bytes):

| byte | K | content                       |
|------|---|-------------------------------|
| 0    | 1 | SYNC `BC`                     |
| 1    | 1 | QRY `3C`                      |
| 2    | 0 | event code = MPS state (0..3) |
| 3    | 1 | EOF `FD`                      |

Data package, slave → master (23 bytes):

| byte  | K | content                                                    |
|-------|---|------------------------------------------------------------|
| 0     | 1 | SYNC `BC`                                                  |
| 1     | 1 | SOF `FB`                                                   |
| 2     | 0 | slave address (1..N)                                       |
| 3     | 0 | version                                                    |
| 4     | 0 | master request event code (echo of the query's)            |
| 5–8   | 0 | time stamp, most significant byte first                    |
| 9–20  | 0 | I/O status, `io[7:0]` first; 1 = NOK                       |
| 21    | 0 | checksum: 8-bit sum of bytes 2–20                          |
| 22    | 1 | EOF `FD`                                                   |

Idle cycles (`valid = 0`) may appear anywhere in a stream. The receiver skips them.

## Slave node (`slave_node`)

- **Input latch** (`slave_io_latch`). The device inputs are 1 = OK, so a broken cable reads as
  NOK. They pass through a 2-flop synchroniser. Any NOK is OR'ed into a latch. The time stamp
  of the first error since the last package is kept. At the snapshot, the package gets the
  latch OR'ed with the present NOKs, and the error time stamp if there was an error (else the
  present time). The latch then restarts empty, and a NOK that is still present is latched
  again on the next clock.
- **Own package** (`slave_frame_tx`). This starts 2 clocks after the query's event byte
  passes, unless a forwarded frame is in progress.
- **Forwarding FIFO** (`slave_fifo`). This is first-word-fall-through, 256 × 9 bits by
  default. A push into a full FIFO is dropped and sets the sticky `fifo_overflow`.
- **Output arbiter**. It has three states: idle, own, and forward. It switches only between
  whole frames, so the own package never cuts a forwarded frame. In forward state it leaves
  only after popping an EOF. An assertion checks that the two sources never drive `d_out` in
  the same cycle.
- The slave outputs the MPS state that the master sent in the query's event code
  (`mps_state`).

## Master node (`fps_master`)

- `master_query_gen` sends a query every `QUERY_PERIOD` clocks. The query carries the present
  state as its event code.
- `master_frame_rx` decodes packages. A checksum mismatch (`cks_err`) or broken framing
  (`frame_err`) drops the package.
- `master_protection` is the operation-state machine. The master counts good packages,
  checksum errors, and framing or address errors (16-bit, wrapping).

The latency from a package's EOF byte on `d_in` to the mitigation outputs is 2 clocks.

### Operation states

| state        | inputs monitored | `mit_a` `mit_b` | `mit_c` | leaves on                         |
|--------------|------------------|-----------------|---------|-----------------------------------|
| Disabled     | no               | 1               | 0       | command                           |
| Monitor-only | yes              | 1               | 0       | command                           |
| Enabled      | yes              | 0               | 0       | command, or an unmasked NOK → Fault |
| Fault        | yes              | 1               | 1       | command for Monitor-only only     |

- **Masks.** `mask[slave-1][bit] = 1` ignores that input. Packages with an address outside
  1..N are ignored and counted.
- **Monitor-only and Enabled.** Each slave's unmasked NOK is held in `slave_err` until that
  slave's next package. `err_latched` is the OR of `slave_err`, and it is the signal to watch
  when measuring the response time.
- **Trip.** The first unmasked NOK in Enabled moves the machine to Fault. It latches the
  source slave, its NOK bits, the slave's time stamp and the master's time stamp of that
  clock (`fault_*`). The difference between the two time stamps is the response time, less 3
  clocks for the slave's synchroniser and the master's receiver. The record is held until
  the operator returns to Monitor-only.
- **Commands.** The operator interface is `cmd_valid` / `cmd_state`, and it selects
  Disabled, Monitor-only or Enabled. A command for Fault is ignored. In Fault, only
  Monitor-only is obeyed.
- **Reset.** Reset enters Disabled, with A and B active.

## Top level (`fps_top`)

`fps_top` builds the master and a generate loop of `N_SLAVES` slaves. Slave *k* is strapped
to address *k*. All nodes share one `timestamp` input. This input stands for the time that
each node's event receiver derives from the global timing system. The device inputs, masks
and operator commands are ports. So are the mitigation outputs, the fault record, the
counters and each slave's status.

| parameter      | default | meaning                                              |
|----------------|---------|------------------------------------------------------|
| `N_SLAVES`     | 8       | slaves in the chain (from the prototype)              |
| `QUERY_PERIOD` | 512     | clocks between queries: 4.096 µs at 8 ns (prototype)  |
| `FIFO_DEPTH`   | 256     | bytes per slave FIFO (choice of this RTL)             |

The slave FIFO must hold what arrives while the slave sends its own package, which is one
package at most in polling operation. 256 bytes also covers a burst of 11 packages.

## What follows the published system and what does not

These points follow the published system:
- the master/slave daisy chain and polling every 4.096 µs;
- own-package-first forwarding through a FIFO;
- the package field order and 96 I/O bits per slave;
- the error latch with the first-error time stamp;
- the event code that informs the slaves of the MPS state;
- the four operation states and their mitigation sets;
- the fault record with slave and master time stamps, held until Monitor-only;
- the Monitor-only latch until the next package;
- 8 slaves, and the 8 ns timing.

These points are choices of this RTL:
- the byte-wide link and the frame codes;
- the query format;
- the checksum kind, the time-stamp width and the byte order;
- input polarity and the synchroniser;
- slave addressing by strap;
- the FIFO size and overflow handling;
- the arbiter's whole-frame rule;
- the command interface, and the rule that Fault is left only to Monitor-only;
- dropping bad packages (they do not trip);
- the status counters;
- asynchronous active-low reset.

A real deployment would have to decide whether a missing or corrupt package should trip.
Here it does not: it is only counted.

Not included:
- the serial fibre transceivers and any cable delay;
- clock-domain crossings: the whole design runs on one 125 MHz clock, whereas a real node
  also has recovered link clocks, a timing-system clock and an Ethernet clock;
- the event receiver and timing-system protocol;
- the embedded processor that connects the FPS to the control system over UDP (its commands
  and masks are ports here);
- RS422 line interfaces, the board, and the external systems;
- the outlined faster variant, a bidirectional loop with streaming read-out (about 3 µs
  expected);
- a master serving 9 chains.

## Simulating

Each testbench counts its checks and ends with `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/fps_pkg.sv tb/fps_tb_pkg.sv tb/tb_fps_top.sv --top-module tb_fps_top
./obj_dir/Vtb_fps_top
```

Replace `tb_fps_top` with any testbench:

| testbench              | what it does                                                                |
|------------------------|-----------------------------------------------------------------------------|
| `tb_fps_top`           | whole system at default size: polling, forwarding, state broadcast, Monitor-only latch, masking, worst- and best-case trip, fault record, recovery |
| `tb_response_sweep`    | 1024 one-clock NOK pulses at slave 8, each one clock later in the polling cycle; reports min/max response, checks a spread of exactly one period |
| `tb_prototype_response` | the same sweep on a chain with the prototype's fibre delays (`tb/fiber_link_model.sv`), then a trip in Enabled checked against the latched time stamps |
| `tb_fps_master`        | master against a modelled chain: counters, checksum error, trip latency of 2 clocks, fault time stamps |
| `tb_slave_node`        | one slave: query repeat, own package latency and contents, forwarding order, whole-frame arbitration, FIFO overflow |
| `tb_master_protection`, `tb_master_frame_rx`, `tb_master_query_gen`, `tb_slave_io_latch`, `tb_slave_frame_tx`, `tb_slave_fifo` | unit tests |

`tb/fps_tb_pkg.sv` holds the testbenches' own reference encoder for the package, and `tb/fiber_link_model.sv` is a testbench-only delay line. Every
testbench runs in a few seconds at most.

## Files

- `rtl/fps_pkg.sv`: link type, frame codes, states, package struct.
- `rtl/fps_top.sv`, `rtl/fps_master.sv`, `rtl/master_query_gen.sv`, `rtl/master_frame_rx.sv`,
  `rtl/master_protection.sv`: the top level and the master.
- `rtl/slave_node.sv`, `rtl/slave_io_latch.sv`, `rtl/slave_frame_tx.sv`, `rtl/slave_fifo.sv`:
  the slave.
- `tb/`: the testbenches listed above and their reference package.
