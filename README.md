# Fast beam interlock inside an event-based timing system

An event-based timing system already has what a machine-protection system
needs: a fiber star from one master to every receiver, a common 100 MHz clock,
and a spare data channel on every link in both directions. This RTL uses that
channel to carry beam-interlock flags. Each event receiver (EVR) turns its
interlock inputs into 16 logical flags and reports them upstream. The event
master (EVM) combines the reports of all receivers into one system-wide flag
vector and latches it where needed. It sends the vector back down to every
receiver, and there the flags hold timing outputs idle. Timing and protection
share one set of boards, fibers and clock. The worst-case path from an input
to an output on any other receiver is a few microseconds.

The design is modelled on the MRF mTCA timing hardware (EVM-300 masters,
EVR-300U receivers) in a two-hop network. There is one master, one master
used as a fan-out, and twelve receivers. Only the interlock extension and a
minimal stock timing path are written here. The serial transceivers, the
event sequencer and cable-delay compensation are not included; they appear as
ports or are left out (see *What is not here*).

## Flags and their polarity

Everywhere in the design a flag bit is **1 = OK, 0 = fault**. A broken wire,
a missing message or a register that was just reset therefore reads as a
fault. A flag vector (`fbi_pkg::flagvec_t`) is 17 bits wide:

| bits  | meaning |
|-------|---------|
| 15:0  | logical flags F01..F16 |
| 16    | Com: health of the fiber links the vector has passed through |

Each flag can be configured as one of two kinds. A **Beam Permit (BP)** flag
follows its inputs and recovers by itself. A **Fast Beam Interrupt (FBI)**
flag holds a fault until software acknowledges it.

## The path of a fault, hop by hop

```
 EVR input ─ debounce ─ input→flag AND map ─ flag_msg_tx ─ dslot_arbiter ──► upstream fiber
                                                                              │
 fan-out EVM:  flag_msg_rx per port ─ AND ─ flag_msg_tx ──────────────────────┤ (EVRs behind the fan-out)
                                                                              ▼
 master EVM:   flag_msg_rx per port ─ flag_aggregator (AND) ─ flag_latch (BP/FBI)
                   │                                             │
                   │                            postmortem_trigger ─► event stream
                   ▼                                             │
               flag_msg_tx ─ dslot_arbiter ─► all ports at once ─┘
                                                                              │
 fan-out EVM:  passes the downstream stream through unchanged (1 register)    │
                                                                              ▼
 EVR:          flag_msg_rx ─ output_gate (gate / mirror / stock) ─► timing outputs
```

1. **Input conditioning** (`input_debouncer`). Each input is synchronised
   with two flip-flops. A new level is accepted only after it has been stable
   for that input's debounce time, counted in 10 ns cycles. Latency is
   `3 + dbnc_time` cycles.
2. **Input-to-flag mapping** (`input_flag_mapper`). Bit *f* of `cfg_in_map[i]`
   assigns input *i* to flag *f*. A flag is OK only while every input assigned
   to it is OK. A flag with no inputs is always OK.
3. **Upstream message** (`flag_msg_tx`, `dslot_arbiter`). The EVR sends its
   16 flags every `cfg_tx_period` cycles. The Com bit of this message is the
   health of the EVR's own downstream link.
4. **Aggregation** (`flag_aggregator`). The fan-out and the master AND the
   vectors of all enabled ports, so one fault anywhere faults the global flag.
   The fan-out adds its own downstream-link health as the Com bit and sends one
   message upstream. It has no latch.
5. **Latch** (`flag_latch`, master only). BP flags pass through. An FBI flag
   that sees a fault stays in fault until an `ack` pulse arrives while its
   input is OK. An `ack` during a fault is ignored.
6. **Broadcast.** The master sends the latched vector on all ports in the same
   cycle. The fan-out repeats it unchanged.
7. **Output gating** (`output_gate`). Each output picks a pulser (`cfg_out_src`)
   and a set of flags, including Com (`cfg_out_map`). Each also has a mode:
   - `OUT_GATED`: the pulse passes only while all its flags are OK, and
     otherwise the output is held at 0. The timing pattern itself is not
     changed.
   - `OUT_MIRROR`: the output is the AND of its flags, as a level for external
     equipment.
   - `OUT_STOCK`: the pulse passes unchanged.

   With `cfg_ext_en = 0` every output behaves as `OUT_STOCK`, as on an
   unmodified receiver.

## The flag message and the fail-safe rules

The data slot carries one byte per cycle in each direction, plus a flag that
marks it as an 8b/10b control character. A flag message takes 6 bytes:

| byte | K | content |
|------|---|---------|
| 0 | yes | `K_FLAG_SOF` = K28.2 (0x5C) |
| 1 | no  | flags[7:0] |
| 2 | no  | flags[15:8] |
| 3 | no  | {7'b0, Com} |
| 4 | no  | checksum = ~(byte1 + byte2 + byte3) mod 256 |
| 5 | yes | `K_FLAG_EOF` = K28.3 (0x7C) |

`flag_msg_rx` raises its communication error (`com_ok = 0`) in four cases:
- no valid message arrived for more than `timeout` cycles;
- the checksum is wrong;
- the framing is broken (a control character inside a message, or no end
  marker);
- the transceiver reports the link down (`link.up = 0`).

While `com_ok` is 0 the receiver reports every flag as fault (`flags_safe`).
The effects are:
- An EVR whose downstream fiber breaks holds all its gated outputs idle. It
  reports the break upstream in its Com bit.
- A master or fan-out port whose upstream fiber breaks faults every global
  flag, including Com, until the link returns. Unused ports must be masked
  with `cfg_port_en`.
- `com_ok` returns with the next valid message.
- `err_count` counts error events and saturates at 0xFFFF.

Every link checks itself. No software and no other link is involved.

**Sharing the slot with data buffers.** The data slot also carries ordinary
data-buffer traffic. `dslot_arbiter` sends it in segments framed by K28.0 and
K28.1, with at most `DBUF_MAX` (16) bytes per segment. A longer buffer carries
on in the next segment. A flag message has priority at every segment boundary,
so it waits at most `DBUF_MAX + 2` cycles. When the slot is idle it carries
K28.5.

The segment limit applies only while the fail-safe protocol is on
(`cfg_fs_en = 1`, the normal setting). With `cfg_fs_en = 0` a gateway sends
no flag messages and sends each data buffer whole, in one segment.

**After reset** the global flags read fault until the first messages have
arrived. Every FBI flag is therefore latched shortly after reset and needs one
acknowledge. This is deliberate: it is the fail-safe choice.

## Postmortem events

`postmortem_trigger` in the master watches the latched flags. When any flag
enabled in `cfg_pm_en` falls from OK to fault, it makes a one-cycle pulse
(`pm_pulse`). The pulse arms up to eight user-event registers
(`cfg_pm_codes`; code 0 means unused). The armed codes are inserted into the
event stream, lowest register first. Since the link carries one event code per
cycle, they go out in successive cycles in which the sequencer sends nothing.
They then travel the ordinary event path, so every EVR receives them (and
timestamps them) in the same event cycle of its hop. They can fire EVR pulsers
that start postmortem acquisition.

## Timestamps and the change log

`timestamp_counter` counts 10 ns ticks. On a rising edge of PPS the master
replaces that cycle's sequencer event with event 0x7D. This event advances the
seconds and clears the ticks on every EVR. Software can load the seconds.

`event_logger` watches the debounced inputs and the per-output gate state
(`gate_ok`), each with a log-enable bit. In every cycle where an enabled bit
changes, it writes one entry to a 512-entry buffer. The entry is laid out as
`{sec[31:0], ticks[31:0], gates[17:0], inputs[15:0]}`. `log_not_empty` tells
software that data is waiting. The head entry is on `log_rd_data`, and
`log_rd_en` removes it.

When a change finds the buffer full, the logger stops writing and sets
`log_overflow`. It keeps the *earliest* entries, which show the onset of a
fault, and logs nothing more until software pulses `log_ovf_clear`.

## Latency budget

Take the worst case: a fault on an EVR behind the fan-out, seen at an EVR on
the master. Assume 100-cycle message periods, 10-cycle debounce, and data
buffers saturating every slot. The path is, in cycles:

| stage | cycles |
|-------|--------|
| synchroniser, debounce, map | 2 + 10 + 1 |
| EVR message: wait for period, data-buffer segment, 6 bytes | 100 + 18 + 6 |
| fan-out: receive, aggregate | 2 |
| fan-out message | 100 + 6 |
| master: receive, aggregate, latch | 3 |
| master message | 100 + 18 + 6 |
| fan-out pass-through | 1 |
| EVR: receive, gate | 2 |
| **total** | **375** |

That is 3.75 µs, against the 30 µs requirement. The end-to-end testbench
measured 236 cycles on one trip. `tb_latency_worst_case` ran 80 fault and
recovery transitions under saturating data-buffer load, and its worst was 331
cycles (3.31 µs). The message period is the main knob.
It is a run-time register (`*_tx_period`). The receive window
(`*_rx_timeout`) must be longer than the period plus the longest data-buffer
segment.

## Modules

| file | role |
|------|------|
| `fbi_pkg.sv` | flag vector, link word `link_t`, control codes, output modes, pulser config, checksum |
| `input_debouncer.sv` | synchroniser and per-input debounce |
| `input_flag_mapper.sv` | inputs → 16 flags (AND) |
| `flag_msg_tx.sv` | periodic flag message framer |
| `flag_msg_rx.sv` | message checker, link watchdog, error counter |
| `dslot_arbiter.sv` | flag messages and data-buffer segments in one data slot |
| `flag_aggregator.sv` | AND over ports |
| `flag_latch.sv` | BP / FBI latch with acknowledge |
| `postmortem_trigger.sv` | falling-edge trigger and event injection |
| `pulse_generator.sv` | stock EVR pulsers: event code → delay → width |
| `output_gate.sv` | flags → outputs (gate / mirror / stock, bypass) |
| `timestamp_counter.sv` | seconds and ticks |
| `event_logger.sv` | timestamped change log with halt-on-full |
| `evr_gateway.sv` | event receiver: all of the above for one EVR |
| `evm_master_gateway.sv` | event master: receivers, aggregation, latch, postmortem, PPS event, broadcast |
| `evm_fanout_gateway.sv` | fan-out: pass-through down, aggregation up |
| `fbi_timing_network.sv` | top: master + fan-out + 12 EVRs and their fibers |

The top connects EVRs 0-5 to master ports 0-5, the fan-out to master port 7,
and EVRs 6-11 to fan-out ports 0-5. `fiber_ok[i]` stands for the transceiver
status of the fiber to EVR *i*, and `fiber_ok[12]` for the master-to-fan-out
fiber. Setting one to 0 breaks that fiber in both directions.

All configuration registers are ports. The `evr_*` arrays are indexed by EVR
number. No host bus or register map is defined.

Default parameters: 16 inputs, 18 outputs and 16 pulsers per EVR; 8 ports per
EVM; a 512-entry log; 16-byte data-buffer segments; 8 postmortem codes.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbench `tb_fbi_timing_network` runs
the whole network at default size. It goes through every mechanism: BP trip
and recovery with the latency, FBI latch and acknowledge, postmortem events at
all EVRs, glitch rejection, a broken EVR fiber and a broken fan-out fiber,
logging, log overflow and clear, data buffers in both directions, PPS,
mirror outputs and the bypass. It takes well under a minute. To run it:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fbi_pkg.sv tb/tb_fbi_timing_network.sv --top-module tb_fbi_timing_network
./obj_dir/Vtb_fbi_timing_network
```

Replace the testbench name to run any other one. `tb_flag_sender` and
`tb_flag_monitor` are testbench-only models: they encode and decode flag
messages independently of the RTL.

## Where this departs from, or goes beyond, the source description

The behaviour described above comes from the published description of the
system. The following are this design's own choices:

- **Message format.** The control codes, byte layout and checksum are this
  design's own. Only their existence is given.
- **Link failures.** A link error at an EVM port faults *every* flag, not
  just Com. At an EVR, a downstream link error makes all flags read as fault.
- **Fan-out upstream.** The fan-out's upstream behaviour (aggregate and
  resend) is inferred. Only its downstream pass-through is described.
- **Port enables.** The per-port enables (`cfg_port_en`) are added so that
  unused fiber ports do not fault the system.
- **Postmortem codes.** They are sent in successive free event slots rather
  than "together".
- **Timestamps.** The PPS-to-event-0x7D mechanism and the seconds load follow
  common MRF practice. They are not the interlock's own design.
- **Sizes and levels.** The log depth (512), `DBUF_MAX` (16), the 16-bit
  debounce, period and timeout registers, and the idle output level (0) are
  assumed.
- **Pulsers.** The pulsers are a minimal stand-in for the stock ones: one
  event code per pulser, with a 32-bit delay and width.
- **Fail-safe protocol switch.** Each gateway has a `cfg_fs_en` input (top
  ports `m_fs_en`, `f_fs_en` and `evr_fs_en`). With it at 1, flag messages are
  sent and data buffers are cut into segments of at most `DBUF_MAX` bytes.
  With it at 0, no flag messages are sent and each buffer goes out as a
  single segment. The receiving side then raises its comFlag, as it would for
  any missing message. The fan-out never carries data buffers, so its switch
  only stops its flag messages.
- **Figure columns.** The per-row "En" column of the configuration matrix is
  covered by `cfg_ext_en`, the output modes and the log-enable bits. There is
  no separate input-enable bit.

## What is not here

- The MRF serial transceivers (8b/10b, clock recovery, event-clock PLL). The
  link is modelled one byte per cycle, with a `up` status bit.
- The event sequencer. Its event stream is the `seq_evt` input.
- Cable-delay compensation. As a result, EVRs behind the fan-out see events
  one cycle after EVRs on the master. The testbench checks timestamps within
  each hop only.
- The GPS time server, which provides the `pps` input.
- The master's external "Enable" input. The source shows it in its network
  drawing but does not describe what it does.
- The control-system software: the IOC, the operator screens and autosave.
