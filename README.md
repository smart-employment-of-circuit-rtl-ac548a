# SECRET: a time-shifted redundant core that sidesteps hardware Trojans

A third-party IP core may carry a hardware Trojan: a small, normally dormant
circuit that wakes up on a rare input condition and then does damage, here by
leaking the secret key of a crypto core. Detecting such a Trojan at run time
is possible with monitors on the core's bus; surviving it is the harder part.
This design (SECRET, *Smart Employment of Circuit Redundancy to Effectively
Counter Trojans*) survives it with a second copy of the *same* core:

* the **observation core** receives the host's bus traffic at once; its
  outputs go only to a run-time Trojan detector;
* the **operating core** receives the same traffic **T_RED clocks later**,
  through a time-shift buffer, and is the only one that answers the host.

When the detector sees the Trojan fire in the observation core, the trigger
that caused it is still travelling through the buffer toward the operating
core. The controller stops the operating core's clock for a short window
around the moment the delayed trigger arrives, so the operating core never
sees it and its Trojan never wakes. In parallel, a trigger analyser searches
the buffer for the offending requests and stores them; from then on every
matching request is dropped before it reaches the operating core.

The price is a second core, a buffer, and a fixed extra latency of T_RED on
every response. The example system protects an AES encryption/decryption
core with a planted key-leaking Trojan; everything in `rtl/` is
synthesizable SystemVerilog (one intended latch, in the clock gate).

```
 host bus ──┬──────────────────────────► observation core ──► Trojan detector ──alarm──┐
            │                                                                          │
            └──► time-shift buffer ──► pass switches ──► operating core ──► host       │
                  (T_RED clocks)      ▲    (drop matches)   ▲ clock gate                │
                        │             │                     │                          │
                        └─► trigger analyser ─► trigger memory      security controller ◄┘
                                                                (T_RED, T_SUSP, suspend)
```

## The protected core: a memory-mapped AES engine

`avs_aes_core` is a bus slave with 32 words of 32 bits (5-bit word address,
Avalon-style `read`/`write` selects, read data one clock after the read):

| address | space | access |
|---|---|---|
| 0-7 | key (4, 6 or 8 words for 128/192/256-bit keys) | write-only |
| 8-11 | input block | write-only |
| 12-15 | result block | read-only |
| 16-30 | reserved | reads zero |
| 31 | control word | read/write |

Reading the write-only space returns the control word. Word 0 of key, data
and result holds the first four bytes of the FIPS-197 byte sequence, most
significant byte first. Control bits: `enc` (0), `dec` (1), `irq_en` (6),
`key_valid` (7); the other 28 bits are reserved and are not stored.

Use: write key and block, then write the control word with `key_valid` and
`enc` or `dec` (one write may do both). A rising `key_valid` starts the key
expansion (one schedule word per clock, 40 clocks for AES-128); the cipher
waits for it, then runs one round per clock, so a block takes NR = 10, 12 or
14 clocks. This NR-clock period is the **bus cycle**, the time unit of the
SECRET parameters. When the result is in place `enc`/`dec` clear themselves
and, with `irq_en`, `avs_s1_irq` rises until the control word is next read
or written. A read of the result space while an operation is pending raises
`avs_s1_waitrequest`.

The AES arithmetic (`aes_pkg`) computes the S-box from the GF(2^8) inverse
and the affine map instead of storing tables. Decryption is the standard
inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns).

## The Trojan

`hth_trojan` sits inside the core (`TROJAN = 1`, in both copies, since both
are the same untrusted IP). It needs two unlikely events:

1. a control-word write whose reserved bits [31:8] equal `TRIGGER_PATTERN`
   (default `24'h5AC396`); the clean core ignores those bits, so nothing
   visible happens, but the Trojan is now *armed*;
2. later, a clock in which `read` and `write` are asserted together, which a
   correct master never does.

One clock after event 2 the **payload** opens the write-only key space to
reads for one bus cycle, so the host (or an attacker on the bus) can read
the key words back.

## Detection

`trojan_detector` watches the observation core's bus. It keeps its own copy
of every key word written, and checks each read response in the clock it
appears:

* any response other than the control word that equals a stored key word;
* a response to the write-only space or the control word with reserved bits
  set (it must look like a control word);
* a non-zero response from reserved space.

Any failure raises `alarm` in that same clock. In the attack the payload is
detected on the first key read, one to two clocks after the trigger.
A genuine result equal to a key word would also raise an alarm (chance about
NK·2⁻³² per read); this is accepted.

## Timing: where the suspension window goes

This is the part that makes or breaks the scheme. Let the trigger reach the
observation core at time 0. The payload starts after the Trojan's activation
and latency times, and the detector needs some further time, so the alarm
comes at `A = T_activation + T_latency + T_detection`. The operating core
sees the trigger at `T_RED`. Two conditions must hold:

1. the alarm must come before the delayed trigger: `T_RED ≥ A`;
2. the operating core must be stopped over the whole delayed trigger.

With the defaults `T_RED` = 4 bus cycles (40 clocks) and `T_SUSP` = 2 bus
cycles (20 clocks). A 20-clock suspension that started at the alarm would
end at A + 20, long before the trigger arrives at 40. So
`secret_controller` places the window on the *delayed* stream. It delays
each alarm by `T_RED − T_SUSP + T_LEAD` clocks (30 by default;
`T_LEAD` = 1 bus cycle) in a shift register, then holds `suspend` for
`T_SUSP` clocks. The operating core therefore skips exactly the requests
the host issued from `T_SUSP − T_LEAD − 1` clocks before the alarm to
`T_LEAD` clocks after it (clocks A−9 … A+10 by default). That covers a
trigger up to 9 clocks before its detection and also the payload-time reads
that follow it. A second alarm inside a window restarts the count. If
`T_RED − T_SUSP + T_LEAD` is not positive, the window opens at once.

While suspended, the operating core's clock is stopped by `clock_gate`: an
AND gate behind a latch that is open while the clock is low, so only whole
pulses are removed. Its outputs hold their last value. Requests that arrive
at the operating core during the window are lost, which is the point: the
trigger is among them. The trade is that a few legitimate requests around
an attack are lost too, and the host has to repeat them.
`security_emulate` is high during the window. `threat` is high from the
alarm until the window ends.

## Trigger identification and filtering

The delay buffer (`delay_fifo`) is a circular buffer of `FIFO_DEPTH` = 128
request entries (read, write, address, data; 39 bits). One entry is written
every clock, idle or not. The output tap is `t_red` entries back and can be
moved at run time. A second read port gives the entry of any age.

On an alarm, `trigger_analyzer` walks the `t_red` entries that have not yet
reached the operating core, newest first, one per clock. The buffer moves
one place per clock, so step k reads age 1 + 2k, which needs
`FIFO_DEPTH ≥ 2·T_RED`; longer delays are walked only up to `FIFO_DEPTH/2`.
It reports these requests as (pattern, mask) pairs:

| rule | request | stored pattern matches |
|---|---|---|
| R1 | read and write together | any request with both selects |
| R2 | control write with reserved bits set | that exact write |
| R3 | write to result or reserved space | any write to that address |

`trigger_memory` keeps up to `TRIG_ENTRIES` = 4 pairs, drops duplicates and
replaces the oldest when full. It compares the request leaving the buffer
with all pairs at once. On a match, `pass_switches` clears the read and write
selects, so the operating core sees an idle clock, and pulses `isolated`.
In the attack the trigger is found within a few clocks of the alarm, well
before it leaves the buffer. The first attack is therefore both isolated
and suspended. Repeats of the same attack are isolated for good. The
observation core still sees each repeat, so it still raises alarms and
suspensions.

## What the host sees

* Every response comes `T_RED + 1` clocks after its read request (41 clocks
  for AES-128 by default). `avs_s1_readdatavalid` marks it. Requests dropped
  by a suspension or by isolation get no response.
* The host cannot be held off in real time: by the time the operating core
  could stall, the request is `T_RED` clocks old. `avs_s1_waitrequest` is the
  operating core's flag and arrives with the delayed read: "this read
  returned no data". Hosts should poll the control word or wait for
  `avs_s1_irq` (also delayed) before they read results.
* `cfg_we` loads `cfg_t_red`, `cfg_t_susp` (both in clocks) and
  `cfg_filter_en` (isolation on/off) into the controller at run time.

## Parameters (`secret_top`)

| parameter | default | meaning |
|---|---|---|
| `KEY_BITS` | 128 | AES key size, 128/192/256; bus cycle = KEY_BITS/32 + 6 clocks |
| `T_RED_BUS` | 4 | reset value of the time shift, in bus cycles |
| `T_SUSP_BUS` | 2 | reset value of the suspension length, in bus cycles |
| `T_LEAD_BUS` | 1 | how far the window reaches past the delayed alarm instant |
| `FIFO_DEPTH` | 128 | buffer entries; ≥ 2·T_RED for a full trigger walk |
| `TRIG_ENTRIES` | 4 | identified-trigger slots |
| `TROJAN` | 1 | plant the Trojan in both core copies |
| `TRIGGER_PATTERN` | 24'h5AC396 | the Trojan's reserved-bit pattern |

T_RED = 4 and T_SUSP = 2 bus cycles, the key sizes, the address map and the
10/12/14-clock bus cycle are taken from the original proof of concept. The
other defaults are this design's choices.

## Modules

| file | role |
|---|---|
| `rtl/secret_top.sv` | the complete protected system |
| `rtl/secret_controller.sv` | T_RED/T_SUSP registers, suspension window, status flags |
| `rtl/trojan_detector.sv` | run-time checks on the observation core |
| `rtl/delay_fifo.sv` | time-shift buffer with scan port |
| `rtl/trigger_analyzer.sv` | buffer walk and abnormal-request rules |
| `rtl/trigger_memory.sv` | identified-trigger store and parallel match |
| `rtl/pass_switches.sv` | drops matched requests |
| `rtl/clock_gate.sv` | latch + AND clock gate |
| `rtl/avs_aes_core.sv` | the protected AES bus slave (controller, memory map) |
| `rtl/aes_key_expansion.sv`, `rtl/aes_datapath.sv` | key schedule and round datapath |
| `rtl/hth_trojan.sv` | the planted Trojan |
| `rtl/aes_pkg.sv`, `rtl/avs_pkg.sv` | AES arithmetic; bus request type and address map |

All flip-flops use an asynchronous active-high `reset`. The buffer and
key-schedule arrays have no reset; the buffer hides its contents until it
has filled.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5 (packages first; `-y`
finds the other modules by file name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/aes_pkg.sv rtl/avs_pkg.sv tb/tb_secret_top.sv --top-module tb_secret_top
./obj_dir/Vtb_secret_top
```

* `tb_secret_top` runs the full system at its default parameters.
  1. Normal encryption, with an exact 41-clock response latency on every
     read.
  2. The attack.
  3. Decryption afterwards.
  4. The attack repeated against the stored triggers.
  5. The attack with isolation switched off, so suspension alone must
     protect.
  6. Run-time retuning to T_RED = 20, then a wait-request case.

  It counts alarms, suspensions, isolations, stored triggers and wait
  requests, and fails if any of them never happens or if a key word ever
  reaches the host.
* `tb_secret_top_aes256` does the same in short with a 256-bit key (bus cycle
  14, T_RED 56).
* `tb_secret_timing` sweeps T_RED (1-60 clocks) against T_SUSP (5-40
  clocks), with isolation off. For each pair it predicts from the window
  rule above whether the operating core's Trojan fires, then checks the
  prediction. The sweep covers protected pairs, pairs where T_RED is shorter
  than the detection time, and pairs where the window is too short or
  misplaced.
* One testbench per module checks it against independent references. AES
  results are checked against FIPS-197 and SP 800-38A vectors. Timing is
  checked against the clock counts stated in each module's header.

The full-system test takes a few seconds.

## Limits and departures

* The AES core stands in for a third-party core. Only its address map,
  control bits, start sequence, bus cycle and ports are known. Its
  internals here (controller states, read latency, interrupt clearing,
  wait-request rule, the control-bit positions, key expansion before the
  first round) are this design's choices.
* When the suspension window starts is this design's choice. A window that
  began at the alarm would not cover the delayed trigger with the default
  T_RED = 4 and T_SUSP = 2 bus cycles.
* Which requests count as abnormal (R1-R3) is chosen for this core and this
  Trojan. The detector, too, catches only Trojans that leak the key through
  read data. Both are examples of the scheme, not general Trojan detectors.
* Requests lost in a suspension window are not replayed.
* The analyser identifies single abnormal requests, not multi-request
  sequences. A Trojan triggered by a sequence of individually legal requests
  is handled by suspension only.
* The host gets no real-time flow control (see above).
* Resource and power figures for an FPGA implementation are not reproduced.
