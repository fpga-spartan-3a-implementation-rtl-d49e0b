# Message-based CAN arbiter (8 ports, 60-bit frames)

In a car, many Electronic Control Units (ECUs) share one CAN bus. CAN does
not use request and grant lines to decide who may send. The message itself
decides: every frame carries an 11-bit identifier, and the frame whose
identifier has the lowest value wins. On the real bus that value is the one
with the most dominant (0) bits.

This RTL does that arbitration in logic for a system with eight ECUs. Each
ECU drives a dedicated 60-bit frame port. The arbiter repeatedly picks the
frame with the lowest identifier among the eight and places it on a single
60-bit output port. The design targets a small FPGA; nothing in it is
device-specific.

## The frame

Frames are a shortened base-format CAN data frame: an 11-bit identifier and
a 2-byte data field, 60 bits in all. Bit 59 is sent first.

| bits  | field           | width | note                                   |
|-------|-----------------|-------|----------------------------------------|
| 59    | SOF             | 1     | start of frame, dominant (0)           |
| 58:48 | identifier      | 11    | arbitration field, lower = higher priority |
| 47    | RTR             | 1     | 0 data frame, 1 remote request         |
| 46    | IDE             | 1     | 0 = 11-bit base format                 |
| 45    | r0              | 1     | reserved                               |
| 44:41 | DLC             | 4     | data length code                       |
| 40:25 | data            | 16    | two bytes                              |
| 24:10 | CRC             | 15    |                                        |
| 9     | CRC delimiter   | 1     | recessive (1)                          |
| 8     | ACK slot        | 1     | sender 1, a receiver may drive 0       |
| 7     | ACK delimiter   | 1     | recessive (1)                          |
| 6:0   | EOF             | 7     | all recessive (1)                      |

`can_pkg::can_frame_t` is a packed struct with exactly this layout, so
`frame.id` is bits 58:48. Only the identifier takes part in arbitration. The
other fields pass through unchanged and are never checked. The CRC is neither
computed nor checked either.

## How a round of arbitration works

The arbiter compares frames in a fixed chain. Port 1 is compared with port 2,
the winner with port 3, and so on up to port 8. The frame that is still
standing at the end has the lowest identifier. Here this is done with **one
comparator used once per clock cycle**, not with seven comparators in a row:

```
cycle in round   0 (sample)        1        2   ...    7 (done)
                 ---------------   ------   ------     ------------------------
                 snap <= ports     cur <=   cur <=     output_frame <=
                 cur  <= port 0    min(cur, min(cur,   min(cur, snap[7])
                                   snap[1]) snap[2])   out_valid <= 1
```

* **Snapshot.** In cycle 0 of a round, all eight ports are captured at
  once. Port 0 goes straight into the candidate register `cur`, and ports
  1 to 7 go into `snap`. A round therefore judges one consistent set of
  frames. An ECU that changes its frame in the middle of a round is seen in
  the next round.
* **Chain of comparisons.** In cycles 1 to 7, `id_compare` compares `cur`
  with `snap[idx]` and keeps the frame with the lower identifier. The port
  number of the current winner is carried along with it.
* **Result.** The last comparison writes straight to `output_frame`,
  together with the winning port number `winner`. `out_valid` is high for
  the one cycle after that. The output then holds until the next round ends.
* **Ties.** If two ports have the same identifier, the lower port number
  wins, because a candidate is replaced only by a strictly lower identifier.
  In correct CAN use identifiers are unique, so this is only a safe default.

Timing at the default N_PORTS = 8: frames present in the sample cycle appear
on `output_frame` 8 clock edges later. Rounds run back to back, so a new
result arrives every 8 cycles. The comparison path is an 11-bit comparator,
a 7:1 multiplexer and a 60-bit 2:1 multiplexer.

## Modules

| file                 | what it is |
|----------------------|------------|
| `rtl/can_pkg.sv`     | frame struct `can_frame_t` and the field widths |
| `rtl/id_compare.sv`  | combinational step: passes on the frame with the lower identifier (`a` on a tie), flags `b_wins` |
| `rtl/scan_ctrl.sv`   | port counter 0..N_PORTS-1 that wraps; `sample` at 0, `done` at N_PORTS-1 |
| `rtl/can_arbiter.sv` | top: snapshot register, candidate register, output register |

Top-level ports of `can_arbiter`:

| port           | dir | width                | meaning |
|----------------|-----|----------------------|---------|
| `clk`          | in  | 1                    | clock, rising edge |
| `rst`          | in  | 1                    | asynchronous, active high; clears every register, the output included, and restarts at cycle 0 |
| `frame`        | in  | `can_frame_t [N_PORTS]` | one frame per ECU; `frame[0]` is ECU 1 |
| `output_frame` | out | `can_frame_t`        | winner of the last completed round |
| `out_valid`    | out | 1                    | one-cycle pulse when `output_frame` changes to a new result |
| `winner`       | out | clog2(N_PORTS)       | port index of `output_frame` |

`N_PORTS` (default 8, at least 2) is the only parameter. The frame layout is
fixed by the package.

## What is specified and what was chosen here

The following come from the arbiter's specification:
* 8 ports of 60 bits, clock and reset inputs, and one 60-bit output;
* the frame fields and their widths;
* the rule that the lowest identifier wins;
* the compare-two-then-the-winner-with-the-next order;
* a reset that clears the output flip-flops asynchronously.

The following are choices made in this RTL:
* one comparison per cycle, with rounds running back to back;
* the input snapshot;
* the tie rule;
* the reset polarity (active high);
* which end of the vector holds SOF;
* the `out_valid` and `winner` outputs.

Known limits:
* **Pin count.** With all eight ports on device pins, the design needs
  8 × 60 + 60 + 6 = 546 I/Os. That is far more than the 195 bonded I/Os of
  a small Spartan-3A. Put the ports behind on-chip logic, or serialise
  them, before targeting such a part.
* **Flip-flops.** The design uses about 550 flip-flops, 420 of them in the
  snapshot. If the ports are known to be stable for a whole round, the
  snapshot can be removed: make the multiplexer read `frame[idx]` directly.
  A round would then no longer see one fixed set of frames.
* **No bus protocol.** There is no bit timing, bit stuffing, CRC or
  acknowledgement handling, and no error frames. This is arbitration between
  parallel frame ports, not a CAN controller.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog.

* `tb/tb_id_compare.sv`: corner identifiers (0, 0x7FF, MSB/LSB neighbours,
  ties), plus 2,500 random pairs. The reference slices bits 58:48 directly.
* `tb/tb_scan_ctrl.sv`: 8 and 5 ports. Checks the index sequence, the
  `sample`/`done` strobes, a round length of 8 cycles, and an asynchronous
  reset in the middle of a round.
* `tb/tb_can_arbiter.sv`: the full design at its default size. A reference
  model with its own round counter predicts `out_valid`, `output_frame` and
  `winner` on every cycle. The test runs these scenarios, counts each one,
  and fails if any never happened:
  * well-formed frames with distinct identifiers;
  * every port winning at least once;
  * tied identifiers;
  * ports changing mid-round, which must only show in the next round;
  * an asynchronous reset mid-round;
  * 300 sets of random frames.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl \
  rtl/can_pkg.sv rtl/id_compare.sv rtl/scan_ctrl.sv rtl/can_arbiter.sv \
  tb/tb_can_arbiter.sv --top-module tb_can_arbiter
./obj_dir/Vtb_can_arbiter
```

Each run takes well under a second.
