# Max-CU-VF burst scheduler

In an optical burst switching (OBS) node, each data burst is announced by a burst
control packet (BCP). The BCP travels on a control channel ahead of the burst, by the
"offset time". The node has to assign every announced burst to one of the D wavelengths
(data channels) of the output link before the burst arrives. A burst can also go into
a gap (void) between bursts already booked. If the scheduler decides more slowly than
BCPs arrive, BCPs queue up, use up their offset time and their bursts are lost. So how
fast the scheduler decides matters as much as how well it packs bursts.

Schedulers of the LAUC-VF family ("latest available unused channel with void filling")
pick the channel whose void ends closest to the start of the new burst. To do that they
have to search the voids of every channel. **Max-CU-VF** skips that search. Among the
channels on which the burst fits, it takes the one with the highest *channel
utilisation* CU. CU is the summed length of the bursts already booked on the channel
within a fixed observation window. CU is one register per channel, so the whole
decision is bit-parallel logic plus one maximum finder.

This RTL implements the single-clock form of that scheduler, with 16 data channels, a
32-slot window and 256 clock cycles per slot. It decides **one BCP per clock cycle**. The
published FPGA version of this design runs at 80 MHz, which is 12.5 ns per BCP. That clock
rate has not been reproduced here.

## How a burst is judged

The observation window starts at the beginning of the slot that holds the current time.
It is `N = NUM_SLOTS` slots of `tau = SLOT_LEN` cycles. Every data channel keeps:

| state | size | meaning |
|---|---|---|
| `CH` | N bits | bit k is set while some booked burst covers part of slot k |
| start-time table | N entries | start of the booked burst whose **head** lies in slot k |
| end-time table | N entries | end of the booked burst whose **tail** lies in slot k |
| `CU` | 16 bits | summed length of the bursts booked on the channel |

For a new burst with start `Th` and end `Tt`, where `Ts` is the window start:

1. **Locate:** `Head = floor((Th - Ts)/tau)` and `Tail = floor((Tt - Ts)/tau)`.
2. **Code:** `NewBDP = ((1<<Tail) - (1<<Head)) | (1<<Tail)`. This has ones from slot
   Head to slot Tail.
3. **Judge, on every channel in parallel:** `R = NewBDP & CH`. Every burst is longer than
   a slot. So a booked burst that meets the new one only in its head slot must *end* in
   that slot, and one that meets it only in its tail slot must *start* there. That is why
   one table read per end is enough:
   - `R == 0`: feasible.
   - Only the head bit is set: feasible if the end-time entry of the head slot is before `Th`.
   - Only the tail bit is set: feasible if the start-time entry of the tail slot is after `Tt`.
   - Exactly the head and tail bits are set: both tests must pass. If the burst covers only
     those two slots, R looks the same whether or not another burst sits between the two
     neighbours. So the head slot must also hold no start entry, and the tail slot no end
     entry.
   - Any other R, for example a middle slot taken: not feasible.
4. **Select:** a binary tree of max cells compares `{feasible, CU}` over all channels.
   The lowest channel number wins a tie.
5. **Update the chosen channel:** `CH |= NewBDP`, `Th` goes into the start table at the
   head slot, `Tt` into the end table at the tail slot, and `CU += Tt - Th`.

For bursts at least one slot long, this test gives exactly the same answer as "the new
burst overlaps no booked burst". Two bursts that touch in the same cycle count as
overlapping. The answer does not depend on tau, so a slot that is partly occupied can still take a burst in its free part.
`judgment_engine.sv` holds steps 3 and 5 and `newbdp_coder.sv` holds steps 1 and 2.
`channel_selector.sv` holds step 4.

## The moving window (this design's own mechanism)

The published scheme defines the window from the current time but does not say how
`CH`, the tables and `CU` follow it as time passes. This implementation handles it as
follows:

- The slots form a **ring** indexed by `absolute slot number mod N`, so nothing is
  shifted. `newbdp_coder` computes Head and Tail relative to the window as in step 1. It
  then rotates the code left by the ring position of the current slot. `head_idx` and
  `tail_idx` are ring positions.
- In the last cycle of every slot (`slot_tick`), each engine **retires** that slot. It
  clears the slot's `CH` bit and both table entries. After that the slot is the newest one
  in the window.
- A third N-entry table keeps each burst's length at its tail slot. When the tail slot is
  retired, that length is subtracted from `CU`. So `CU` is the summed length of the bursts
  whose tail slot has not yet passed.
- A burst that starts and ends within one slot is outside the scheme's premise (the slot
  must be shorter than the shortest burst). It is accepted only when `R == 0`.
- Empty table entries are marked by **valid bits**. The published description marks them
  with the value zero, but zero is a legal value of the wrapping time counter.
- Times are 16-bit and wrap. Two times are compared by the sign of their difference
  (`maxcu_pkg::time_before`). This is correct as long as the window (8192 cycles by
  default) is under half the counter range, which `newbdp_coder` asserts at elaboration.

To hold every booked burst, the window must be longer than the largest offset plus the
longest burst: `N > (T_off_max + T_BDP_max) / tau`. With offsets of 1280–5376 cycles and
bursts of 256–2560 cycles this gives N > 31, so the default is N = 32. A burst whose end
lies beyond the window is dropped.

## Pipeline and interfaces

```
O/E receiver --> bcp_fifo (in) --> central_control --> newbdp_coder --> judgment_engine x NUM_CH
                                       ^    |                                   |
                                       |    +--> bcp_fifo (out) --> E/O tx      v
                                       +------------- channel_selector <--------+
                                            +--> Ch_Info --> switching matrix controller
```

- A BCP written at cycle *t* is read by the control unit at *t+1*. It is judged,
  selected and committed within cycle *t+2*. `valid_wave`, `drop` and `ch_info` are
  registered at *t+3*. The BCP's times are on `cur_bcp` one clock before its result,
  matching the published trace. Back-to-back BCPs give one result per clock.
- `valid_wave` is the 1-based channel number. It is 0, with `drop` high, when the burst is
  dropped. A burst is dropped when no channel fits it, or when it cannot be placed at all:
  its start is not after the current time (offset used up in the queue), its end is not
  after its start, or its end is beyond the window.
- A scheduled BCP leaves through the output FIFO with `channel` set and with `offset` set
  to the time left until the burst starts. Dropped BCPs are not forwarded.
- When the output FIFO is full, the BCP in hand waits (`stall`), and the input FIFO fills.
- `now` is the node's time: a cycle counter that starts at 0 on reset. The BCP's
  `start_time` and `end_time` must be absolute times in that count. Reset is synchronous
  and active low.

`bcp_t` (in `maxcu_pkg.sv`) holds `start_time`, `end_time`, `offset`, an 8-bit `channel`
and a 16-bit `payload` that is passed through unchanged. The published design does not
fix a BCP format, so this layout is an assumption. Replace `payload` with real fields as
needed.

Parameters of `maxcu_scheduler`: `NUM_CH` (16), `NUM_SLOTS` (32) and `SLOT_LEN` (256)
follow the published FPGA scheduler. `NUM_SLOTS` and `SLOT_LEN` must be powers of two.
`FIFO_DEPTH` (16) is assumed. The time width, `TIME_W = 16`, is a package constant.
With NUM_CH = 16 the top three bits of `valid_wave` and `ch_info.channel` are always zero.

## Not included

- **O/E receiver with burst-mode CDR, E/O transmitter and the optical switching matrix
  with its controller.** These are optical or analog parts, or they are only named in the
  published design. Their sides are the top-level ports: the input FIFO write port, the
  output FIFO read port and `ch_info`.
- **The multi-cycle variant.** The published work also reports the same algorithm as a
  5-clock sequential circuit at 200 MHz, which is 25 ns per BCP. It was slower than the single-clock
  circuit, so only the single-clock form is provided.
- **Network-level results.** The published comparison of loss ratio and throughput with
  LAUC-VF was done in a network simulator, not on this hardware. This design holds the
  D = 8 channel configuration with its default 16 channels. The D = 32 configuration needs
  `NUM_CH = 32`, which `tb_maxcu_scheduler_d32` exercises.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_judgment_engine` | The five-channel worked example: all five cases, the tables after the update, the two-slot case with and without the middle burst, a burst passing through both slots, and short bursts. Then 600k cycles of random bursts against an interval-list model, checking feasibility and CU through slot retirement and counter wraps. |
| `tb_newbdp_coder` | The worked code `8'b00111100`, and 200k random bursts against slot enumeration, covering Head, Tail, ring indices, both codes and the in-window decision. |
| `tb_channel_selector` | Directed tie and zero-CU cases, and 50k random vectors against a linear scan. |
| `tb_bcp_fifo` | Random push and pop against a queue, including push and pop at the same time while full. |
| `tb_central_control` | A cycle model of read, commit, stall, update, the refreshed BCP and the registered results. |
| `tb_maxcu_scheduler` | The whole scheduler at default size. It replays the 19-burst published trace, checks the first 18 published channel numbers (1,2,2,3,2,4,4,4,3,1,5,5,6,7,6,8,2,3) and one result per clock. It then runs 270k cycles of random traffic (offset 1280–5376, length 256–2560 cycles) in light, heavy and overload phases against a reference model. Every decision, every CU register, every output BCP and Ch_Info is checked. Each mechanism must occur: all five cases, void filling, a max-CU pick that differs from first fit, both drop kinds, stall, full input FIFO, retirement and counter wrap. |
| `tb_maxcu_scheduler_d32` | The same end-to-end checks with 32 channels, 64-cycle slots and a 128-slot window, as a 32-channel link carrying 14 KB bursts (about 90 cycles at 100 Gbps and 80 MHz) would need. A crowd of bursts due at the same time forces drops when no channel is free. |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/maxcu_pkg.sv \
          tb/tb_maxcu_scheduler.sv --top-module tb_maxcu_scheduler -o sim
./obj_dir/sim
```

The full-size end-to-end run takes about a second. The RTL also carries assertions for
its rules:
- Update only goes to a feasible channel.
- No burst is written into a slot that is being retired.
- Update is one-hot.
- The FIFOs see no overflow or underflow.
