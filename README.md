# Frame-aligned multi-channel video switcher

A multi-camera surveillance system often shows one camera at a time on one
output and changes camera on a timer or on command. If the change happens
whenever the command arrives, it usually falls in the middle of a frame. The
monitor then shows half of one picture and half of another, or a black or
smeared frame. This RTL switches between four digitised video channels only
at frame boundaries:

- the channel that is on air always finishes the frame it has started;
- the new channel starts at the head of its next frame;
- in between, the output bus is released (high impedance).

Every frame that reaches the output is whole, and it comes from a single camera.

In the full system, each camera drives a video decoder chip (a TVP5150 class
part). The decoder turns PAL composite video into 8-bit digital video with a
vertical sync and a field id. An FPGA holds the switching logic described
here, together with a small microcontroller core. That core configures the
decoders over I2C, through an external I2C bus-switch chip. The decoders, the
bus switch and the microcontroller are not part of this RTL. The
switcher's inputs are the decoders' digital outputs and a select request.

## Per-channel state machine

Each channel has its own controller, `channel_fsm`. It has four states and
moves on when one condition is true:

| state | meaning | leaves when | goes to |
|---|---|---|---|
| State_1 `ST1_READY` | armed, waiting for a frame head | `VSYNC=1` and `FID=1` (start of the odd field) | State_2 |
| State_2 `ST2_ODD` | sending the odd field | `VSYNC=1` and `FID=0` (start of the even field) | State_3 |
| State_3 `ST3_EVEN` | sending the even field | `TAIL=1` (last sample of the image) | State_4 |
| State_4 `ST4_END` | stopped | `SELECT=1` | State_1 |

In every other case the machine stays where it is. The channel's data goes to
the output while the machine is in State_2 or State_3. That covers every
sample from the cycle after the frame-head VSYNC up to and including the
TAIL cycle. Two details catch a naive decoder, and the unit test checks both:

- A VSYNC of the even field does not start a frame.
- A VSYNC that is still high with the odd field, just after entry to State_2,
  does not end it.

The machines leave reset in State_4, so nothing is sent until a channel is
selected.

Signal conventions: `vsync` is active high. `fid` is 1 during the odd field
and 0 during the even field. `tail` is a one-cycle end-of-image flag. Decoders
do not give `tail` directly, so the board logic in front of the switcher must
produce it. For example, it can be the last active sample of the even field.

## Selection and grant (the part that prevents overlap)

This part is this design's own, and it is the most important point for a user.

- **Selection register.** The one-hot request `ext` loads a selection
  register.
  - The vectors are indexed `[1:N_CH]`. Written as a binary number, channel 1
    is the leftmost bit: `0010` selects channel 3 of four.
  - If several bits are set, the lowest-numbered channel wins.
  - `ext = 0` leaves the selection unchanged.
  - After reset nothing is selected.
- **Grant.** A channel's state machine sees `SELECT=1` only under two
  conditions: it is the selected channel, and every other channel is in
  State_4. This has three consequences:
  - A request that arrives in the middle of a frame does not disturb the
    running channel. The running channel finishes its frame and reaches
    State_4. Only then does the new channel move to State_1 and wait for its
    own frame head.
  - A channel stays selected until another is requested. While it is
    selected, it goes back to State_1 right after each tail, so it sends
    frame after frame.
  - Say a channel is already in State_1 when the selection moves away from it.
    The state machine has no way out of State_1 other than a frame head, so
    that channel still sends one whole frame. The newly selected channel
    starts after it.
- **The gap.** Between the end of one channel's frame and the start of the
  next, the output is idle: `yout_oe` is low and `switch_o` is `0000`. The
  gap has two parts:
  - The fixed part is 2 cycles. The old channel reaches State_4, then the new
    one reaches State_1.
  - The rest is the wait for the new camera's frame head. It depends on how
    the two cameras' frames are phased, and can be anything up to one frame
    period. With aligned cameras the gap is only a few cycles.

Two assertions guard these rules. At most one channel transmits at a time,
and the selection register is always one-hot or zero.

## Output stage

`video_switch` is an AND-OR multiplexer over the channels' transmit flags,
followed by one register stage:

- `yout` carries the data of the channel that was transmitting in the
  previous cycle.
- `yout_oe` is high while some channel transmits.
- `switch_o` repeats the one-hot transmit flags, so it shows which channel is
  on `yout`.

The tri-state driver itself belongs in the I/O pad: connect
`pad = yout_oe ? yout : 'z`. While `yout_oe` is low, `yout` reads 0.

## Interface of `frame_switch_top`

Parameters: `N_CH = 4` channels, `DATA_W = 8` bits per sample.

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | sample clock, common to all channels and the output |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `ext` | in | `[1:N_CH]` | one-hot select request |
| `vsync`, `fid`, `tail` | in | `[1:N_CH]` arrays of 1 bit | sync signals of each channel |
| `datain` | in | `[1:N_CH]` array of `DATA_W` | sample data of each channel |
| `yout` | out | `DATA_W` | switched data, one cycle after its input sample |
| `yout_oe` | out | 1 | output enable; bus released when low |
| `switch_o` | out | `[1:N_CH]` | channel now on `yout` |
| `sel_o` | out | `[1:N_CH]` | selection register |
| `state_o` | out | `[1:N_CH]` array of `ch_state_e` | state of each channel machine |

All inputs are sampled on the rising edge of `clk`. The design assumes that
the decoders' outputs are already in this one clock domain. Real decoders
each run on their own line-locked clock. On a board, each channel would need
a synchroniser or a small clock-crossing FIFO in front of the switcher, and
this RTL does not include one.

## Files

| file | contents |
|---|---|
| `rtl/frame_switch_pkg.sv` | `ch_state_e`, the state type |
| `rtl/channel_fsm.sv` | per-channel four-state controller |
| `rtl/video_switch.sv` | output multiplexer, register and enable |
| `rtl/frame_switch_top.sv` | selection register, grant rule, four controllers, output stage |
| `tb/tb_channel_fsm.sv` | directed walk through the states, plus 20000 random cycles against a reference model |
| `tb/tb_video_switch.sv` | random data with one-hot or empty flags; checks data, enable and channel order |
| `tb/video_source_model.sv` | test-only decoder stand-in: frames with odd and even fields, VSYNC, TAIL, and a sample pattern unique to channel, frame and position |
| `tb/frame_switch_harness.sv` | end-to-end stimulus and checker shared by the two system tests |
| `tb/tb_frame_switch_top.sv` | system test with 200-cycle frames and 60 random requests |
| `tb/tb_frame_switch_full.sv` | system test with full PAL frames (see below) |
| `tb/tb_switch_scenario.sv` | short scripted run: constant patterns per channel, channel 1, then 3, then 2 |

## Verification

The harness checker watches every cycle. It checks that:

- the output sample equals what the channel shown on `switch_o` delivered one
  cycle earlier;
- each burst of output is exactly one frame of one channel, starting right
  after the frame head and ending on the tail, with no sample skipped;
- channels never follow one another without an idle cycle;
- nothing is sent before a selection;
- a channel that stays selected starts at its first frame head on or after
  the later of these two points: one cycle after its selection, and two
  cycles after the previous tail.

The checker also counts each mechanism:

- complete frames;
- channel changes;
- requests arriving mid-frame;
- back-to-back frames of one channel;
- cycles spent waiting in State_1;
- cycles in which a selected channel is held in State_4;
- multi-bit requests;
- frames sent by a channel that was deselected while it was in State_1.

If any of these never happens, the checker counts a failure.

`tb_frame_switch_full` runs the top at its default parameters with PAL frames
as a BT.656-style 8-bit 4:2:2 stream:

- 27 MHz, 1728 words per line, 625 lines: 1,080,000 cycles per frame;
- a field change at mid-frame and a three-line VSYNC;
- cameras out of phase.

It covers about 25 million cycles, a little over 20 frames, in under a
minute of simulation.

Simulating with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -yrtl -ytb \
    rtl/frame_switch_pkg.sv tb/tb_frame_switch_top.sv --top-module tb_frame_switch_top
./obj_dir/Vtb_frame_switch_top
```

Every test ends with a line `TB_RESULT checks=N failures=M`.

## Choices made here, and limits

- The four states and their conditions come from the switching scheme. The
  following are choices of this design:
  - the selection register and its lowest-channel priority;
  - the grant rule;
  - reset to State_4;
  - the state encoding;
  - the registered output;
  - the single clock.
- `tail` is an input. The end-of-image flag is assumed to come from outside.
- High impedance appears as `yout_oe`, not as a tri-state port.
- There is no automatic (timed) rotation between cameras. That belongs in the
  software that drives `ext`. Because switching is frame-aligned, such
  software cannot cause a torn frame.
- The decoders, the I2C bus switch, the microcontroller core that sets up the
  decoders, the cameras and the monitor are outside this RTL.
