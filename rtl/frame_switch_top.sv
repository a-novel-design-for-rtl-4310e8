// frame_switch_top: multi-channel video switcher that changes channel only
// on frame boundaries.
//
// Four digitised video inputs arrive with their vertical sync (vsync), field
// id (fid, 1 = odd field) and end-of-image flag (tail). A select request on
// ext names the channel to show. Rather than cutting over at once, which
// would tear the picture, every channel has its own state machine
// (channel_fsm) that only starts sending at a frame head (VSYNC with the odd
// field) and only stops after the image tail. A request that arrives in the
// middle of a frame therefore lets the current frame finish; the output is
// then idle (yout_oe low, bus in high impedance) until the new channel's next
// frame head, and from there the new channel is sent whole.
//
// Selection: ext is a one-hot request, indexed [1:N_CH] so that printed as a
// binary number channel 1 is the leftmost bit (0010 selects channel 3 of
// four). A non-zero ext loads the selection register; if more than one bit is
// set, the lowest-numbered channel wins. ext = 0 leaves the selection as it
// is. After reset nothing is selected and the output is idle.
//
// Grant: a channel's state machine sees SELECT only while it is the selected
// channel and every other channel's state machine is in State_4. So a new
// channel leaves State_4 only after the old one has ended its frame, and two
// channels can never transmit at once. While a channel stays selected it
// runs frame after frame (State_4 -> State_1 again right after each tail).
// The per-channel states and their conditions follow the switching scheme;
// the selection register, the grant rule, the shared clock and the
// asynchronous active-low reset are this design's own choices.
//
// Timing: all inputs are sampled on the rising edge of clk, which is assumed
// to be common to all channels (each decoder's output already in this clock
// domain). Output latency is one cycle after a channel's transmit flag
// (see video_switch); switch_o shows the channel on yout.
module frame_switch_top
  import frame_switch_pkg::*;
#(
  parameter int unsigned N_CH   = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:N_CH]     ext,
  input  logic              vsync  [1:N_CH],
  input  logic              fid    [1:N_CH],
  input  logic              tail   [1:N_CH],
  input  logic [DATA_W-1:0] datain [1:N_CH],
  output logic [DATA_W-1:0] yout,
  output logic              yout_oe,
  output logic [1:N_CH]     switch_o,
  output logic [1:N_CH]     sel_o,
  output ch_state_e         state_o [1:N_CH]
);

  logic [1:N_CH] sel, sel_nxt;
  logic [1:N_CH] grant;
  logic [1:N_CH] transmit;
  logic [1:N_CH] idle;

  // Selection register: lowest-numbered requested channel.
  always_comb begin
    sel_nxt = sel;
    for (int i = int'(N_CH); i >= 1; i--)
      if (ext[i]) begin
        sel_nxt    = '0;
        sel_nxt[i] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else        sel <= sel_nxt;
  end

  // SELECT for channel i: selected, and every other channel stopped.
  always_comb begin
    for (int i = 1; i <= int'(N_CH); i++) begin
      grant[i] = sel[i];
      for (int j = 1; j <= int'(N_CH); j++)
        if (j != i && !idle[j]) grant[i] = 1'b0;
    end
  end

  for (genvar g = 1; g <= int'(N_CH); g++) begin : g_ch
    channel_fsm u_fsm (
      .clk      (clk),
      .rst_n    (rst_n),
      .select_i (grant[g]),
      .vsync    (vsync[g]),
      .fid      (fid[g]),
      .tail     (tail[g]),
      .state    (state_o[g]),
      .transmit (transmit[g]),
      .idle     (idle[g])
    );
  end

  video_switch #(.N_CH(N_CH), .DATA_W(DATA_W)) u_switch (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (transmit),
    .datain   (datain),
    .yout     (yout),
    .yout_oe  (yout_oe),
    .switch_o (switch_o)
  );

  assign sel_o = sel;

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("frame_switch_top: selection not one-hot: %b", sel);

endmodule
