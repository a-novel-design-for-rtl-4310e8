// channel_fsm: frame-aligned transfer controller for one video channel.
//
// A channel may only put whole frames on the output. The controller follows
// a four-state cycle, one step per condition, and stays in a state while its
// exit condition is false:
//   State_4 (end)   --SELECT=1-------------> State_1
//   State_1 (ready) --FID=1 and VSYNC=1----> State_2   (start of an odd field = frame head)
//   State_2 (odd)   --FID=0 and VSYNC=1----> State_3   (start of the even field)
//   State_3 (even)  --TAIL=1---------------> State_4   (end of the image)
// The states and their conditions are those of the switching scheme. Leaving
// reset in State_4, so that nothing is sent until the channel is selected,
// is this design's own choice, as is the asynchronous active-low reset.
//
// Interface: select_i, vsync, fid and tail are sampled on the rising edge of
// clk; all active high, fid = 1 for the odd field. state is the registered
// state; transmit is high in State_2 and State_3, i.e. from the cycle after
// the frame-head VSYNC up to and including the cycle in which TAIL is high.
// idle is high in State_4.
module channel_fsm
  import frame_switch_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      select_i,
  input  logic      vsync,
  input  logic      fid,
  input  logic      tail,
  output ch_state_e state,
  output logic      transmit,
  output logic      idle
);

  ch_state_e state_nxt;

  always_comb begin
    state_nxt = state;
    unique case (state)
      ST1_READY: if (vsync &&  fid) state_nxt = ST2_ODD;
      ST2_ODD:   if (vsync && !fid) state_nxt = ST3_EVEN;
      ST3_EVEN:  if (tail)          state_nxt = ST4_END;
      ST4_END:   if (select_i)      state_nxt = ST1_READY;
      default:                      state_nxt = ST4_END;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST4_END;
    else        state <= state_nxt;
  end

  assign transmit = (state == ST2_ODD) || (state == ST3_EVEN);
  assign idle     = (state == ST4_END);

endmodule
