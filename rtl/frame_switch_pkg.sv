// frame_switch_pkg: types shared by the frame switcher.
//
// The per-channel state machine has the four states of the switching
// scheme: wait for the start of a frame, pass the odd field, pass the even
// field, stopped. The names follow the scheme (State_1 .. State_4); the
// two-bit binary encoding is this design's own choice.
package frame_switch_pkg;

  typedef enum logic [1:0] {
    ST1_READY = 2'd0,  // State_1: transfer readiness, waiting for the frame start
    ST2_ODD   = 2'd1,  // State_2: odd field being transferred
    ST3_EVEN  = 2'd2,  // State_3: even field being transferred
    ST4_END   = 2'd3   // State_4: transmission ended, waiting for SELECT
  } ch_state_e;

endpackage
