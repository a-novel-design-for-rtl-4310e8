// video_source_model: behavioural stand-in for one video decoder output.
//
// Produces the digital side of a PAL decoder as the frame switcher sees it:
// a frame of FRAME_LEN clock cycles split into an odd field (first half,
// fid = 1) and an even field (second half, fid = 0). vsync is high for the
// first VS_LEN cycles of each field, tail is high on the last cycle of the
// frame, and data is a pattern that depends on the channel, the frame count
// and the position, so a checker can tell every sample apart (see
// pix()). PHASE shifts this channel's frames against the others.
// Not synthesizable logic of the design: a test model only.
module video_source_model #(
  parameter int CH        = 1,
  parameter int FRAME_LEN = 200,
  parameter int VS_LEN    = 3,
  parameter int PHASE     = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       vsync,
  output logic       fid,
  output logic       tail,
  output logic [7:0] data,
  output int         pos,     // position in the frame, 0 .. FRAME_LEN-1
  output int         frame    // frame counter
);

  localparam int HALF = FRAME_LEN / 2;

  // Sample value of channel ch, frame f, position p.
  function automatic logic [7:0] pix(int ch, int f, int p);
    return 8'((ch * 61) + (f * 23) + (p * 7) + (p >> 8) * 5);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= PHASE % FRAME_LEN;
      frame <= 0;
    end else if (pos == FRAME_LEN - 1) begin
      pos   <= 0;
      frame <= frame + 1;
    end else begin
      pos <= pos + 1;
    end
  end

  always_comb begin
    fid   = (pos < HALF);
    vsync = (pos < VS_LEN) || (pos >= HALF && pos < HALF + VS_LEN);
    tail  = (pos == FRAME_LEN - 1);
    data  = pix(CH, frame, pos);
  end

endmodule
