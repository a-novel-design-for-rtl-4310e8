// video_switch: output multiplexer of the frame switcher.
//
// Each cycle it puts on yout the data of the channel whose transmit flag is
// set in en, and raises yout_oe. When no flag is set, yout_oe is low: the
// board-level output driver then leaves the bus in high impedance, as the
// switcher does between the frames of two channels. The flags come from the
// channel state machines, which guarantee that at most one is set; an
// assertion checks that.
//
// Interface: en and switch_o are indexed [1:N_CH], so that printed as a
// binary number channel 1 is the leftmost bit (1000 = channel 1 of four).
// datain[i] is the data of channel i. Timing: one register stage; yout,
// yout_oe and switch_o show the data and flags of the previous cycle. With
// yout_oe low, yout is held at zero.
// The four channels, the 8-bit width and the released bus between frames
// are those of the original system; the AND-OR structure, the register
// stage and the separate enable (rather than a tri-state port) are this
// design's own choices.
module video_switch #(
  parameter int unsigned N_CH   = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:N_CH]     en,
  input  logic [DATA_W-1:0] datain [1:N_CH],
  output logic [DATA_W-1:0] yout,
  output logic              yout_oe,
  output logic [1:N_CH]     switch_o
);

  logic [DATA_W-1:0] mux;

  // AND-OR multiplexer: with en one-hot this is the selected channel's data.
  always_comb begin
    mux = '0;
    for (int i = 1; i <= int'(N_CH); i++)
      if (en[i]) mux |= datain[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yout     <= '0;
      yout_oe  <= 1'b0;
      switch_o <= '0;
    end else begin
      yout     <= mux;
      yout_oe  <= |en;
      switch_o <= en;
    end
  end

  a_one_channel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(en))
    else $error("video_switch: more than one channel transmitting: %b", en);

endmodule
