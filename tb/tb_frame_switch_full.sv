// tb_frame_switch_full: the frame switcher at its default size fed with
// full-size PAL frames. Each channel delivers ITU-R BT.656-style 8-bit 4:2:2
// data at 27 MHz: 1728 words per line, 625 lines, so 1,080,000 clock cycles
// per frame, with the field change at mid-frame and a VSYNC three lines
// (5184 cycles) long. The directed switching sequence of
// frame_switch_harness runs once, plus two random requests.
module tb_frame_switch_full;

  logic done;
  int   checks, failures;

  frame_switch_harness #(.FRAME_LEN(1728 * 625), .VS_LEN(3 * 1728), .N_RANDOM(2),
                         .PH2(1728 * 100), .PH3(1728 * 333), .PH4(1728 * 480)) u_h (.*);

  initial begin
    fork
      begin #1; wait (done); end
      begin
        #400_000_000;   // watchdog: 40 million cycles
        u_h.failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

endmodule
