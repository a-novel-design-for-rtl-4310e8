// tb_frame_switch_top: end-to-end test of the frame switcher with short
// frames (200 cycles, 3-cycle VSYNC) so that many switches fit in a short
// run. The switcher itself runs at its default size. See
// frame_switch_harness for what is checked.
module tb_frame_switch_top;

  logic done;
  int   checks, failures;

  frame_switch_harness #(.FRAME_LEN(200), .VS_LEN(3), .N_RANDOM(60)) u_h (.*);

  initial begin
    fork
      begin #1; wait (done); end
      begin
        #2_000_000;   // watchdog: 200000 cycles of 10 time units
        u_h.failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

endmodule
