// tb_channel_fsm: self-checking test of the per-channel frame state machine.
//
// A directed sequence walks the machine through one whole frame (State_4 ->
// State_1 -> State_2 -> State_3 -> State_4) and checks that each state holds
// while its exit condition is false, including the traps a naive decoder
// falls into (a VSYNC with the even field must not start a frame; a VSYNC
// with the odd field must not end the odd field; TAIL only counts in
// State_3). Then 20000 cycles of random inputs are compared with a
// reference model kept as a plain integer in the testbench.
module tb_channel_fsm;
  import frame_switch_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic select_i, vsync, fid, tail;
  ch_state_e state;
  logic transmit, idle;

  int checks = 0, failures = 0;
  int ref_st;   // 1..4, the state numbers of the scheme

  channel_fsm dut (.*);

  always #5 clk = ~clk;

  // Watchdog
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int enc(int s);
    // state number -> expected ch_state_e value
    case (s)
      1: return 0;
      2: return 1;
      3: return 2;
      default: return 3;
    endcase
  endfunction

  task automatic check_state(int s, string what);
    checks++;
    if (int'(state) != enc(s) || transmit != (s == 2 || s == 3) || idle != (s == 4)) begin
      failures++;
      $display("FAIL %s: state=%0d transmit=%b idle=%b, expected State_%0d", what,
               int'(state), transmit, idle, s);
    end
  endtask

  // Drive inputs away from the clock edge, then step one cycle.
  task automatic step(logic s, logic v, logic f, logic t);
    @(negedge clk);
    select_i = s; vsync = v; fid = f; tail = t;
    @(posedge clk);
    #1;
  endtask

  initial begin
    select_i = 0; vsync = 0; fid = 0; tail = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check_state(4, "after reset");
    @(negedge clk) rst_n = 1'b1;

    // State_4 holds without SELECT, even with sync activity
    step(0, 1, 1, 1); check_state(4, "S4 hold, no select");
    step(0, 0, 0, 0); check_state(4, "S4 hold");
    step(1, 0, 0, 0); check_state(1, "S4->S1 on SELECT");
    // State_1 ignores an even-field VSYNC and a TAIL
    step(0, 1, 0, 0); check_state(1, "S1 hold, even VSYNC");
    step(0, 0, 1, 1); check_state(1, "S1 hold, FID without VSYNC");
    step(0, 1, 1, 0); check_state(2, "S1->S2 on FID=1 VSYNC=1");
    // State_2 holds through the rest of the head VSYNC and a stray TAIL
    step(0, 1, 1, 0); check_state(2, "S2 hold, odd VSYNC");
    step(0, 0, 0, 1); check_state(2, "S2 hold, FID=0 without VSYNC");
    step(0, 1, 0, 0); check_state(3, "S2->S3 on FID=0 VSYNC=1");
    step(1, 1, 1, 0); check_state(3, "S3 hold, VSYNC and SELECT");
    step(0, 0, 0, 1); check_state(4, "S3->S4 on TAIL");
    step(0, 0, 0, 0); check_state(4, "S4 hold after frame");

    // Random inputs against the reference model
    ref_st = 4;
    for (int n = 0; n < 20000; n++) begin
      logic s, v, f, t;
      s = ($urandom_range(0, 7) == 0);
      v = ($urandom_range(0, 3) == 0);
      f = $urandom_range(0, 1) == 1;
      t = ($urandom_range(0, 5) == 0);
      step(s, v, f, t);
      case (ref_st)
        1: if (v && f)  ref_st = 2;
        2: if (v && !f) ref_st = 3;
        3: if (t)       ref_st = 4;
        default: if (s) ref_st = 1;
      endcase
      check_state(ref_st, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
