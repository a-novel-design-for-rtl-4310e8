// frame_switch_harness: end-to-end test bench body for frame_switch_top.
//
// Four video_source_model instances, out of phase with one another, feed
// the switcher at its default size (four channels, 8-bit data). A directed
// sequence of select requests is followed by N_RANDOM random ones, and a
// checker watches every output cycle:
//   * yout carries the sample the channel on switch_o had one cycle before;
//   * every run of output samples is one whole frame of one channel: it
//     starts right after the frame-head VSYNC (odd field) and ends with the
//     TAIL sample, with positions in order and no sample missing;
//   * between runs the output is idle (yout_oe low) for at least one cycle;
//   * nothing is sent before a channel was selected, and a run comes from a
//     channel that was selected since the previous run;
//   * start latency: when the selected channel stays selected, its run
//     begins at its first frame head that falls on or after the later of
//     (selection + 1 cycle) and (previous tail + 2 cycles).
// It also counts each mechanism of the design and fails the test if one
// never happened: a complete frame, a channel change, a request arriving in
// mid-frame (the old frame then runs to its tail), back-to-back frames of
// one channel, a channel waiting in State_1 for its frame head, a selected
// channel held in State_4 while another one finishes, a multi-bit request
// resolved by priority, and a channel that was deselected while waiting in
// State_1 still sending its one frame.
// Results come out on checks/failures when done rises.
module frame_switch_harness #(
  parameter int FRAME_LEN = 200,
  parameter int VS_LEN    = 3,
  parameter int N_RANDOM  = 40,
  parameter int PH2       = 37,
  parameter int PH3       = 111,
  parameter int PH4       = 160
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import frame_switch_pkg::*;

  localparam int N_CH = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:N_CH] ext;
  logic          vsync  [1:N_CH];
  logic          fid    [1:N_CH];
  logic          tail   [1:N_CH];
  logic [7:0]    datain [1:N_CH];
  int            pos    [1:N_CH];
  int            frame  [1:N_CH];
  logic [7:0]    yout;
  logic          yout_oe;
  logic [1:N_CH] switch_o;
  logic [1:N_CH] sel_o;
  ch_state_e     state_o [1:N_CH];

  always #5 clk = ~clk;

  frame_switch_top dut (.*);

  video_source_model #(.CH(1), .FRAME_LEN(FRAME_LEN), .VS_LEN(VS_LEN), .PHASE(0)) u_src1 (
    .clk, .rst_n, .vsync(vsync[1]), .fid(fid[1]), .tail(tail[1]), .data(datain[1]),
    .pos(pos[1]), .frame(frame[1]));
  video_source_model #(.CH(2), .FRAME_LEN(FRAME_LEN), .VS_LEN(VS_LEN), .PHASE(PH2)) u_src2 (
    .clk, .rst_n, .vsync(vsync[2]), .fid(fid[2]), .tail(tail[2]), .data(datain[2]),
    .pos(pos[2]), .frame(frame[2]));
  video_source_model #(.CH(3), .FRAME_LEN(FRAME_LEN), .VS_LEN(VS_LEN), .PHASE(PH3)) u_src3 (
    .clk, .rst_n, .vsync(vsync[3]), .fid(fid[3]), .tail(tail[3]), .data(datain[3]),
    .pos(pos[3]), .frame(frame[3]));
  video_source_model #(.CH(4), .FRAME_LEN(FRAME_LEN), .VS_LEN(VS_LEN), .PHASE(PH4)) u_src4 (
    .clk, .rst_n, .vsync(vsync[4]), .fid(fid[4]), .tail(tail[4]), .data(datain[4]),
    .pos(pos[4]), .frame(frame[4]));

  // ---------------------------------------------------------------- checker
  localparam int HIST = 8;

  longint    cyc;
  logic [7:0] prev_data [1:N_CH];
  int        prev_pos  [1:N_CH];
  int        sel_ch_hist [HIST];       // selected channel (0 = none) per cycle
  longint    sel_since_hist [HIST];    // cycle that selection began
  int        cur_sel_ch;
  longint    cur_sel_since;
  logic [1:N_CH] sel_since_end;        // channels selected since the last run ended
  logic      in_run;
  int        run_ch, last_run_ch, last_pos;
  longint    last_tail_cyc;
  logic      midframe_req;             // another channel requested during this run

  int m_frames, m_switch, m_midframe, m_b2b, m_s1wait, m_hold, m_priority, m_mind, m_gap;

  function automatic int ch_of(logic [1:N_CH] v);
    for (int i = 1; i <= N_CH; i++) if (v[i]) return i;
    return 0;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0;
      in_run = 1'b0;
      last_run_ch = 0;
      last_tail_cyc = -1000;
      cur_sel_ch = 0;
      cur_sel_since = 0;
      sel_since_end = '0;
      midframe_req = 1'b0;
      for (int i = 0; i < HIST; i++) begin sel_ch_hist[i] = 0; sel_since_hist[i] = 0; end
    end else begin
      cyc++;
      // selection history (the register output seen during this cycle)
      if (ch_of(sel_o) != cur_sel_ch) begin
        cur_sel_ch    = ch_of(sel_o);
        cur_sel_since = cyc;
      end
      sel_ch_hist[cyc % HIST]    = cur_sel_ch;
      sel_since_hist[cyc % HIST] = cur_sel_since;
      sel_since_end |= sel_o;
      if (in_run && cur_sel_ch != 0 && cur_sel_ch != run_ch) midframe_req = 1'b1;

      // mechanism counters from the state machines
      for (int i = 1; i <= N_CH; i++) begin
        if (state_o[i] == ST1_READY) m_s1wait++;
        if (sel_o[i] && state_o[i] == ST4_END)
          for (int j = 1; j <= N_CH; j++)
            if (j != i && state_o[j] != ST4_END) begin m_hold++; break; end
      end

      // output checks
      checks++;
      if (yout_oe) begin
        int c;
        c = ch_of(switch_o);
        if (!$onehot(switch_o)) fail($sformatf("switch_o not one-hot: %b", switch_o));
        else if (yout != prev_data[c])
          fail($sformatf("ch%0d yout=%h expected %h (pos %0d)", c, yout, prev_data[c], prev_pos[c]));
        if (c != 0) begin
          if (in_run && c != run_ch) fail($sformatf("channel %0d follows %0d with no gap", c, run_ch));
          if (in_run && c == run_ch) begin
            if (prev_pos[c] != last_pos + 1)
              fail($sformatf("ch%0d sample pos %0d after %0d", c, prev_pos[c], last_pos));
            last_pos = prev_pos[c];
          end else begin
            longint h, ready;
            int hpos;
            // a new run
            in_run = 1'b1;
            run_ch = c;
            last_pos = prev_pos[c];
            midframe_req = 1'b0;
            if (!(prev_pos[c] >= 1 && prev_pos[c] <= VS_LEN))
              fail($sformatf("ch%0d run starts at pos %0d, not at the frame head", c, prev_pos[c]));
            if (!sel_since_end[c])
              fail($sformatf("ch%0d sends without having been selected", c));
            h    = cyc - 2;
            hpos = prev_pos[c] - 1;
            if (sel_ch_hist[h % HIST] == c) begin
              ready = sel_since_hist[h % HIST] + 1;
              if (last_tail_cyc + 2 > ready) ready = last_tail_cyc + 2;
              checks++;
              if (h < ready || (h != ready && hpos != 0) || h - ready >= FRAME_LEN)
                fail($sformatf("ch%0d start latency: head at %0d, ready at %0d", c, h, ready));
            end else begin
              m_mind++;
            end
            if (last_run_ch != 0 && last_run_ch != c) m_switch++;
            if (last_run_ch == c) m_b2b++;
            if (last_run_ch != 0) m_gap++;
          end
        end
      end else if (in_run) begin
        // the run ended in the previous cycle
        checks++;
        if (last_pos != FRAME_LEN - 1)
          fail($sformatf("ch%0d frame cut at pos %0d", run_ch, last_pos));
        else begin
          m_frames++;
          if (midframe_req) m_midframe++;
        end
        in_run = 1'b0;
        last_run_ch = run_ch;
        last_tail_cyc = cyc - 2;
        sel_since_end = sel_o;
      end

      for (int i = 1; i <= N_CH; i++) begin
        prev_data[i] = datain[i];
        prev_pos[i]  = pos[i];
      end
    end
  end

  // --------------------------------------------------------------- stimulus
  task automatic request(logic [1:N_CH] r);
    @(negedge clk);
    ext = r;
    if (!$onehot0(r)) m_priority++;
    @(negedge clk);
    ext = '0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    done = 1'b0;
    checks = 0; failures = 0;
    m_frames = 0; m_switch = 0; m_midframe = 0; m_b2b = 0; m_s1wait = 0; m_hold = 0;
    m_priority = 0; m_mind = 0; m_gap = 0;
    ext = '0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // nothing selected: the output stays idle
    wait_cycles(FRAME_LEN + FRAME_LEN / 3);
    checks++;
    if (m_gap != 0 || in_run) fail("output active with nothing selected");

    // channel 1, several frames back to back
    request(4'b1000);
    wait_cycles(3 * FRAME_LEN + FRAME_LEN / 2);

    // switch to channel 3 in the middle of a channel-1 frame
    wait (in_run && last_pos > FRAME_LEN / 3);
    request(4'b0010);
    wait_cycles(3 * FRAME_LEN);

    // ask for channel 2, then change to channel 4 while 2 waits in State_1
    wait (in_run && last_pos > FRAME_LEN / 4);
    request(4'b0100);
    wait (state_o[2] == ST1_READY);
    request(4'b0001);
    wait_cycles(4 * FRAME_LEN);

    // two bits at once: channel 2 has priority over channel 4
    request(4'b0101);
    checks++;
    if (sel_o != 4'b0100) fail($sformatf("priority: sel=%b, expected 0100", sel_o));
    wait_cycles(3 * FRAME_LEN);

    // re-selecting the running channel changes nothing
    request(4'b0100);
    wait_cycles(2 * FRAME_LEN);

    // random requests at random times
    for (int n = 0; n < N_RANDOM; n++) begin
      logic [1:N_CH] r;
      r = '0;
      case ($urandom_range(0, 3))
        0:       r = 4'($urandom);           // any pattern, also zero or several bits
        default: r[$urandom_range(1, N_CH)] = 1'b1;
      endcase
      request(r);
      wait_cycles($urandom_range(1, 2 * FRAME_LEN));
    end
    wait_cycles(3 * FRAME_LEN);

    $display("mechanisms: frames=%0d switches=%0d midframe=%0d back_to_back=%0d s1_wait_cycles=%0d",
             m_frames, m_switch, m_midframe, m_b2b, m_s1wait);
    $display("            hold_cycles=%0d priority=%0d deselected_in_s1=%0d idle_gaps=%0d",
             m_hold, m_priority, m_mind, m_gap);
    checks++; if (m_frames   == 0) fail("no complete frame");
    checks++; if (m_switch   == 0) fail("no channel change");
    checks++; if (m_midframe == 0) fail("no mid-frame request");
    checks++; if (m_b2b      == 0) fail("no back-to-back frames");
    checks++; if (m_s1wait   == 0) fail("no State_1 wait");
    checks++; if (m_hold     == 0) fail("no grant hold");
    checks++; if (m_priority == 0) fail("no multi-bit request");
    checks++; if (m_mind     == 0) fail("no frame from a channel deselected in State_1");
    checks++; if (m_gap      == 0) fail("no idle gap between runs");
    done = 1'b1;
  end

endmodule
