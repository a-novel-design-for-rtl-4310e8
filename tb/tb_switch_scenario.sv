// tb_switch_scenario: replays the short four-channel switching run that
// illustrates the scheme: each channel carries a constant 8-bit pattern
// (channel 1 00000000, channel 2 11110000, channel 3 11111111, channel 4
// 00001111) and its own vsync/fid, with the channels' frames staggered.
// Channel 1 is selected first; a request for channel 3 (ext = 0010) arrives
// while channel 1 is in its odd field. Checked: channel 1's frame is
// finished (yout stays 00000000 up to its tail), the output is then idle
// (switch_o = 0000, yout_oe low), and channel 3 follows from its next frame
// head with 11111111 and switch_o = 0010. A last request for channel 2
// (ext = 0100) brings 11110000 in the same way.
// Frame timing here is this test's own: 18-cycle frames, 9-cycle fields,
// one-cycle VSYNC at the start of each field, TAIL on the last frame cycle,
// channel k offset by 4*(k-1) cycles.
module tb_switch_scenario;
  import frame_switch_pkg::*;

  localparam int FRAME = 18;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:4] ext;
  logic       vsync  [1:4];
  logic       fid    [1:4];
  logic       tail   [1:4];
  logic [7:0] datain [1:4];
  logic [7:0] yout;
  logic       yout_oe;
  logic [1:4] switch_o;
  logic [1:4] sel_o;
  ch_state_e  state_o [1:4];

  int checks = 0, failures = 0;
  int cyc = 0;

  frame_switch_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sync generator
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= 0;
    else        cyc <= cyc + 1;

  always_comb begin
    for (int k = 1; k <= 4; k++) begin
      int p;
      p = (cyc + FRAME - 4 * (k - 1)) % FRAME;
      fid[k]   = (p < FRAME / 2);
      vsync[k] = (p == 0) || (p == FRAME / 2);
      tail[k]  = (p == FRAME - 1);
    end
  end

  assign datain[1] = 8'b0000_0000;
  assign datain[2] = 8'b1111_0000;
  assign datain[3] = 8'b1111_1111;
  assign datain[4] = 8'b0000_1111;

  // Run monitor: each completed output run (yout_oe high) as channel,
  // length and whether every sample matched the channel's pattern.
  typedef struct {
    logic [1:4] sw;
    int         len;
    logic       clean;
  } run_t;
  run_t runs[$];
  run_t cur;
  logic in_run = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (yout_oe) begin
        if (!in_run) begin
          cur.sw = switch_o; cur.len = 0; cur.clean = 1'b1;
        end
        cur.len++;
        if (switch_o != cur.sw || !$onehot(switch_o)) cur.clean = 1'b0;
        else if (yout != datain[switch_o == 4'b1000 ? 1 : switch_o == 4'b0100 ? 2 :
                                switch_o == 4'b0010 ? 3 : 4]) cur.clean = 1'b0;
      end else if (in_run) begin
        runs.push_back(cur);
      end
      in_run = yout_oe;
    end
  end

  // Wait for the next completed run and check it.
  task automatic expect_frame(logic [1:4] sw, logic [7:0] pat);
    run_t r;
    while (runs.size() == 0) @(posedge clk);
    r = runs.pop_front();
    checks++;
    if (r.sw != sw || !r.clean || r.len != FRAME - 1 || datain[sw == 4'b1000 ? 1 :
        sw == 4'b0100 ? 2 : sw == 4'b0010 ? 3 : 4] != pat) begin
      failures++;
      $display("FAIL: run on %b of %0d cycles clean=%b, expected %b with %b for %0d cycles",
               r.sw, r.len, r.clean, sw, pat, FRAME - 1);
    end
  endtask

  initial begin
    ext = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    @(negedge clk) ext = 4'b1000;
    @(negedge clk) ext = 4'b0000;
    expect_frame(4'b1000, 8'b0000_0000);
    // second frame of channel 1; request channel 3 in its odd field
    while (!yout_oe) @(posedge clk);
    repeat (3) @(posedge clk);
    @(negedge clk) ext = 4'b0010;
    @(negedge clk) ext = 4'b0000;
    checks++;
    if (switch_o != 4'b1000 || yout != 8'b0000_0000) begin
      failures++; $display("FAIL: channel 1 cut at the request");
    end
    expect_frame(4'b1000, 8'b0000_0000);
    expect_frame(4'b0010, 8'b1111_1111);
    @(negedge clk) ext = 4'b0100;
    @(negedge clk) ext = 4'b0000;
    // channel 3 may still be sending frames until channel 2 takes over
    while (switch_o != 4'b0100) @(posedge clk);
    while (runs.size() != 0) begin
      run_t r;
      r = runs.pop_front();
      checks++;
      if (r.sw != 4'b0010 || !r.clean || r.len != FRAME - 1) begin
        failures++; $display("FAIL: run on %b before channel 2", r.sw);
      end
    end
    expect_frame(4'b0100, 8'b1111_0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
