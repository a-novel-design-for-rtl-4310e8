// tb_video_switch: self-checking test of the output multiplexer.
//
// Drives random channel data with the transmit flags either all clear or
// one-hot, and checks one cycle later that yout carries the flagged
// channel's data, yout_oe is set exactly when a flag was set, and switch_o
// repeats the flags. Channel 1 is the leftmost bit of en/switch_o.
module tb_video_switch;

  localparam int N_CH   = 4;
  localparam int DATA_W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:N_CH]     en;
  logic [DATA_W-1:0] datain [1:N_CH];
  logic [DATA_W-1:0] yout;
  logic              yout_oe;
  logic [1:N_CH]     switch_o;

  int checks = 0, failures = 0;
  int exp_ch;
  logic [DATA_W-1:0] exp_data;

  video_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0;
    for (int i = 1; i <= N_CH; i++) datain[i] = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (yout_oe !== 1'b0 || switch_o !== '0) begin
      failures++; $display("FAIL reset: oe=%b switch=%b", yout_oe, switch_o);
    end
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      exp_ch = $urandom_range(0, N_CH);          // 0 = no channel
      en = '0;
      if (exp_ch != 0) en[exp_ch] = 1'b1;
      for (int i = 1; i <= N_CH; i++) datain[i] = DATA_W'($urandom);
      exp_data = (exp_ch != 0) ? datain[exp_ch] : '0;
      @(posedge clk);
      #1;
      // inputs change at the next negedge, so the check sees this cycle's result
      checks++;
      if (yout_oe != (exp_ch != 0) || switch_o != en || (exp_ch != 0 && yout != exp_data)) begin
        failures++;
        $display("FAIL ch=%0d en=%b: yout=%h exp=%h oe=%b switch=%b", exp_ch, en, yout,
                 exp_data, yout_oe, switch_o);
      end
    end

    // the leftmost bit is channel 1
    @(negedge clk);
    en = 4'b1000;
    datain[1] = 8'h5A; datain[2] = 8'h00; datain[3] = 8'h00; datain[4] = 8'h00;
    @(posedge clk);
    #1;
    checks++;
    if (yout != 8'h5A || switch_o != 4'b1000) begin
      failures++; $display("FAIL channel 1 ordering: yout=%h switch=%b", yout, switch_o);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
