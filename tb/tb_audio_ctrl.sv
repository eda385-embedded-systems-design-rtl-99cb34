// tb_audio_ctrl: with a 16-entry FIFO, writes 20 stereo samples back to back (the last 4
// must be refused: full), then checks that the converter plays the 16 accepted samples in
// order, one per 2304-clock PWM period, left byte on pwm_left and right byte on pwm_right
// (high time 9 * sample clocks), and that once the FIFO is empty the last sample is
// repeated and audio_underflow pulses once per period.
module tb_audio_ctrl;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [15:0] wr_data = '0;
  logic fifo_full;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;
  logic pwm_left, pwm_right, sample_tick, audio_underflow;
  int checks = 0, failures = 0;

  audio_ctrl #(.FIFO_DEPTH(DEPTH)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  logic [15:0] exp_q[$];
  int n_full = 0, n_under = 0;

  initial begin
    int acc_l, acc_r, windows, played, last_tick;
    logic [15:0] cur, nxt;
    bit pe_prev;
    acc_l = 0; acc_r = 0; windows = 0; played = 0; pe_prev = 0; cur = '0; last_tick = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      wr_en = 1;
      wr_data = (i == 0) ? 16'h00FF : (i == 1) ? 16'hFF00 : 16'($urandom);
      if (fifo_full) n_full++;
      else exp_q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    check(exp_q.size() == DEPTH && n_full == 4, "four writes refused when full");
    check(fifo_count == DEPTH, "fill level");
    nxt = cur;
    for (int k = 0; k < 2304 * 20; k++) begin
      @(negedge clk);
      acc_l += int'(pwm_left); acc_r += int'(pwm_right);
      if (audio_underflow) n_under++;
      if (pe_prev) begin
        if (windows > 0) begin
          check(acc_l == 9 * int'(cur[15:8]), "left duty");
          check(acc_r == 9 * int'(cur[7:0]), "right duty");
        end
        windows++;
        acc_l = 0; acc_r = 0;
      end
      pe_prev = sample_tick;
      if (sample_tick) begin
        if (last_tick >= 0) check(k - last_tick == 2304, "one sample per 2304 clocks");
        last_tick = k;
        // the first period after reset plays the reset value 0
        cur = nxt;
        if (exp_q.size() > 0) begin nxt = exp_q.pop_front(); played++; end
      end
    end
    check(played == DEPTH, "all samples played");
    check(n_under >= 2, "underflow signalled after the FIFO ran dry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2304 * 22) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
