// tb_audio_pwm: drives a new random left/right sample pair at every period_end and checks,
// for each following PWM period, that each output was high for exactly 9 * sample clocks
// (the PWM counter is below the sample for `sample` steps of 9 clocks) and that periods
// are 2304 clocks long (50 MHz / 2304 = 21.701 kHz). Samples 0 and 255 are included.
module tb_audio_pwm;
  logic clk = 0, rst_n = 0;
  logic [7:0] sample_l, sample_r;
  logic pwm_l, pwm_r, period_end;
  int checks = 0, failures = 0;

  audio_pwm dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int nper = 0;
  always @(posedge clk) if (period_end) begin
    nper++;
    sample_l <= (nper == 3) ? 8'd0   : (nper == 4) ? 8'd255 : 8'($urandom);
    sample_r <= (nper == 3) ? 8'd255 : (nper == 4) ? 8'd0   : 8'($urandom);
  end

  initial begin
    int acc_l, acc_r, clocks, last_pe, windows;
    logic [7:0] cur_l, cur_r;
    bit pe_prev;
    sample_l = 8'd100; sample_r = 8'd30;
    acc_l = 0; acc_r = 0; clocks = 0; last_pe = -1; windows = 0; pe_prev = 0;
    cur_l = 0; cur_r = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2304 * 12; k++) begin
      @(negedge clk);
      acc_l += int'(pwm_l); acc_r += int'(pwm_r);
      if (pe_prev) begin
        if (windows > 0) begin
          check(acc_l == 9 * int'(cur_l), $sformatf("left duty %0d vs %0d", acc_l, cur_l));
          check(acc_r == 9 * int'(cur_r), $sformatf("right duty %0d vs %0d", acc_r, cur_r));
        end
        windows++;
        acc_l = 0; acc_r = 0;
      end
      pe_prev = period_end;
      if (period_end) begin
        if (last_pe >= 0) check(k - last_pe == 2304, "period length 2304 clocks");
        last_pe = k;
        cur_l = sample_l; cur_r = sample_r;  // sample loaded at the coming edge
      end
    end
    // samples at the edge are the ones assigned on that edge: re-read after it
    check(windows >= 10, "periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2304 * 14) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
