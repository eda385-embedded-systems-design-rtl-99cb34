// audio_pwm: the converter of the audio controller, 8-bit PCM to two PWM outputs.
//
// Two counters, as in the original console. A prescale counter divides the 50 MHz clock by PRESCALE
// (9, from 50 MHz / 22050 Hz / 256 = 8.86 rounded up); each time it wraps, the PWM counter
// steps through 0..255, the PCM resolution. One PWM period, 256 * 9 = 2304 clocks, is one
// sample period, so the sample rate is 50 MHz / 2304 = 21.701 kHz. An output is 1 while
// the PWM counter is below that channel's sample, so the duty cycle is sample/256.
//
// Interface: sample_l / sample_r are compared every clock; the controller changes them
// only at period boundaries. period_end is high on the last clock of a PWM period, so a
// new sample taken on that clock edge is used for the whole next period. The PWM outputs
// are registered (one clock after the counters). Reset (active low, synchronous) clears
// the counters and outputs.
module audio_pwm #(
  parameter int unsigned PRESCALE = 9,
  parameter int unsigned PWM_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PWM_BITS-1:0] sample_l,
  input  logic [PWM_BITS-1:0] sample_r,
  output logic                pwm_l,
  output logic                pwm_r,
  output logic                period_end
);

  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PW-1:0]       pre_cnt;
  logic [PWM_BITS-1:0] pwm_cnt;
  logic                pre_wrap;

  assign pre_wrap   = (pre_cnt == PW'(PRESCALE - 1));
  assign period_end = pre_wrap && (pwm_cnt == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt <= '0;
      pwm_cnt <= '0;
      pwm_l   <= 1'b0;
      pwm_r   <= 1'b0;
    end else begin
      pre_cnt <= pre_wrap ? '0 : pre_cnt + 1'b1;
      if (pre_wrap) pwm_cnt <= pwm_cnt + 1'b1;
      pwm_l <= (pwm_cnt < sample_l);
      pwm_r <= (pwm_cnt < sample_r);
    end
  end

endmodule
