// audio_ctrl: stereo audio controller, a sample FIFO in front of the PWM converter.
//
// Audio is 8-bit PCM stereo. The processor copies it from flash into the FIFO over the
// bus; the controller reads one stereo sample per PWM period, i.e. at the sample rate
// (21.701 kHz with the default prescaler), and the converter (audio_pwm) turns the left
// and right bytes into two PWM pins. A FIFO word holds one stereo sample, left byte in
// bits 15:8 and right byte in bits 7:0; the word layout and the FIFO depth are this
// design's choices. The FIFO's registered read data is the sample register: it changes on
// the edge that starts a new PWM period and is held through it. When the FIFO is empty
// the last sample is played again and audio_underflow pulses.
//
// Interface: wr_en/wr_data is the processor side of the FIFO, fifo_count its fill level
// for software to poll, pwm_left/pwm_right the audio pins.
module audio_ctrl #(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned PRESCALE   = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  output logic        fifo_full,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic        pwm_left,
  output logic        pwm_right,
  output logic        sample_tick,
  output logic        audio_underflow
);

  logic [15:0] sample;
  logic        empty;

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en, .wr_data,
    .rd_en(sample_tick), .rd_data(sample),
    .full(fifo_full), .empty, .count(fifo_count),
    .overflow(), .underflow(audio_underflow)
  );

  audio_pwm #(.PRESCALE(PRESCALE), .PWM_BITS(8)) u_pwm (
    .clk, .rst_n,
    .sample_l(sample[15:8]), .sample_r(sample[7:0]),
    .pwm_l(pwm_left), .pwm_r(pwm_right),
    .period_end(sample_tick)
  );

endmodule
