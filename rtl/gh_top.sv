// gh_top: custom logic of the FPGA guitar-game console.
//
// The console is a soft processor system; the processor, its bus, timer, interrupt
// controller, UART, GPIO and DMA engine are standard cores and sit outside this module.
// What is custom is gathered here: the VGA controller (timing, framebuffer FIFO path and
// hardware sprites) and the stereo PWM audio controller, both on the 50 MHz system clock.
// The ports toward the standard cores are brought out as plain signals:
//   fb_wr / fb_wdata        DMA writes into the framebuffer FIFO (4 pixels per word)
//   fb_limits               framebuffer region set by software
//   sprite_cmd              sprite property and pixel-data writes from the processor
//   aud_wr / aud_wdata      processor writes of stereo samples into the audio FIFO
//   *_count, *_full         fill levels that software polls from its 2 kHz interrupt
//   frame_start, fb_underflow, aud_tick, aud_underflow  status and event pulses
module gh_top
  import gh_pkg::*;
#(
  parameter int unsigned NUM_SPRITES      = 40,
  parameter int unsigned SPRITE_MEM_DEPTH = 8192,
  parameter int unsigned FB_FIFO_DEPTH    = 2048,
  parameter int unsigned AUD_FIFO_DEPTH   = 1024,
  parameter int unsigned AUD_PRESCALE     = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  // video
  input  logic        fb_wr,
  input  logic [31:0] fb_wdata,
  output logic        fb_full,
  output logic [$clog2(FB_FIFO_DEPTH+1)-1:0] fb_count,
  input  fb_limits_t  fb_limits,
  input  sprite_cmd_t sprite_cmd,
  output rgb332_t     vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        frame_start,
  output logic        fb_underflow,
  // audio
  input  logic        aud_wr,
  input  logic [15:0] aud_wdata,
  output logic        aud_full,
  output logic [$clog2(AUD_FIFO_DEPTH+1)-1:0] aud_count,
  output logic        audio_left,
  output logic        audio_right,
  output logic        aud_tick,
  output logic        aud_underflow
);

  vga_controller #(
    .NUM_SPRITES(NUM_SPRITES),
    .SPRITE_MEM_DEPTH(SPRITE_MEM_DEPTH),
    .FB_FIFO_DEPTH(FB_FIFO_DEPTH)
  ) u_vga (
    .clk, .rst_n,
    .fifo_wr(fb_wr), .fifo_wdata(fb_wdata), .fifo_full(fb_full), .fifo_count(fb_count),
    .limits(fb_limits), .sprite_cmd,
    .vga_rgb, .vga_hsync, .vga_vsync,
    .frame_start, .fb_underflow
  );

  audio_ctrl #(
    .FIFO_DEPTH(AUD_FIFO_DEPTH),
    .PRESCALE(AUD_PRESCALE)
  ) u_audio (
    .clk, .rst_n,
    .wr_en(aud_wr), .wr_data(aud_wdata),
    .fifo_full(aud_full), .fifo_count(aud_count),
    .pwm_left(audio_left), .pwm_right(audio_right),
    .sample_tick(aud_tick), .audio_underflow(aud_underflow)
  );

endmodule
