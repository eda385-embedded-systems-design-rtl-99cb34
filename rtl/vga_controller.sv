// vga_controller: bursted VGA controller with a framebuffer FIFO and hardware sprites.
//
// Three parts share one 50 MHz clock:
//   * the signal generator (vga_sync_gen) makes 640x480 at 60 Hz timing with hcnt/vcnt
//     and a lookahead position 4 clocks ahead of them;
//   * the framebuffer path (sync_fifo + fb_reader) shows the part of RAM that the DMA
//     engine streams into the FIFO, inside a region that software sets with the limits;
//   * the sprite generator (sprite_engine) draws sprites over it on the fly.
// A multiplexer picks the sprite pixel where a sprite is opaque and the framebuffer pixel
// elsewhere, and a register on the output (RGB and both syncs) removes glitches. Both
// pixel paths are 4 clocks deep and are fed the lookahead position, so the chosen pixel
// matches the current (hcnt, vcnt); the output register then delays RGB and syncs alike
// by one clock. The RGB output is forced to 0 while either sync pulse is active, which is
// this design's choice; software otherwise decides what is shown where.
//
// Interface: fifo_wr/fifo_wdata is the DMA side of the framebuffer FIFO (one 32-bit word
// = four pixels, leftmost in bits 31:24), fifo_count its fill level for software;
// sprite_cmd carries the processor's sprite writes; limits the framebuffer region.
// fb_underflow pulses when a word was due but the FIFO was empty.
module vga_controller
  import gh_pkg::*;
#(
  parameter int unsigned NUM_SPRITES     = 40,
  parameter int unsigned SPRITE_MEM_DEPTH = 8192,
  parameter int unsigned FB_FIFO_DEPTH   = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  // framebuffer FIFO, written by DMA
  input  logic        fifo_wr,
  input  logic [31:0] fifo_wdata,
  output logic        fifo_full,
  output logic [$clog2(FB_FIFO_DEPTH+1)-1:0] fifo_count,
  // software settings
  input  fb_limits_t  limits,
  input  sprite_cmd_t sprite_cmd,
  // VGA pins
  output rgb332_t     vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  // status
  output logic        frame_start,
  output logic        fb_underflow
);

  coord_t hcnt, vcnt, la_x, la_y;
  logic   hsync, vsync, la_sub;

  vga_sync_gen u_sync (
    .clk, .rst_n, .hcnt, .vcnt, .hsync, .vsync, .frame_start,
    .la_x, .la_y, .la_sub
  );

  // framebuffer path
  logic        fifo_rd, fifo_empty;
  logic [31:0] fifo_rdata;

  sync_fifo #(.WIDTH(32), .DEPTH(FB_FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr), .wr_data(fifo_wdata),
    .rd_en(fifo_rd), .rd_data(fifo_rdata),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count),
    .overflow(), .underflow()
  );

  rgb332_t fb_pix;

  fb_reader u_fb (
    .clk, .rst_n, .limits,
    .x(la_x), .y(la_y), .sub(la_sub),
    .fifo_rd, .fifo_data(fifo_rdata), .fifo_empty,
    .pix(fb_pix), .pix_in(), .fb_underflow
  );

  // sprite path
  rgb332_t spr_pix;
  logic    spr_opaque;

  sprite_engine #(.NUM_SPRITES(NUM_SPRITES), .MEM_DEPTH(SPRITE_MEM_DEPTH)) u_spr (
    .clk, .rst_n, .cmd(sprite_cmd), .x(la_x), .y(la_y),
    .spr_pix, .spr_opaque
  );

  // multiplexer and output register
  rgb332_t pix_mux;
  assign pix_mux = spr_opaque ? spr_pix : fb_pix;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vga_rgb   <= '0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
    end else begin
      vga_rgb   <= (hsync && vsync) ? pix_mux : '0;
      vga_hsync <= hsync;
      vga_vsync <= vsync;
    end
  end

endmodule
