// gh_pkg: types and constants shared by the game console's video and audio logic.
//
// The VGA timing constants come from the original console: a 50 MHz counter that runs
// 0..1599 per line and 0..520 per frame, hsync low while hcnt < 190 and vsync low while
// vcnt < 1. One screen pixel lasts two 50 MHz clocks, so a pixel x coordinate is hcnt/2.
// Pixels are 8-bit RGB 3:3:2 and an all-zero sprite pixel is transparent.
// The sprite command bundle mirrors the processor-facing strobes of the sprite unit
// (valid_sprite, set_sprite_size, set_sprite_offset, fill_sprite_mem and the index,
// x, y and address fields); packing them in a struct is this design's choice.
package gh_pkg;

  // ---- VGA timing (50 MHz system clock) ----
  localparam int unsigned H_MAX      = 1599;  // last hcnt value of a line
  localparam int unsigned V_MAX      = 520;   // last vcnt value of a frame
  localparam int unsigned HSYNC_END  = 190;   // hsync = 0 while hcnt < HSYNC_END
  localparam int unsigned VSYNC_END  = 1;     // vsync = 0 while vcnt < VSYNC_END
  localparam int unsigned CNT_W      = 11;    // width of hcnt / vcnt / coordinates
  localparam int unsigned SPRITE_PIPE = 4;    // sprite pipeline depth in clocks

  typedef logic [CNT_W-1:0] coord_t;

  // 8-bit colour, 3 bits red, 3 bits green, 2 bits blue
  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [1:0] b;
  } rgb332_t;

  // Processor-facing sprite command bundle (one write per strobe)
  typedef struct packed {
    logic        valid_sprite;       // write location (x, y) of sprite_index
    logic        set_sprite_size;    // write size (x = width, y = height) of sprite_index
    logic        set_sprite_offset;  // write pixel-data offset (address) of sprite_index
    logic        fill_sprite_mem;    // write pixel x[7:0] at pixel-data address
    logic [7:0]  sprite_index;
    logic [10:0] sprite_x;
    logic [10:0] sprite_y;
    logic [15:0] sprite_address;
  } sprite_cmd_t;

  // Screen limits of the framebuffer region, set by software (pixel coordinates,
  // start inclusive, end exclusive)
  typedef struct packed {
    coord_t x_start;
    coord_t x_end;
    coord_t y_start;
    coord_t y_end;
  } fb_limits_t;

  // Properties of one sprite: location 11x2 bits, size 8x2 bits, pixel-data offset 16 bits
  // (54 bits in all)
  typedef struct packed {
    logic [10:0] x;
    logic [10:0] y;
    logic [7:0]  w;
    logic [7:0]  h;
    logic [15:0] offset;
  } sprite_prop_t;

endpackage
