// sprite_props: property registers of the hardware sprites.
//
// Each of NUM_SPRITES sprites has a location (x, y, 11 bits each, in the 800x521 pixel
// space of the whole frame including its invisible parts), a size (width and height, 8
// bits each, 0..255) and a 16-bit offset of its pixel data in the sprite memory: 54 bits.
// The original console keeps location and size in registers because every sprite is compared with
// the pixel position at once; all properties are brought out in parallel.
//
// Writes, one per clock, use the processor-facing strobes of the original console:
//   valid_sprite      -> location of sprite_index = (sprite_x, sprite_y)
//   set_sprite_size   -> width = sprite_x[7:0], height = sprite_y[7:0]
//   set_sprite_offset -> offset = sprite_address
// A write to an index at or above NUM_SPRITES is ignored. Properties may change at any
// time, also while the sprite is being drawn. Reset (active low, synchronous) clears all
// properties, so every sprite starts with size 0, which draws nothing; the reset values
// are this design's choice.
module sprite_props
  import gh_pkg::*;
#(
  parameter int unsigned NUM_SPRITES = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sprite_cmd_t  cmd,
  output sprite_prop_t props [NUM_SPRITES]
);

  localparam int unsigned IW = (NUM_SPRITES > 1) ? $clog2(NUM_SPRITES) : 1;

  logic [IW-1:0] idx;
  assign idx = cmd.sprite_index[IW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SPRITES; i++) props[i] <= '0;
    end else if (32'(cmd.sprite_index) < NUM_SPRITES) begin
      if (cmd.valid_sprite) begin
        props[idx].x <= cmd.sprite_x;
        props[idx].y <= cmd.sprite_y;
      end
      if (cmd.set_sprite_size) begin
        props[idx].w <= cmd.sprite_x[7:0];
        props[idx].h <= cmd.sprite_y[7:0];
      end
      if (cmd.set_sprite_offset) begin
        props[idx].offset <= cmd.sprite_address;
      end
    end
  end

endmodule
