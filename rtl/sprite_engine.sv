// sprite_engine: hardware sprites drawn on the fly over the framebuffer.
//
// Every clock all NUM_SPRITES sprites are compared at once with one pixel position (the
// lookahead position of the signal generator). A sprite covers pixel (x, y) when
// sx <= x < sx + width and sy <= y < sy + height. When several cover it, the sprite with
// the highest index is drawn. The byte of the sprite memory to show is
//   address = offset + width * (y - sy) + (x - sx)
// and a byte of 0 is transparent, so the framebuffer pixel shows through.
//
// The work is split over four pipeline stages, as in the original console:
//   1  inside any sprite?  hit, winning index, sprite-local x and y registered
//   2  calculate address   offset + width * local_y + local_x registered (one multiplier)
//   3  set BRAM address    address registered into the memory port
//   4  fetch from BRAM     memory read; opaque = hit and byte != 0
// so the result (spr_pix, spr_opaque) belongs to the position presented 4 clocks earlier.
// The signal generator compensates by feeding a position 4 clocks ahead.
//
// The sprite properties (sprite_props) and pixel data (sprite_mem) are written through
// the sprite command bundle at any time. Address arithmetic is 16 bits wide and wraps.
module sprite_engine
  import gh_pkg::*;
#(
  parameter int unsigned NUM_SPRITES = 40,
  parameter int unsigned MEM_DEPTH   = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sprite_cmd_t cmd,
  input  coord_t      x,
  input  coord_t      y,
  output rgb332_t     spr_pix,
  output logic        spr_opaque
);

  localparam int unsigned IW = (NUM_SPRITES > 1) ? $clog2(NUM_SPRITES) : 1;

  sprite_prop_t props [NUM_SPRITES];

  sprite_props #(.NUM_SPRITES(NUM_SPRITES)) u_props (
    .clk, .rst_n, .cmd, .props
  );

  // ---- stage 1: inside any sprite? ----
  logic          hit0;
  logic [IW-1:0] sel0;
  logic [7:0]    lx0, ly0;
  always_comb begin
    hit0 = 1'b0;
    sel0 = '0;
    lx0  = '0;
    ly0  = '0;
    for (int i = 0; i < NUM_SPRITES; i++) begin
      // later (higher) indices override earlier ones
      if (({1'b0, x} >= {1'b0, props[i].x}) &&
          ({1'b0, x} <  {1'b0, props[i].x} + 12'(props[i].w)) &&
          ({1'b0, y} >= {1'b0, props[i].y}) &&
          ({1'b0, y} <  {1'b0, props[i].y} + 12'(props[i].h))) begin
        hit0 = 1'b1;
        sel0 = IW'(i);
        lx0  = 8'(x - props[i].x);
        ly0  = 8'(y - props[i].y);
      end
    end
  end

  logic          hit1, hit2, hit3, hit4;
  logic [IW-1:0] sel1;
  logic [7:0]    lx1, ly1;
  logic [15:0]   addr2, addr3;
  logic [7:0]    mem_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {hit1, hit2, hit3, hit4} <= '0;
      sel1  <= '0;
      lx1   <= '0;
      ly1   <= '0;
      addr2 <= '0;
      addr3 <= '0;
    end else begin
      // stage 1
      hit1 <= hit0;
      sel1 <= sel0;
      lx1  <= lx0;
      ly1  <= ly0;
      // stage 2: calculate sprite address
      hit2  <= hit1;
      addr2 <= props[sel1].offset + 16'(props[sel1].w * ly1) + 16'(lx1);
      // stage 3: set address to BRAM
      hit3  <= hit2;
      addr3 <= addr2;
      // stage 4: read from BRAM (mem_data), transparency below
      hit4  <= hit3;
    end
  end

  sprite_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .cmd, .rd_addr(addr3), .rd_data(mem_data)
  );

  assign spr_pix    = rgb332_t'(mem_data);
  assign spr_opaque = hit4 && (mem_data != 8'd0);

endmodule
