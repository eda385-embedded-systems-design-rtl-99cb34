// vga_sync_gen: VGA signal generator for 640x480 at 60 Hz from a 50 MHz clock.
//
// Two counters make the timing. hcnt advances every clock and wraps after H_MAX (1599),
// so a line lasts 1600 clocks (32 us); vcnt advances when hcnt wraps and wraps after
// V_MAX (520), giving 521 lines per frame (59.98 Hz). hsync is low while hcnt < HSYNC_END
// (190) and vsync is low while vcnt < VSYNC_END (1). These numbers follow the original console.
//
// A second, lookahead position runs LOOKAHEAD clocks ahead of (hcnt, vcnt), wrapping into
// the next line and frame, so that a pipeline of LOOKAHEAD stages fed with it delivers the
// pixel of the current position. It is given in pixels: la_x = (hcnt + LOOKAHEAD) / 2 and
// la_sub is the low bit (0 on the first of the two clocks of a pixel).
//
// Interface: hcnt, vcnt, hsync, vsync and the lookahead outputs all come from registers
// (the counters) through a little logic; frame_start is high for the one clock where
// hcnt = vcnt = 0. Reset (active low, synchronous) clears both counters.
module vga_sync_gen
  import gh_pkg::*;
#(
  parameter int unsigned HMAX      = H_MAX,
  parameter int unsigned VMAX      = V_MAX,
  parameter int unsigned HSYNC_LEN = HSYNC_END,
  parameter int unsigned VSYNC_LEN = VSYNC_END,
  parameter int unsigned LOOKAHEAD = SPRITE_PIPE
) (
  input  logic   clk,
  input  logic   rst_n,
  output coord_t hcnt,
  output coord_t vcnt,
  output logic   hsync,
  output logic   vsync,
  output logic   frame_start,
  output coord_t la_x,
  output coord_t la_y,
  output logic   la_sub
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (hcnt == coord_t'(HMAX)) begin
      hcnt <= '0;
      vcnt <= (vcnt == coord_t'(VMAX)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  assign hsync       = (hcnt >= coord_t'(HSYNC_LEN));
  assign vsync       = (vcnt >= coord_t'(VSYNC_LEN));
  assign frame_start = (hcnt == '0) && (vcnt == '0);

  // Lookahead position
  logic [CNT_W:0] hsum;
  coord_t         la_h;
  always_comb begin
    hsum = {1'b0, hcnt} + (CNT_W+1)'(LOOKAHEAD);
    if (hsum > (CNT_W+1)'(HMAX)) begin
      la_h = coord_t'(hsum - (CNT_W+1)'(HMAX + 1));
      la_y = (vcnt == coord_t'(VMAX)) ? '0 : vcnt + 1'b1;
    end else begin
      la_h = hsum[CNT_W-1:0];
      la_y = vcnt;
    end
    la_x   = {1'b0, la_h[CNT_W-1:1]};
    la_sub = la_h[0];
  end

endmodule
