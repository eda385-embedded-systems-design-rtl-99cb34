// tb_fb_bandwidth: the largest framebuffer the console uses, 420 x 480 bytes, streamed
// through the VGA controller at default sizes for one whole frame, with the DMA model
// limited to the external RAM's rate: a 70 ns, 16-bit read cycle gives one 32-bit word
// every 140 ns, i.e. every 7 clocks at 50 MHz. One line of the region needs 105 words
// while the line lasts 1600 clocks (room for 228 words), so the 2048-word FIFO must never
// run dry during the frame. Every pixel is compared with the image formula (no sprites are
// set), and fb_underflow must stay low until the frame's region is done.
module tb_fb_bandwidth;
  import gh_pkg::*;
  localparam int NS = 6;
  localparam int XS = 150, XE = 570, YS = 30, YE = 510;

  logic clk = 0, rst_n = 0;
  logic fifo_wr = 0;
  logic [31:0] fifo_wdata = '0;
  logic fifo_full;
  logic [11:0] fifo_count;
  fb_limits_t limits;
  sprite_cmd_t sprite_cmd;
  rgb332_t vga_rgb;
  logic vga_hsync, vga_vsync, frame_start, fb_underflow;
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [7:0] fbpix(input int r, input int c);
    return 8'(r * 3 + c * 5 + (c >> 4));
  endfunction

  function automatic logic [7:0] smem(input int a);
    return (a % 7 == 3) ? 8'h00 : 8'((a * 11) % 251 + 1);
  endfunction

  int sx[NS] = '{200, 230, 100, 600, 300, 400};
  int sy[NS] = '{ 30,  50,  20, 300, 100, 235};
  int sw[NS] = '{  0,   0,   0,   0,   0,   0};
  int sh[NS] = '{ 40,  40,  10,  16,  30,  30};
  int so[NS] = '{  0, 2600, 5000, 8100, 100, 7000};

  int n_sprite = 0, n_transp = 0, n_overlap = 0, n_fb = 0, n_full = 0, n_under = 0;

  function automatic logic [7:0] model(input int px, input int py);
    int ncov = 0;
    logic [7:0] p, s;
    bit sp = 0;
    p = 0;
    for (int i = NS - 1; i >= 0; i--)
      if (px >= sx[i] && px < sx[i] + sw[i] && py >= sy[i] && py < sy[i] + sh[i]) begin
        ncov++;
        if (ncov == 1) begin
          s = smem(((so[i] + sw[i] * (py - sy[i]) + (px - sx[i])) % 65536) % 8192);
          if (s != 0) begin sp = 1; p = s; end
        end
      end
    if (ncov > 1) n_overlap++;
    if (ncov > 0 && !sp) n_transp++;
    if (sp) n_sprite++;
    else if (px >= XS && px < XE && py >= YS && py < YE) begin
      p = fbpix(py - YS, px - XS);
      n_fb++;
    end
    return p;
  endfunction

  // DMA model
  int words_sent = 0, dma_gap = 0;
  always @(negedge clk) begin
    dma_gap <= (dma_gap == 6) ? 0 : dma_gap + 1;
    if (rst_n && dma_gap == 0 && words_sent < (XE - XS) / 4 * (YE - YS) && !fifo_full) begin
      int r, c;
      r = words_sent / ((XE - XS) / 4);
      c = (words_sent % ((XE - XS) / 4)) * 4;
      fifo_wr    <= 1;
      fifo_wdata <= {fbpix(r, c), fbpix(r, c + 1), fbpix(r, c + 2), fbpix(r, c + 3)};
      words_sent <= words_sent + 1;
    end else fifo_wr <= 0;
    if (fifo_full) n_full++;
  end

  // sprite programming after reset
  initial begin
    sprite_cmd = '0;
    wait (rst_n);
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      sprite_cmd = '0;
      sprite_cmd.fill_sprite_mem = 1;
      sprite_cmd.sprite_address  = 16'(a);
      sprite_cmd.sprite_x        = 11'(smem(a));
      @(negedge clk);
    end
    for (int i = 0; i < NS; i++) begin
      sprite_cmd = '0; sprite_cmd.sprite_index = 8'(i);
      sprite_cmd.valid_sprite = 1; sprite_cmd.sprite_x = 11'(sx[i]); sprite_cmd.sprite_y = 11'(sy[i]);
      @(negedge clk);
      sprite_cmd.valid_sprite = 0;
      sprite_cmd.set_sprite_size = 1; sprite_cmd.sprite_x = 11'(sw[i]); sprite_cmd.sprite_y = 11'(sh[i]);
      @(negedge clk);
      sprite_cmd.set_sprite_size = 0;
      sprite_cmd.set_sprite_offset = 1; sprite_cmd.sprite_address = 16'(so[i]);
      @(negedge clk);
    end
    sprite_cmd = '0;
  end

  initial begin
    int h, v, frames, last_fs;
    limits = '{x_start: 11'(XS), x_end: 11'(XE), y_start: 11'(YS), y_end: 11'(YE)};
    h = 0; v = 0; frames = 0; last_fs = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1600 * 521; n++) begin
      int ph, pv;
      bit ins;
      logic [7:0] e;
      if (frame_start) begin
        if (last_fs >= 0) check(n - last_fs == 1600 * 521, "frame period");
        last_fs = n; frames++;
      end
      ph = h; pv = v;
      h++;
      if (h == 1600) begin h = 0; v = (v == 520) ? 0 : v + 1; end
      @(negedge clk);
      if (fb_underflow) n_under++;
      // outputs now show position (ph, pv)
      ins = (ph >= 190) && (pv >= 1);
      check(vga_hsync == (ph >= 190) && vga_vsync == (pv >= 1), "sync");
      if (n < 1600 * 521) begin
        e = ins ? model(ph / 2, pv) : 8'h00;
        check(vga_rgb == rgb332_t'(e), $sformatf("pixel (%0d,%0d) got %h exp %h", ph / 2, pv, vga_rgb, e));
      end
    end
    $display("sprite=%0d transparent=%0d overlap=%0d fb=%0d full=%0d underflow=%0d",
             n_sprite, n_transp, n_overlap, n_fb, n_full, n_under);
    check(n_sprite == 0, "no sprite pixels");
    check(n_fb == (XE - XS) * (YE - YS) * 2, "every region pixel shown (two clocks each)");
    check(n_under == 0, "no FIFO underflow at the RAM's rate");
    check(words_sent == (XE - XS) / 4 * (YE - YS), "whole region streamed");
    check(frames == 1, "one frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
