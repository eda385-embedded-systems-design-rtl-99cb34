// tb_gh_top: end-to-end test of the console logic with every parameter at its default
// (40 sprites, 8 KiB sprite memory, 2048-word framebuffer FIFO, 1024-sample audio FIFO,
// prescaler 9). It runs three frames, 2.5 million clocks.
//
// Video, checked over the whole first frame:
// A DMA model writes a 320 x 200 framebuffer region (x 160..479, y 40..239, 16,000 words,
// pixel value given by a formula) into the FIFO whenever it is not full. Six sprites,
// overlapping each other and the region, are programmed after reset, with a pixel memory
// in which every seventh byte is transparent. Every clock the registered RGB and sync
// outputs are compared with a model of what position (hcnt, vcnt) of the previous clock
// must show: 0 during sync pulses, else the highest-index opaque sprite, else the
// framebuffer pixel inside the region, else 0. The second frame starts with the FIFO
// empty, which must raise fb_underflow. Counted mechanisms: sprite pixels, transparent
// sprite pixels, overlapping sprites, framebuffer pixels, FIFO full, underflow.
//
// Audio: 1100 random stereo samples are written back to back at reset; the last 76 find
// the 1024-entry FIFO full. Every PWM period (2304 clocks) the high time of both pins is
// compared with 9 * sample in write order; after 1024 periods the FIFO runs dry and
// aud_underflow must pulse while the last sample repeats.
module tb_gh_top;
  import gh_pkg::*;
  localparam int NS = 6;
  localparam int NCLK = 3 * 1600 * 521;
  localparam int XS = 160, XE = 480, YS = 40, YE = 240;

  logic clk = 0, rst_n = 0;
  logic fifo_wr = 0;
  logic [31:0] fifo_wdata = '0;
  logic fifo_full;
  logic [11:0] fifo_count;
  fb_limits_t limits;
  sprite_cmd_t sprite_cmd;
  rgb332_t vga_rgb;
  logic vga_hsync, vga_vsync, frame_start, fb_underflow;
  logic aud_wr = 0;
  logic [15:0] aud_wdata = '0;
  logic aud_full;
  logic [10:0] aud_count;
  logic audio_left, audio_right, aud_tick, aud_underflow;
  int checks = 0, failures = 0;

  gh_top dut (
    .clk, .rst_n,
    .fb_wr(fifo_wr), .fb_wdata(fifo_wdata), .fb_full(fifo_full), .fb_count(fifo_count),
    .fb_limits(limits), .sprite_cmd,
    .vga_rgb, .vga_hsync, .vga_vsync, .frame_start, .fb_underflow,
    .aud_wr, .aud_wdata, .aud_full, .aud_count,
    .audio_left, .audio_right, .aud_tick, .aud_underflow
  );

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
  int sw[NS] = '{ 64,  40, 255,  16,   0,  50};
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
  int words_sent = 0;
  always @(negedge clk) begin
    if (rst_n && words_sent < (XE - XS) / 4 * (YE - YS) && !fifo_full) begin
      int r, c;
      r = words_sent / ((XE - XS) / 4);
      c = (words_sent % ((XE - XS) / 4)) * 4;
      fifo_wr    <= 1;
      fifo_wdata <= {fbpix(r, c), fbpix(r, c + 1), fbpix(r, c + 2), fbpix(r, c + 3)};
      words_sent <= words_sent + 1;
    end else fifo_wr <= 0;
    if (fifo_full) n_full++;
  end

  // audio: writer and checker
  logic [15:0] aq[$];
  int n_aud_full = 0, n_aud_under = 0, n_periods = 0, n_played = 0;
  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < 1100; i++) begin
      aud_wr = 1;
      aud_wdata = 16'($urandom);
      if (aud_full) n_aud_full++;
      else aq.push_back(aud_wdata);
      @(negedge clk);
    end
    aud_wr = 0;
  end

  initial begin
    int acc_l, acc_r, windows, last_tick, k;
    logic [15:0] cur, nxt;
    bit pe_prev;
    acc_l = 0; acc_r = 0; windows = 0; pe_prev = 0; cur = '0; nxt = '0; last_tick = -1; k = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      k++;
      acc_l += int'(audio_left); acc_r += int'(audio_right);
      if (aud_underflow) n_aud_under++;
      if (pe_prev) begin
        if (windows > 0) begin
          check(acc_l == 9 * int'(cur[15:8]) && acc_r == 9 * int'(cur[7:0]), "audio duty");
          n_periods++;
        end
        windows++;
        acc_l = 0; acc_r = 0;
      end
      pe_prev = aud_tick;
      if (aud_tick) begin
        if (last_tick >= 0) check(k - last_tick == 2304, "audio sample period");
        last_tick = k;
        cur = nxt;
        if (aq.size() > 0) begin nxt = aq.pop_front(); n_played++; end
      end
    end
  end

  // sprite programming after reset
  initial begin
    sprite_cmd = '0;
    wait (rst_n);
    @(negedge clk);
    for (int a = 0; a < 8192; a++) begin
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
    for (int n = 0; n < NCLK; n++) begin
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
    check(n_sprite > 0, "sprite pixels drawn");
    check(n_transp > 0, "transparent sprite pixels");
    check(n_overlap > 0, "overlapping sprites");
    check(n_fb > 0, "framebuffer pixels");
    check(n_full > 0, "FIFO full");
    check(n_under > 0, "FIFO underflow in the second frame");
    check(frames == 3, "frame_start at each frame start");
    $display("audio: periods=%0d played=%0d full=%0d underflow=%0d",
             n_periods, n_played, n_aud_full, n_aud_under);
    check(n_aud_full == 76, "audio FIFO full");
    check(n_played == 1024, "all accepted audio samples played");
    check(n_aud_under > 0, "audio FIFO underflow");
    check(n_periods > 1024, "audio periods checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCLK + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
