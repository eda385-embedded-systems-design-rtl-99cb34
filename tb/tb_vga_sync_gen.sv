// tb_vga_sync_gen: checks the VGA signal generator at its default 640x480@60Hz timing.
// A reference pair of counters in the testbench (1600 clocks per line, 521 lines per
// frame) is compared with hcnt/vcnt every clock for two frames, together with the sync
// levels (hsync low for hcnt < 190, vsync low for vcnt < 1), the lookahead position
// (4 clocks ahead, in pixels) and the frame period of 833,600 clocks (59.98 Hz at 50 MHz).
module tb_vga_sync_gen;
  import gh_pkg::*;

  logic clk = 0, rst_n = 0;
  coord_t hcnt, vcnt, la_x, la_y;
  logic hsync, vsync, frame_start, la_sub;
  int checks = 0, failures = 0;

  vga_sync_gen dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  int h, v, hl, vl, hs_low, vs_low_lines, last_frame, nframes;
  initial begin
    h = 0; v = 0; hs_low = 0; vs_low_lines = 0; last_frame = -1; nframes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2 * 1600 * 521 + 10; n++) begin
      check(hcnt == coord_t'(h) && vcnt == coord_t'(v), "counters");
      check(hsync == (h >= 190), "hsync");
      check(vsync == (v >= 1), "vsync");
      hl = h + 4; vl = v;
      if (hl >= 1600) begin hl -= 1600; vl = (v == 520) ? 0 : v + 1; end
      check(la_x == coord_t'(hl / 2) && la_y == coord_t'(vl) && la_sub == hl[0], "lookahead");
      if (frame_start) begin
        if (last_frame >= 0) check(n - last_frame == 833600, "frame period");
        last_frame = n;
        nframes++;
      end
      if (v == 3 && !hsync) hs_low++;
      if (h == 800 && !vsync) vs_low_lines++;
      // advance reference
      h++;
      if (h == 1600) begin h = 0; v = (v == 520) ? 0 : v + 1; end
      @(negedge clk);
    end
    check(hs_low == 2 * 190, "hsync pulse width 190 clocks");
    check(vs_low_lines == 2, "vsync pulse one line per frame");
    check(nframes == 3, "frame_start count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
