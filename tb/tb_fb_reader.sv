// tb_fb_reader: scans a small frame (24 x 8 pixels, two clocks per pixel) through the
// framebuffer reader with a region of x in [4,16), y in [2,6): 3 words per line, 12 in
// all. The FIFO model holds only 10 words, so the last two word reads find it empty.
// Every pixel is compared, 4 clocks after its position was presented, with a model that
// pops one word at the start of every 4-pixel group and shows its bytes most significant
// first; outside the region the pixel must be 0. Underflow pulses are counted (2 expected).
module tb_fb_reader;
  import gh_pkg::*;

  logic clk = 0, rst_n = 0;
  fb_limits_t limits;
  coord_t x = '0, y = '0;
  logic sub = 0;
  logic fifo_rd, fifo_empty;
  logic [31:0] fifo_data;
  rgb332_t pix;
  logic pix_in, fb_underflow;
  int checks = 0, failures = 0;

  fb_reader dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // FIFO model with registered read data
  logic [31:0] q[$];
  always @(posedge clk) if (fifo_rd && q.size() > 0) fifo_data <= q.pop_front();

  // independent expected-pixel model
  logic [31:0] mq[$];
  logic [31:0] cur;
  logic [7:0]  expq[$];
  bit          expin[$];
  int nunder = 0, nrd = 0;

  initial begin
    limits = '{x_start: 11'd4, x_end: 11'd16, y_start: 11'd2, y_end: 11'd6};
    fifo_data = '0; cur = '0;
    for (int i = 0; i < 10; i++) begin
      q.push_back(32'h1000_0000 * (i + 1) + 32'h0001_0203 * (i + 3));
      mq.push_back(q[i]);
    end
    fifo_empty = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int yy = 0; yy < 8; yy++)
      for (int xx = 0; xx < 24; xx++)
        for (int s = 0; s < 2; s++) begin
          bit in;
          x = coord_t'(xx); y = coord_t'(yy); sub = s[0];
          fifo_empty = (q.size() == 0);
          in = (xx >= 4 && xx < 16 && yy >= 2 && yy < 6);
          if (in && ((xx - 4) % 4 == 0) && s == 0) begin
            if (mq.size() > 0) cur = mq.pop_front();
            else nunder++;
          end
          expq.push_back(in ? cur[8*(3-((xx-4)%4)) +: 8] : 8'h00);
          expin.push_back(in);
          @(posedge clk);
          if (fifo_rd) nrd++;
          @(negedge clk);
          if (fb_underflow) nunder--;
          if (expq.size() > 3) begin
            logic [7:0] e; bit ei;
            e = expq.pop_front(); ei = expin.pop_front();
            check(pix == rgb332_t'(e), "pixel");
            check(pix_in == ei, "pix_in");
          end
        end
    x = '0; y = '0; sub = 0;
    repeat (4) begin
      @(negedge clk);
      if (expq.size() > 3) begin
        void'(expq.pop_front()); void'(expin.pop_front());
      end
    end
    check(nrd == 10, "10 words read");
    check(nunder == 0, "2 underflows signalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
