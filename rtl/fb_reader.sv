// fb_reader: framebuffer path of the VGA controller ("read from FIFO if inside limits").
//
// Software sets a rectangular active region (limits: x_start <= x < x_end,
// y_start <= y < y_end, in pixels). While the pixel being drawn is inside it, the reader
// pops one 32-bit word, four 8-bit pixels, from the framebuffer FIFO at the first clock of
// every fourth pixel of the region, counted from x_start. As in the original console, the word from
// the FIFO passes through a register before the drawing logic, which then picks one byte
// per pixel. The leftmost pixel of a word is its most significant byte (bits 31:24), the
// order in which a big-endian processor lays bytes out in memory: this order is this
// design's choice. Outside the region the pixel is 0 (black), also this design's choice.
// Keeping the FIFO filled is software's job (through DMA); a read of an empty FIFO is
// skipped, the old word is shown again, and fb_underflow pulses.
//
// Timing: the inputs are the lookahead position (pixel x, y and the half-pixel bit sub)
// and the pixel comes out LATENCY = 4 clocks later, in step with the sprite pipeline:
//   stage 0  region test, FIFO read strobe
//   stage 1  FIFO read data valid
//   stage 2  FIFO output register (word_q)
//   stage 3  byte select
//   stage 4  output register
module fb_reader
  import gh_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fb_limits_t limits,
  input  coord_t     x,
  input  coord_t     y,
  input  logic       sub,
  // framebuffer FIFO read side
  output logic       fifo_rd,
  input  logic [31:0] fifo_data,
  input  logic       fifo_empty,
  // pixel out, 4 clocks after (x, y, sub)
  output rgb332_t    pix,
  output logic       pix_in,
  output logic       fb_underflow
);

  // stage 0
  logic   in0, first0;
  coord_t rel0;
  always_comb begin
    in0    = (x >= limits.x_start) && (x < limits.x_end) &&
             (y >= limits.y_start) && (y < limits.y_end);
    rel0   = x - limits.x_start;
    first0 = in0 && (rel0[1:0] == 2'd0) && !sub;
  end
  assign fifo_rd = first0 && !fifo_empty;

  logic       in1, in2, in3, in4;
  logic [1:0] idx1, idx2;
  logic       ld1;
  logic [31:0] word_q;
  rgb332_t    pix3, pix4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {in1, in2, in3, in4} <= '0;
      idx1 <= '0; idx2 <= '0; ld1 <= 1'b0;
      word_q <= '0;
      pix3 <= '0; pix4 <= '0;
      fb_underflow <= 1'b0;
    end else begin
      // stage 1
      in1  <= in0;
      idx1 <= rel0[1:0];
      ld1  <= fifo_rd;
      fb_underflow <= first0 && fifo_empty;
      // stage 2: register between FIFO output and drawing logic
      in2  <= in1;
      idx2 <= idx1;
      if (ld1) word_q <= fifo_data;
      // stage 3: byte select, leftmost pixel in bits 31:24
      in3  <= in2;
      pix3 <= in2 ? rgb332_t'(word_q[8*(3-int'(idx2)) +: 8]) : '0;
      // stage 4
      in4  <= in3;
      pix4 <= pix3;
    end
  end

  assign pix    = pix4;
  assign pix_in = in4;

endmodule
