// sync_fifo: single-clock first-in first-out buffer.
//
// Used twice in the console: as the framebuffer FIFO of the VGA controller (32-bit words,
// four pixels each, written by the DMA engine) and as the audio sample FIFO (one stereo
// sample per word, written by the processor). The storage is a plain array that maps to
// block RAM. Read data is registered: rd_data changes on the clock edge after rd_en is
// seen with the FIFO not empty, and holds its value until the next read, so the reader
// can use rd_data itself as its sample or word register.
//
// Interface: a write with the FIFO full and a read with it empty are ignored; they raise
// the one-clock pulses overflow and underflow. count is the number of words held.
// Reset (active low, synchronous) empties the FIFO and clears rd_data. The original console gives
// no depth for either FIFO; the defaults here are this design's choice. Two assertions
// state the pointer and fill-level rules.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  output logic                       underflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      rd_data   <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= wr_en && full;
      underflow <= rd_en && empty;
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) begin
        rptr    <= inc(rptr);
        rd_data <= mem[rptr];
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Bookkeeping rules: the fill level never exceeds the depth, and a read only
  // returns data when a word was held.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));
  a_pointer_gap: assert property (@(posedge clk) disable iff (!rst_n)
    (count == ($clog2(DEPTH+1))'(DEPTH) || count == '0) |-> (wptr == rptr));

endmodule
