// sprite_mem: sprite pixel-data memory ("pixel data" block RAM of the VGA controller).
//
// DEPTH bytes of 8-bit RGB 3:3:2 pixels, 0 meaning transparent. The processor fills it
// with the fill_sprite_mem strobe: the byte sprite_x[7:0] is written at sprite_address.
// The sprite pipeline reads it through a synchronous port: rd_data is the byte at rd_addr
// one clock after rd_addr is presented, as a block RAM does. Addresses wrap modulo DEPTH.
// The original console specifies "8Kb" of sprite memory; it is read here as 8 KiB of bytes (8192 entries), the
// reading that matches its 16-bit addresses and its byte-wide pixels. The memory has no
// reset; its contents are undefined until written.
module sprite_mem
  import gh_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic        clk,
  input  sprite_cmd_t cmd,
  input  logic [15:0] rd_addr,
  output logic [7:0]  rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cmd.fill_sprite_mem) mem[cmd.sprite_address[AW-1:0]] <= cmd.sprite_x[7:0];
    rd_data <= mem[rd_addr[AW-1:0]];
  end

endmodule
