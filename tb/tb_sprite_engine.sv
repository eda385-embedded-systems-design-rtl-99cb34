// tb_sprite_engine: 40 sprites with random locations, sizes (0..30 x 0..20, so some are
// empty) and 16-bit offsets over a 8 KiB pixel memory in which every fifth byte is 0
// (transparent). All positions of a 128 x 48 window, then random positions, are fed one
// per clock; 4 clocks later the output is compared with a model that searches the sprites
// from the highest index down and computes offset + width*y + x itself. The test counts
// how often a pixel was covered by more than one sprite (priority) and how often a
// covered pixel was transparent; both must happen.
module tb_sprite_engine;
  import gh_pkg::*;
  localparam int N = 40, D = 8192;
  logic clk = 0, rst_n = 0;
  sprite_cmd_t cmd;
  coord_t x, y;
  rgb332_t spr_pix;
  logic spr_opaque;
  int checks = 0, failures = 0;

  sprite_engine #(.NUM_SPRITES(N), .MEM_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int sx[N], sy[N], sw[N], sh[N], so[N];
  logic [7:0] mem[D];
  int n_overlap = 0, n_transp = 0, n_drawn = 0;

  function automatic void model(input int px, input int py, output bit opq, output logic [7:0] p);
    int ncov = 0;
    opq = 0; p = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (px >= sx[i] && px < sx[i] + sw[i] && py >= sy[i] && py < sy[i] + sh[i]) begin
        ncov++;
        if (ncov == 1) begin
          int a;
          a = ((so[i] + sw[i] * (py - sy[i]) + (px - sx[i])) % 65536) % D;
          p = mem[a];
          opq = (p != 0);
        end
      end
    end
    if (ncov > 1) n_overlap++;
    if (ncov > 0 && !opq) n_transp++;
    if (opq) n_drawn++;
  endfunction

  task automatic send(input sprite_cmd_t c);
    cmd = c;
    @(negedge clk);
    cmd = '0;
  endtask

  bit          eo[$];
  logic [7:0]  ep[$];

  task automatic present(input int px, input int py);
    bit o; logic [7:0] p;
    x = coord_t'(px); y = coord_t'(py);
    model(px, py, o, p);
    eo.push_back(o); ep.push_back(p);
    @(negedge clk);
    if (eo.size() > 3) begin
      bit e_o; logic [7:0] e_p;
      e_o = eo.pop_front(); e_p = ep.pop_front();
      check(spr_opaque == e_o, "opaque");
      if (e_o) check(spr_pix == rgb332_t'(e_p), "pixel");
    end
  endtask

  initial begin
    sprite_cmd_t c;
    cmd = '0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pixel memory
    for (int a = 0; a < D; a++) begin
      mem[a] = (a % 5 == 0) ? 8'h00 : 8'((a * 13 + a / 256) % 255 + 1);
      c = '0; c.fill_sprite_mem = 1; c.sprite_address = 16'(a); c.sprite_x = 11'(mem[a]);
      send(c);
    end
    // sprite properties
    for (int i = 0; i < N; i++) begin
      sx[i] = $urandom_range(0, 110); sy[i] = $urandom_range(0, 35);
      sw[i] = $urandom_range(0, 30);  sh[i] = $urandom_range(0, 20);
      so[i] = $urandom_range(0, 65535);
      c = '0; c.sprite_index = 8'(i);
      c.valid_sprite = 1; c.sprite_x = 11'(sx[i]); c.sprite_y = 11'(sy[i]); send(c);
      c.valid_sprite = 0;
      c.set_sprite_size = 1; c.sprite_x = 11'(sw[i]); c.sprite_y = 11'(sh[i]); send(c);
      c.set_sprite_size = 0;
      c.set_sprite_offset = 1; c.sprite_address = 16'(so[i]); send(c);
    end
    for (int py = 0; py < 48; py++)
      for (int px = 0; px < 128; px++) present(px, py);
    for (int n = 0; n < 2000; n++) present($urandom_range(0, 2047), $urandom_range(0, 2047) % 64);
    check(n_overlap > 0, "priority among overlapping sprites exercised");
    check(n_transp > 0, "transparent sprite pixels exercised");
    check(n_drawn > 0, "opaque sprite pixels exercised");
    $display("overlap=%0d transparent=%0d drawn=%0d", n_overlap, n_transp, n_drawn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
