// tb_sprite_props: random location, size and offset writes to the 40 sprites (and to
// indices 40..255, which must be ignored), each compared with a model of all 40 property
// words; checks the cleared state after reset and that one strobe changes one field only.
module tb_sprite_props;
  import gh_pkg::*;
  localparam int N = 40;
  logic clk = 0, rst_n = 0;
  sprite_cmd_t cmd;
  sprite_prop_t props [N];
  sprite_prop_t model [N];
  int checks = 0, failures = 0;

  sprite_props #(.NUM_SPRITES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic compare_all();
    for (int i = 0; i < N; i++) check(props[i] == model[i], $sformatf("sprite %0d", i));
  endtask

  initial begin
    cmd = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_all();
    for (int n = 0; n < 600; n++) begin
      int k, idx;
      cmd = sprite_cmd_t'({$urandom, $urandom});
      k = $urandom_range(0, 2);
      cmd.valid_sprite      = (k == 0);
      cmd.set_sprite_size   = (k == 1);
      cmd.set_sprite_offset = (k == 2);
      cmd.fill_sprite_mem   = $urandom_range(0, 1);
      idx = (n % 8 == 7) ? $urandom_range(N, 255) : $urandom_range(0, N - 1);
      cmd.sprite_index = 8'(idx);
      if (idx < N) begin
        if (k == 0) begin model[idx].x = cmd.sprite_x; model[idx].y = cmd.sprite_y; end
        if (k == 1) begin model[idx].w = cmd.sprite_x[7:0]; model[idx].h = cmd.sprite_y[7:0]; end
        if (k == 2) model[idx].offset = cmd.sprite_address;
      end
      @(negedge clk);
      compare_all();
    end
    cmd = '0;
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
