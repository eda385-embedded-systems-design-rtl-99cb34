// tb_sprite_mem: fills the 8 KiB sprite memory through fill_sprite_mem with a pattern
// (byte = (a*7 + a/256) mod 256), rewrites random bytes with random reads in between, and
// checks every read one clock after its address, including addresses above 8191 that
// wrap onto the 8 KiB.
module tb_sprite_mem;
  import gh_pkg::*;
  localparam int D = 8192;
  logic clk = 0;
  sprite_cmd_t cmd;
  logic [15:0] rd_addr;
  logic [7:0]  rd_data;
  logic [7:0]  model [D];
  int checks = 0, failures = 0;

  sprite_mem #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    cmd = '0; rd_addr = '0;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      cmd.fill_sprite_mem = 1;
      cmd.sprite_address  = 16'(a);
      cmd.sprite_x        = 11'((a * 7 + a / 256) % 256);
      model[a]            = 8'((a * 7 + a / 256) % 256);
      @(negedge clk);
    end
    cmd = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] ra;
      ra = 16'($urandom);
      rd_addr = ra;
      if ($urandom_range(0, 3) == 0) begin
        cmd.fill_sprite_mem = 1;
        cmd.sprite_address  = 16'($urandom);
        cmd.sprite_x        = 11'($urandom);
      end else cmd.fill_sprite_mem = 0;
      @(posedge clk);
      #1;
      begin
        logic [7:0] e;
        e = model[ra % D];
        if (cmd.fill_sprite_mem) model[cmd.sprite_address % D] = cmd.sprite_x[7:0];
        @(negedge clk);
        check(rd_data == e, $sformatf("read %h", ra));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
