// tb_sync_fifo: random pushes and pops on a small FIFO (8 words of 12 bits) against a
// queue model: read data, full, empty, count and the overflow/underflow pulses.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty, overflow, underflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_rd = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  logic [W-1:0] q[$];
  logic [W-1:0] exp_data;
  bit exp_of, exp_uf;
  initial begin
    exp_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0 && rd_data == 0, "after reset");
    for (int n = 0; n < 4000; n++) begin
      // phase-dependent bias so the FIFO reaches both full and empty
      wr_en   = ($urandom_range(0, 99) < ((n / 200) % 2 ? 80 : 20));
      rd_en   = ($urandom_range(0, 99) < ((n / 200) % 2 ? 20 : 80));
      wr_data = W'($urandom);
      exp_of = wr_en && (q.size() == D);
      exp_uf = rd_en && (q.size() == 0);
      if (q.size() == D) n_full++;
      if (exp_uf) n_empty_rd++;
      @(posedge clk);
      #1;
      begin
        bit did_rd, did_wr;
        did_rd = rd_en && q.size() > 0;
        did_wr = wr_en && q.size() < D;
        if (did_rd) exp_data = q.pop_front();
        if (did_wr) q.push_back(wr_data);
      end
      @(negedge clk);
      check(rd_data == exp_data, "rd_data");
      check(count == q.size(), "count");
      check(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      check(overflow == exp_of && underflow == exp_uf, "overflow/underflow");
    end
    check(n_full > 0 && n_empty_rd > 0, "reached full and empty");
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
