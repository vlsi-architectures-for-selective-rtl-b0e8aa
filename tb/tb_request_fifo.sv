// tb_request_fifo: random pushes and pops against a queue model: order,
// show-ahead data, empty/full flags, simultaneous push/pop, and the sticky
// overflow flag when pushing into a full FIFO.
module tb_request_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty, overflow;
  logic [135:0] wr_data = 0, rd_data;
  logic [135:0] q [$];
  int checks = 0, failures = 0, nfull = 0;

  request_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .overflow);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit do_w, do_r;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 8) ||
          (q.size() > 0 && rd_data !== q[0]) || overflow !== 1'b0) begin
        failures++;
        if (failures < 6) $display("t=%0d size %0d empty %b full %b cnt %0d ovf %b", t, q.size(), empty, full, dut.cnt, overflow);
      end
      if (full) nfull++;
      do_w = (t < 1000) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 2) == 0);
      do_r = !empty && ((t < 1000) ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 2) != 0));
      if (do_w && full && !do_r) do_w = 0;   // overflow tested separately
      wr_en = do_w; rd_en = do_r;
      wr_data = {$urandom, $urandom, $urandom, $urandom, 8'($urandom)};
      @(negedge clk);
      if (do_r) void'(q.pop_front());
      if (do_w) q.push_back(wr_data);
      wr_en = 0; rd_en = 0;
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    while (!full) begin wr_en = 1; @(negedge clk); end
    wr_en = 1; @(negedge clk); wr_en = 0;
    checks++; if (!overflow) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
