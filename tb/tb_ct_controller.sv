// tb_ct_controller: offers messages to the controller with a model
// transmitter of random latency; checks tx_start in the msg_valid cycle,
// busy until done, the DE-MUX write with the kept address in the done cycle.
module tb_ct_controller;
  logic clk = 0, rst_n = 0, msg_valid = 0, tx_start, tx_done = 0, dm_we, busy;
  logic [6:0] msg_addr = 0, dm_addr;
  int checks = 0, failures = 0;

  ct_controller dut (.clk, .rst_n, .msg_valid, .msg_addr, .tx_start, .tx_done, .dm_we, .dm_addr, .busy);
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
    for (int t = 0; t < 30; t++) begin
      logic [6:0] a = 7'($urandom_range(0, 99));
      int lat = $urandom_range(1, 6);
      msg_valid = 1; msg_addr = a;
      #1;
      checks++; if (!tx_start || busy || dm_we) begin failures++; $display("start cycle wrong"); end
      @(negedge clk); msg_valid = 0; msg_addr = ~a;
      for (int c = 1; c < lat; c++) begin
        checks++; if (!busy || dm_we || tx_start) begin failures++; $display("encode cycle wrong"); end
        @(negedge clk);
      end
      tx_done = 1;
      #1;
      checks++; if (!dm_we || dm_addr !== a || !busy) begin failures++; $display("demux write wrong %0d/%0d", dm_addr, a); end
      @(negedge clk); tx_done = 0;
      checks++; if (busy || dm_we) begin failures++; $display("not idle after done"); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
