// tb_message_memory: writes all 100 entries through port A with random
// messages, reads them back on both ports (one-clock read latency) against
// a shadow copy, including a port A write and port B read of the same
// entry in one cycle (port B returns the old value), and out-of-range
// addresses (ignored).
module tb_message_memory;
  logic clk = 0, a_we = 0, b_re = 0;
  logic [6:0] a_addr = 0, b_addr = 0;
  logic [127:0] a_wdata = 0, a_rdata, b_rdata, shadow [100];
  int checks = 0, failures = 0;

  message_memory dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_re, .b_addr, .b_rdata);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); a_we = 1; a_addr = 7'(i); a_wdata = rnd(); shadow[i] = a_wdata;
    end
    @(negedge clk); a_we = 1; a_addr = 7'd120; a_wdata = rnd();   // out of range
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 100; i++) begin
      int j = (i * 37) % 100;
      @(negedge clk); b_re = 1; b_addr = 7'(j); a_addr = 7'(i);
      @(negedge clk); b_re = 0;
      checks += 2;
      if (b_rdata !== shadow[j]) begin failures++; $display("port B entry %0d wrong", j); end
      if (a_rdata !== shadow[i]) begin failures++; $display("port A entry %0d wrong", i); end
    end
    // simultaneous write A / read B of entry 5
    @(negedge clk); a_we = 1; a_addr = 7'd5; a_wdata = rnd(); b_re = 1; b_addr = 7'd5;
    @(negedge clk); a_we = 0; b_re = 0;
    checks++; if (b_rdata !== shadow[5]) begin failures++; $display("read-during-write not old data"); end
    shadow[5] = a_wdata;
    @(negedge clk); b_re = 1;
    @(negedge clk); b_re = 0;
    checks++; if (b_rdata !== shadow[5]) begin failures++; $display("new data not stored"); end
    // b_re low holds the output
    b_addr = 7'd6;
    @(negedge clk);
    checks++; if (b_rdata !== shadow[5]) begin failures++; $display("port B changed without read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
