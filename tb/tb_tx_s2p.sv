// tb_tx_s2p: shifts two frames of 158 random bits (with gaps) into the S2P
// register and checks the 'full' pulse (exactly one cycle, in the clock after
// the last bit) and that data[i] holds the i-th bit.
module tb_tx_s2p;
  localparam int K = 158;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, full;
  logic [K-1:0] data, ref_d;
  int checks = 0, failures = 0, nfull = 0;

  tx_s2p #(.K(K)) dut (.clk, .rst_n, .in_valid, .in_bit, .full, .data);
  always #5 clk = ~clk;
  always @(posedge clk) if (full) nfull++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_bit = 1'($urandom); ref_d[i] = in_bit;
        checks++; if (full !== 1'b0) begin failures++; $display("early full at bit %0d", i); end
      end
      @(negedge clk); in_valid = 0;
      checks++; if (full !== 1'b1) begin failures++; $display("no full pulse"); end
      checks++; if (data !== ref_d) begin failures++; $display("data mismatch frame %0d", f); end
      @(negedge clk);
      checks++; if (full !== 1'b0) begin failures++; $display("full longer than a cycle"); end
    end
    checks++; if (nfull != 2) begin failures++; $display("full count %0d", nfull); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
