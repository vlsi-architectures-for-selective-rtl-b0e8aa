// tb_tx_p2s_ook: loads random 256-bit codewords and checks the serial order
// (index 0 first), tx_valid for exactly 256 cycles, 'last' on the final bit,
// LED = bit during a frame and the idle level (1) outside, and that a load
// during a frame is ignored.
module tb_tx_p2s_ook;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, load = 0, busy, last, tx_valid, tx_bit, led;
  logic [N-1:0] cw, ref_cw;
  int checks = 0, failures = 0;

  tx_p2s_ook #(.N(N)) dut (.clk, .rst_n, .load, .cw, .busy, .last, .tx_valid, .tx_bit, .led);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk);
      checks++; if (led !== 1'b1 || tx_valid !== 1'b0) begin failures++; $display("idle state wrong"); end
      for (int w = 0; w < N/32; w++) cw[w*32 +: 32] = $urandom;
      ref_cw = cw; load = 1;
      @(negedge clk) load = 0;
      for (int i = 0; i < N; i++) begin
        if (i == 10) begin load = 1; cw = ~cw; end
        if (i == 11) load = 0;
        checks++;
        if (tx_valid !== 1'b1 || tx_bit !== ref_cw[i] || led !== ref_cw[i] || last !== (i == N-1)) begin
          failures++;
          if (failures < 5) $display("frame %0d bit %0d: v=%b b=%b led=%b exp %b", f, i, tx_valid, tx_bit, led, ref_cw[i]);
        end
        @(negedge clk);
      end
      checks++; if (tx_valid !== 1'b0) begin failures++; $display("frame longer than N"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
