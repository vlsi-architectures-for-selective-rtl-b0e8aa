// tb_llr_transformer: streams frames of random 9-bit LLRs (and LLRs outside
// a frame, which must be ignored) and checks the buffered, quantized vector
// (floor(llr/8) clamped to +-15) and that frame_valid pulses exactly one
// clock after the 256th LLR of a frame.
module tb_llr_transformer;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, frame_valid;
  logic signed [8:0] llr9 = 0;
  logic [N-1:0][4:0] llr;
  int exp_q [N];
  int checks = 0, failures = 0, nfv = 0;

  llr_transformer #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_sof, .llr9, .frame_valid, .llr);
  always #5 clk = ~clk;
  always @(posedge clk) if (frame_valid) nfv++;

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
    for (int f = 0; f < 3; f++) begin
      // stray LLRs before the frame
      repeat (5) begin @(negedge clk); in_valid = 1; llr9 = 9'sd100; end
      for (int i = 0; i < N; i++) begin
        int v, q;
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0);
        v = (i % 37 == 0) ? (i % 2 ? 255 : -256) : $urandom_range(0, 511) - 256;
        llr9 = 9'(v);
        q = (v >= 0) ? v / 8 : -((-v + 7) / 8);
        if (q > 15) q = 15;
        if (q < -15) q = -15;
        exp_q[i] = q;
        checks++; if (frame_valid) begin failures++; $display("early frame_valid"); end
      end
      @(negedge clk); in_valid = 0; in_sof = 0;
      checks++; if (!frame_valid) begin failures++; $display("frame_valid missing"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(signed'(llr[i])) != exp_q[i]) begin
          failures++;
          if (failures < 6) $display("entry %0d: %0d exp %0d", i, signed'(llr[i]), exp_q[i]);
        end
      end
    end
    @(negedge clk);
    checks++; if (nfv != 3) begin failures++; $display("frame_valid count %0d", nfv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
