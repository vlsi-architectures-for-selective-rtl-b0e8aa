// tb_rx_p2s: loads random decoded vectors and checks that exactly the 158
// non-frozen positions (independent construction) come out, lowest index
// first, one per clock, with 'last' on the final bit.
module tb_rx_p2s;
  import tb_ref_pkg::*;
  localparam int N = 256, K = 158;
  logic clk = 0, rst_n = 0, load = 0, out_valid, out_bit, last;
  logic [N-1:0] u;
  int checks = 0, failures = 0;

  rx_p2s #(.N(N), .K(K)) dut (.clk, .rst_n, .load, .u, .out_valid, .out_bit, .last);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fz [];
    int exp_b [$];
    frozen_set(N, K, fz);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int w = 0; w < N/32; w++) u[w*32 +: 32] = $urandom;
      exp_b = {};
      for (int i = 0; i < N; i++) if (!fz[i]) exp_b.push_back(u[i]);
      load = 1;
      @(negedge clk) load = 0; u = ~u;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (!out_valid || out_bit !== 1'(exp_b[i]) || last !== (i == K-1)) begin
          failures++;
          if (failures < 6) $display("frame %0d bit %0d: v=%b b=%b exp %0d", f, i, out_valid, out_bit, exp_b[i]);
        end
        @(negedge clk);
      end
      checks++; if (out_valid) begin failures++; $display("too many bits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
