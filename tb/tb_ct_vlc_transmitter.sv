// tb_ct_vlc_transmitter: encodes random 128-bit messages with both RLL
// variants and compares the codewords with a reference (frozen insertion
// from the reference construction, generator-matrix polar encoding,
// Manchester 1->10 / 0->01 and an independently typed 4B6B table whose
// words must all have weight 3). Checks done comes 3 clocks after start.
module tb_ct_vlc_transmitter;
  import tb_ref_pkg::*;
  import vlc_pkg::*;
  localparam int N = 256, K = 128;
  logic clk = 0, rst_n = 0, start = 0, busy_m, done_m, busy_b, done_b;
  logic [127:0] msg;
  logic [511:0] cw_m;
  logic [383:0] cw_b;
  int checks = 0, failures = 0;
  localparam bit [5:0] T4B6B [16] = '{6'o16, 6'o15, 6'o23, 6'o26, 6'o25, 6'o43, 6'o46, 6'o45,
                                      6'o31, 6'o32, 6'o34, 6'o61, 6'o62, 6'o51, 6'o52, 6'o54};

  ct_vlc_transmitter #(.RLL(RLL_MANCHESTER)) dut_m (.clk, .rst_n, .start, .msg, .busy(busy_m), .done(done_m), .cw(cw_m));
  ct_vlc_transmitter #(.RLL(RLL_4B6B))       dut_b (.clk, .rst_n, .start, .msg, .busy(busy_b), .done(done_b), .cw(cw_b));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fz [], u [], x [];
    foreach (T4B6B[i]) begin
      checks++; if ($countones(T4B6B[i]) != 3) begin failures++; $display("table weight"); end
    end
    frozen_set(N, K, fz);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int idx, d;
      msg = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) msg = '0;
      u = new[N]; idx = 0;
      for (int i = 0; i < N; i++) begin
        u[i] = fz[i] ? 1'b0 : msg[idx];
        if (!fz[i]) idx++;
      end
      polar_encode(N, u, x);
      start = 1;
      @(negedge clk) start = 0;
      d = 1;
      while (!done_m) begin @(negedge clk); d++; if (d > 20) break; end
      checks++; if (d != 3 || !done_b) begin failures++; $display("done after %0d clocks", d); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (cw_m[2*i] !== x[i] || cw_m[2*i+1] !== !x[i]) begin
          failures++; if (failures < 6) $display("manchester bit %0d", i);
        end
      end
      for (int j = 0; j < N/4; j++) begin
        checks++;
        if (cw_b[6*j +: 6] !== T4B6B[{x[4*j+3], x[4*j+2], x[4*j+1], x[4*j]}]) begin
          failures++; if (failures < 6) $display("4b6b nibble %0d", j);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
