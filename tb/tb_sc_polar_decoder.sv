// tb_sc_polar_decoder: decodes (256,158) frames and compares every decoded
// bit with an independent recursive integer min-sum SC decoder. Inputs are
// noiseless codewords (must return the information bits exactly), noisy
// codewords and purely random LLRs. Checks that decoding takes 128 clocks
// (done pulses 129 clocks after start) and that 'busy' covers them.
module tb_sc_polar_decoder;
  import tb_ref_pkg::*;
  localparam int N = 256, K = 158;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [N-1:0][4:0] llr;
  logic [N-1:0] u;
  int checks = 0, failures = 0;

  sc_polar_decoder #(.N(N), .K(K)) dut (.clk, .rst_n, .start, .llr, .busy, .done, .u);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fz [], ui [], x [], ur [];
    int l [];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    frozen_set(N, K, fz);
    for (int t = 0; t < 12; t++) begin
      int cyc;
      ui = new[N];
      for (int i = 0; i < N; i++) ui[i] = fz[i] ? 1'b0 : 1'($urandom);
      polar_encode(N, ui, x);
      l = new[N];
      for (int i = 0; i < N; i++) begin
        int amp = (t < 4) ? 15 : $urandom_range(0, 15);
        l[i] = x[i] ? -amp : amp;
        if (t >= 4 && $urandom_range(0, 9) == 0) l[i] = -l[i];      // channel errors
        if (t >= 9) l[i] = $urandom_range(0, 30) - 15;               // pure noise
        llr[i] = 5'(l[i]);
      end
      sc_decode(l, fz, ur);
      start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (!done) begin
        checks++; if (!busy) begin failures++; $display("busy low during decoding"); end
        @(negedge clk); cyc++;
        if (cyc > 400) break;
      end
      checks++; if (cyc != 128) begin failures++; $display("decode took %0d cycles", cyc); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (u[i] !== ur[i] || (t < 4 && u[i] !== ui[i])) begin
          failures++;
          if (failures < 6) $display("trial %0d bit %0d: got %b ref %b sent %b", t, i, u[i], ur[i], ui[i]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
