// tb_vlc_tx: sends back-to-back 158-bit frames (random, all-ones and 90 %
// ones) into the VLC transmitter and checks each 256-bit coded output
// against an independent model: scramble with the cipher recurrence, insert
// frozen bits from the reference construction, encode with the generator
// matrix. Checks the latency (first coded bit 160 cycles after the first
// frame bit), the frame period (416 cycles) and the LED idle level; prints
// the share of ones in each codeword.
module tb_vlc_tx;
  import tb_ref_pkg::*;
  localparam int N = 256, K = 158;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, in_ready, tx_valid, tx_bit, led;
  int checks = 0, failures = 0;
  longint cyc = 0;

  vlc_tx dut (.clk, .rst_n, .in_valid, .in_bit, .in_ready, .tx_valid, .tx_bit, .led);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit frames [4][K];
  longint t_first_in [4];

  initial begin
    bit c [], fz [];
    cipher(K, c);
    frozen_set(N, K, fz);
    for (int f = 0; f < 4; f++)
      for (int i = 0; i < K; i++)
        frames[f][i] = (f == 1) ? 1'b1 : (f == 2) ? ($urandom_range(0, 9) != 0) : 1'($urandom);
    fork
      begin : driver
        repeat (2) @(posedge clk);
        @(negedge clk) rst_n = 1;
        for (int f = 0; f < 4; f++) begin
          for (int i = 0; i < K; i++) begin
            in_valid = 1; in_bit = frames[f][i];
            while (!in_ready) @(negedge clk);
            if (i == 0) t_first_in[f] = cyc;
            @(negedge clk);
          end
          in_valid = 0;
        end
      end
      begin : monitor
        for (int f = 0; f < 4; f++) begin
          bit u [], x [];
          int idx, ones;
          idx = 0; ones = 0;
          u = new[N];
          for (int i = 0; i < N; i++) begin
            u[i] = fz[i] ? 1'b0 : (frames[f][idx] ^ c[idx]);
            if (!fz[i]) idx++;
          end
          polar_encode(N, u, x);
          @(negedge clk);
          while (!tx_valid) begin
            checks++; if (led !== 1'b1) begin failures++; $display("idle LED not 1"); end
            @(negedge clk);
          end
          checks++;
          if (cyc - t_first_in[f] != 160) begin
            failures++; $display("frame %0d latency %0d, expected 160", f, cyc - t_first_in[f]);
          end
          if (f > 0) begin
            checks++;
            if (t_first_in[f] - t_first_in[f-1] != 416) begin
              failures++; $display("frame period %0d, expected 416", t_first_in[f] - t_first_in[f-1]);
            end
          end
          for (int j = 0; j < N; j++) begin
            checks++;
            if (!tx_valid || tx_bit !== x[j] || led !== x[j]) begin
              failures++;
              if (failures < 6) $display("frame %0d coded bit %0d: got %b exp %b", f, j, tx_bit, x[j]);
            end
            ones += x[j];
            if (j != N-1) @(negedge clk);
          end
          $display("frame %0d: %0d of 256 coded bits are one (%0d%%)", f, ones, ones*100/256);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
