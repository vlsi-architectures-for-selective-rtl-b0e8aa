// tb_prescrambler: drives frames of random bits (with idle gaps) through
// the prescrambler and compares every output bit with the input XOR the
// cipher recurrence c[n] = c[n-3] ^ c[n-4] from seed 0001, restarted each
// frame. Also checks that one 15-bit period of the cipher has 8 ones.
module tb_prescrambler;
  import tb_ref_pkg::*;
  localparam int FB = 158;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, out_bit;
  int checks = 0, failures = 0;
  bit c [];

  prescrambler dut (.clk, .rst_n, .in_valid, .in_bit, .out_bit);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    cipher(FB, c);
    for (int i = 0; i < 15; i++) ones += c[i];
    checks++; if (ones != 8) begin failures++; $display("cipher period weight %0d", ones); end
    checks++; if (c[15] != c[0] || c[16] != c[1]) begin failures++; $display("period not 15"); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < FB; n++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        while (!in_valid) begin
          @(negedge clk);
          in_valid = 1;
        end
        in_bit = (f == 2) ? 1'b1 : 1'($urandom);
        #1;
        checks++;
        if (out_bit !== (in_bit ^ c[n])) begin
          failures++;
          if (failures < 5) $display("frame %0d bit %0d: got %b exp %b", f, n, out_bit, in_bit ^ c[n]);
        end
      end
      @(negedge clk); in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
