// tb_descrambler: scrambles random frames with the reference cipher, feeds
// them (with gaps) to the descrambler and checks that the original bits come
// back one clock later, frame after frame.
module tb_descrambler;
  import tb_ref_pkg::*;
  localparam int FB = 158;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, out_valid, out_bit;
  int checks = 0, failures = 0;

  descrambler dut (.clk, .rst_n, .in_valid, .in_bit, .out_valid, .out_bit);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c [];
    bit d;
    cipher(FB, c);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < FB; n++) begin
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 0; @(negedge clk);
          checks++; if (out_valid) begin failures++; $display("out_valid without input"); end
        end
        d = 1'($urandom);
        in_valid = 1; in_bit = d ^ c[n];
        @(negedge clk);
        checks++;
        if (!out_valid || out_bit !== d) begin
          failures++;
          if (failures < 6) $display("frame %0d bit %0d: got %b exp %b", f, n, out_bit, d);
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
