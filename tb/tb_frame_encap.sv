// tb_frame_encap: sends beacon frames with random type/ID and checks the
// 158 serial bits against preamble, type, ID and a byte-wise CRC-16-CCITT
// reference (whose own correctness is checked on the standard "123456789"
// vector, 0x29B1). Also applies back-pressure (bit_ready low) and checks
// that 'ready' is low for the whole frame.
module tb_frame_encap;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, send = 0, ready, bit_valid, bit_out, bit_ready = 1;
  logic [7:0] ftype;
  logic [127:0] id;
  int checks = 0, failures = 0;

  frame_encap dut (.clk, .rst_n, .send, .ftype, .id, .ready, .bit_valid, .bit_out, .bit_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s [];
    logic [157:0] exp_f;
    s = new[9];
    foreach (s[i]) s[i] = 8'h31 + 8'(i);
    checks++; if (crc16_bytes(s, 9) !== 16'h29B1) begin failures++; $display("reference CRC wrong"); end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      ftype = 8'($urandom);
      for (int w = 0; w < 4; w++) id[w*32 +: 32] = $urandom;
      exp_f = {6'b101010, ftype, id, frame_crc(ftype, id)};
      checks++; if (!ready) begin failures++; $display("not ready"); end
      send = 1;
      @(negedge clk) send = 0;
      for (int i = 0; i < 158; i++) begin
        bit_ready = (f[0] && $urandom_range(0, 2) == 0) ? 1'b0 : 1'b1;
        checks++;
        if (bit_valid !== 1'b1 || ready !== 1'b0 || bit_out !== exp_f[157-i]) begin
          failures++;
          if (failures < 5) $display("frame %0d bit %0d: got %b exp %b", f, i, bit_out, exp_f[157-i]);
        end
        if (!bit_ready) i--;
        @(negedge clk);
      end
      bit_ready = 1;
      checks++; if (bit_valid !== 1'b0 || ready !== 1'b1) begin failures++; $display("frame too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
