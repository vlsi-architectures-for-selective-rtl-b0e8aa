// tb_frame_decap: streams beacon frames (built with the reference CRC) into
// the decapsulator and checks ID, type, preamble and CRC flags, including
// frames with a corrupted CRC, ID or preamble, and the id_valid pulse.
module tb_frame_decap;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, id_valid, crc_ok, preamble_ok;
  logic [127:0] id;
  logic [7:0] ftype;
  int checks = 0, failures = 0;

  frame_decap dut (.clk, .rst_n, .in_valid, .in_bit, .id_valid, .id, .ftype, .crc_ok, .preamble_ok);
  always #5 clk = ~clk;

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
    for (int f = 0; f < 8; f++) begin
      logic [7:0] t;
      logic [127:0] i_d;
      logic [157:0] fr;
      bit bad_crc, bad_pre;
      t = 8'($urandom);
      for (int w = 0; w < 4; w++) i_d[w*32 +: 32] = $urandom;
      fr = {6'b101010, t, i_d, frame_crc(t, i_d)};
      bad_crc = (f % 4 == 1) || (f % 4 == 3);
      bad_pre = (f % 4 == 2);
      if (f % 4 == 1) fr[3] = ~fr[3];          // CRC field error
      if (f % 4 == 3) fr[40] = ~fr[40];        // ID error
      if (bad_pre) fr[155] = ~fr[155];         // preamble error
      for (int n = 0; n < 158; n++) begin
        in_valid = 1; in_bit = fr[157-n];
        @(negedge clk);
        if (n < 157) begin
          checks++; if (id_valid) begin failures++; $display("early id_valid"); end
        end
        if (n < 157 && $urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      checks++;
      if (!id_valid || ftype !== t || crc_ok !== !bad_crc || preamble_ok !== !bad_pre ||
          (f % 4 != 3 && id !== i_d)) begin
        failures++;
        $display("frame %0d: v=%b type %h/%h crc_ok %b pre_ok %b", f, id_valid, ftype, t, crc_ok, preamble_ok);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
