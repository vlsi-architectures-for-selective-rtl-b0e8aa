// tb_polar_encoder: checks the recursive combinational polar encoder
// (N = 256) against the generator-matrix rule x[j] = XOR of u[i] with
// (i & j) == j, for unit vectors, all-ones and random inputs.
module tb_polar_encoder;
  import tb_ref_pkg::*;
  localparam int N = 256;
  logic [N-1:0] u, x;
  int checks = 0, failures = 0;

  polar_enc_core #(.N(N)) dut (.u, .x);

  task automatic check_vec();
    bit ub [], xb [];
    ub = new[N];
    for (int i = 0; i < N; i++) ub[i] = u[i];
    polar_encode(N, ub, xb);
    #1;
    for (int j = 0; j < N; j++) begin
      checks++;
      if (x[j] !== xb[j]) begin
        failures++;
        if (failures < 5) $display("mismatch u=%h bit %0d", u, j);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i += 17) begin u = '0; u[i] = 1'b1; check_vec(); end
    u = '1; check_vec();
    repeat (20) begin
      for (int w = 0; w < N/32; w++) u[w*32 +: 32] = $urandom;
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
