// tb_frozen_inserter: loads random information vectors and checks that
// exactly N-K positions (the least reliable ones of an independently
// computed Bhattacharyya construction) are 0 and that the information bits
// fill the other positions in ascending order; also checks that 'load' low
// holds the register. N=256 with K=158 (VLC) and K=128 (centralized TX).
module tb_frozen_inserter;
  import tb_ref_pkg::*;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, load = 0;
  logic [157:0] info_a;
  logic [127:0] info_b;
  logic [N-1:0] ua, ub;
  int checks = 0, failures = 0;

  frozen_inserter #(.N(N), .K(158)) dut_a (.clk, .rst_n, .load, .info(info_a), .u(ua));
  frozen_inserter #(.N(N), .K(128)) dut_b (.clk, .rst_n, .load, .info(info_b), .u(ub));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int k, input logic [N-1:0] u, input logic [157:0] info);
    bit fz [];
    int idx = 0;
    frozen_set(N, k, fz);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (fz[i]) begin
        if (u[i] !== 1'b0) begin failures++; if (failures < 5) $display("K=%0d frozen %0d not 0", k, i); end
      end else begin
        if (u[i] !== info[idx]) begin failures++; if (failures < 5) $display("K=%0d pos %0d info %0d", k, i, idx); end
        idx++;
      end
    end
    checks++; if (idx != k) begin failures++; $display("K=%0d: %0d info positions", k, idx); end
  endtask

  initial begin
    logic [N-1:0] hold_a;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int w = 0; w < 5; w++) info_a[w*32 +: 32] = $urandom;
      if (t == 0) info_a = '1;
      for (int w = 0; w < 4; w++) info_b[w*32 +: 32] = $urandom;
      if (t == 0) info_b = '1;
      load = 1;
      @(negedge clk) load = 0;
      check(158, ua, info_a);
      check(128, ub, {30'b0, info_b});
    end
    hold_a = ua;
    info_a = ~info_a;
    @(negedge clk);
    checks++; if (ua !== hold_a) begin failures++; $display("register changed without load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
