// tb_centralized_tx: reduced-size (8 front-ends) test of the centralized
// transmitter, run on a Manchester and a 4B6B instance side by side with
// the same host traffic. It checks host read-back through memory port A,
// the 8-cycle write-to-register latency of an idle system, one codeword
// every 7 sys_clk cycles during a burst, that requests for a non-existent
// front-end are dropped, that each front-end repeats the reference codeword
// (frozen insertion, generator-matrix polar encoding, Manchester or an
// independently typed 4B6B table) on its output, and that an over-long
// burst sets the FIFO overflow flag and the system still drains.
module tb_centralized_tx;
  import tb_ref_pkg::*;
  import vlc_pkg::*;
  localparam int NF = 8, N = 256, K = 128;
  localparam bit [5:0] T4B6B [16] = '{6'o16, 6'o15, 6'o23, 6'o26, 6'o25, 6'o43, 6'o46, 6'o45,
                                      6'o31, 6'o32, 6'o34, 6'o61, 6'o62, 6'o51, 6'o52, 6'o54};
  logic clk = 0, rst_n = 0, sr_clk = 0, sr_rst_n = 0;
  logic host_we = 0;
  logic [6:0] host_addr = '0;
  logic [127:0] host_wdata = '0, rd_m, rd_b;
  logic ovf_m, ovf_b, busy_m, busy_b;
  logic [NF-1:0] fo_m, fo_b, fa_m, fa_b;
  logic [127:0] msgs [NF];
  int checks = 0, failures = 0, cyc = 0;
  int dm_cnt = 0, last_dm = 0, gaps_ok = 0;

  centralized_tx #(.N_FE(NF), .RLL(RLL_MANCHESTER)) dut_m (
    .clk, .rst_n, .sr_clk, .sr_rst_n, .host_we, .host_addr, .host_wdata, .host_rdata(rd_m),
    .fifo_overflow(ovf_m), .busy(busy_m), .fe_out(fo_m), .fe_active(fa_m));
  centralized_tx #(.N_FE(NF), .RLL(RLL_4B6B)) dut_b (
    .clk, .rst_n, .sr_clk, .sr_rst_n, .host_we, .host_addr, .host_wdata, .host_rdata(rd_b),
    .fifo_overflow(ovf_b), .busy(busy_b), .fe_out(fo_b), .fe_active(fa_b));

  always #5 clk = ~clk;
  always #20 sr_clk = ~sr_clk;
  always @(posedge clk) begin
    cyc++;
    if (dut_m.dm_we) begin dm_cnt++; last_dm = cyc; end
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_cw(input logic [127:0] m, input bit fz [], output bit xm [], output bit xb []);
    bit u [], x [];
    int idx = 0;
    u = new[N];
    for (int i = 0; i < N; i++) begin
      u[i] = fz[i] ? 1'b0 : m[idx];
      if (!fz[i]) idx++;
    end
    polar_encode(N, u, x);
    xm = new[2*N];
    xb = new[6*N/4];
    for (int i = 0; i < N; i++) begin xm[2*i] = x[i]; xm[2*i+1] = !x[i]; end
    for (int j = 0; j < N/4; j++)
      for (int b = 0; b < 6; b++) xb[6*j+b] = T4B6B[{x[4*j+3], x[4*j+2], x[4*j+1], x[4*j]}][b];
  endfunction

  // true if seen is a cyclic rotation of want
  function automatic bit is_rotation(input bit seen [], input bit want []);
    int w = want.size();
    for (int r = 0; r < w; r++) begin
      bit ok = 1;
      for (int i = 0; i < w && ok; i++) if (seen[i] != want[(r + i) % w]) ok = 0;
      if (ok) return 1;
    end
    return 0;
  endfunction

  task automatic host_write(input int a, input logic [127:0] d);
    @(negedge clk);
    host_we = 1; host_addr = 7'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic drain();
    int t = 0;
    @(negedge clk);
    while ((busy_m || busy_b) && t < 5000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
  endtask

  initial begin
    bit fz [];
    bit sm [NF][], sb [NF][];
    int first_dm, t0, d;
    logic [NF-1:0] tg;
    frozen_set(N, K, fz);
    repeat (3) @(posedge clk);
    @(negedge clk) begin rst_n = 1; sr_rst_n = 1; end

    // burst: one write per clock to every front-end
    first_dm = dm_cnt;
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      msgs[f] = {$urandom, $urandom, $urandom, $urandom};
      host_we = 1; host_addr = 7'(f); host_wdata = msgs[f];
      @(negedge clk);
    end
    host_we = 0;
    t0 = cyc;
    begin
      int prev = -1, t = 0;
      while (dm_cnt - first_dm < NF && t < 2000) begin
        @(negedge clk); t++;
        if (dut_m.dm_we) begin
          if (prev >= 0) begin
            checks++;
            if (cyc + 1 - prev != 7) begin failures++; $display("codeword spacing %0d", cyc + 1 - prev); end
            else gaps_ok++;
          end
          prev = cyc + 1;
        end
      end
    end
    drain();
    checks++; if (ovf_m || ovf_b) begin failures++; $display("unexpected overflow"); end

    // read-back through port A
    for (int f = 0; f < NF; f++) begin
      @(negedge clk) host_addr = 7'(f);
      @(negedge clk);
      checks++; if (rd_m !== msgs[f] || rd_b !== msgs[f]) begin failures++; $display("readback %0d", f); end
    end

    // latency of a single write into an idle system
    msgs[3] = {$urandom, $urandom, $urandom, $urandom};
    tg = dut_m.fe_tgl;
    @(negedge clk);
    host_we = 1; host_addr = 7'd3; host_wdata = msgs[3];
    @(negedge clk);
    host_we = 0;
    d = 1;
    while (dut_m.fe_tgl == tg && d < 100) begin @(negedge clk); d++; end
    checks++; if (d != 8) begin failures++; $display("write-to-register latency %0d", d); end
    checks++; if (dut_b.fe_tgl == dut_b.u_dm.fe_tgl && dut_m.fe_tgl[3] == tg[3]) begin failures++; $display("no toggle"); end
    drain();

    // request for a front-end that does not exist is dropped
    tg = dut_m.fe_tgl;
    host_write(100, '1);
    drain();
    checks++; if (dut_m.fe_tgl !== tg) begin failures++; $display("invalid address reached a front-end"); end

    // every front-end repeats its codeword
    repeat (2 * 512 + 8) @(negedge sr_clk);
    checks++; if (fa_m !== '1 || fa_b !== '1) begin failures++; $display("fe_active %b %b", fa_m, fa_b); end
    for (int f = 0; f < NF; f++) begin sm[f] = new[512]; sb[f] = new[384]; end
    for (int i = 0; i < 512; i++) begin
      @(negedge sr_clk);
      for (int f = 0; f < NF; f++) begin
        sm[f][i] = fo_m[f];
        if (i < 384) sb[f][i] = fo_b[f];
      end
    end
    for (int f = 0; f < NF; f++) begin
      bit xm [], xb [];
      ref_cw(msgs[f], fz, xm, xb);
      checks++; if (!is_rotation(sm[f], xm)) begin failures++; $display("manchester front-end %0d", f); end
      checks++; if (!is_rotation(sb[f], xb)) begin failures++; $display("4b6b front-end %0d", f); end
    end

    // over-long burst overflows the 8-entry FIFO
    @(negedge clk);
    for (int i = 0; i < 24; i++) begin
      host_we = 1; host_addr = 7'(i % NF); host_wdata = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
    end
    host_we = 0;
    drain();
    checks++; if (!ovf_m || !ovf_b) begin failures++; $display("overflow not flagged"); end
    checks++; if (busy_m || busy_b) begin failures++; $display("did not drain"); end
    $display("codewords %0d, spacing checks %0d", dm_cnt, gaps_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
