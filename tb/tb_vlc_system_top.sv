// tb_vlc_system_top: full-size end-to-end test of vlc_system_top with its
// default parameters (100 front-ends, Manchester RLL, (256,158) beacon code).
// Beacon link: random type/ID frames are sent back to back by the
// stand-alone transmitter; its LED output goes through an inverting optical
// channel model (LED on -> low sample) with noise that grows from frame to
// frame into the receiver's ADC input. Checks every decoded type/ID/CRC/
// preamble, the 160-clock TX latency (counting the clock in which the first
// frame bit is presented), the 416-clock frame period and the
// 386-clock RX decoding latency.
// Centralized transmitter (run in parallel): all 100 front-ends are
// written (a short burst that queues in the FIFO, then paced writes), one
// write to a non-existent front-end, two quick updates of one front-end,
// and a final over-long burst. Checks read-back, the 8-clock write latency,
// every front-end's repeated codeword against a reference model, and the
// overflow flag.
// Mechanism counters (each must be non-zero): frames decoded, frames with
// channel errors corrected, CRC-valid frames, cycles with queued requests,
// cycles the address pointer waited on a busy encoder, dropped invalid
// requests, PISO reloads, verified repetitions, FIFO overflow.
module tb_vlc_system_top;
  import tb_ref_pkg::*;
  import vlc_pkg::*;
  localparam int N = 256, K = 158, NB = 6, NF = CT_N_FE;
  localparam int HI = 190, LO = 60;

  logic clk = 0, rst_n = 0, sr_clk = 0, sr_rst_n = 0;
  logic tx_send = 0, tx_ready, tx_frame_valid, led;
  logic [7:0] tx_ftype = '0;
  logic [127:0] tx_id = '0;
  logic rx_peak_clear = 0, rx_frame_start = 0, rx_adc_valid = 0;
  logic [7:0] rx_adc_data = '0;
  logic rx_dec_done, rx_id_valid, rx_crc_ok, rx_preamble_ok;
  logic [127:0] rx_id, host_rdata;
  logic [7:0] rx_ftype;
  logic host_we = 0;
  logic [6:0] host_addr = '0;
  logic [127:0] host_wdata = '0;
  logic ct_fifo_overflow, ct_busy;
  logic [NF-1:0] fe_out, fe_active;

  int checks = 0, failures = 0;
  longint cyc = 0;
  // beacon bookkeeping
  logic [127:0] ids [NB];
  logic [7:0] types [NB];
  longint t_send [NB], t_tx [NB], t_rx [NB];
  int n_tx = 0, n_done = 0, n_got = 0, n_crc = 0, noisy = 0, flips = 0, fr_noise = 0;
  bit prev_fv = 0;
  // centralized bookkeeping
  logic [127:0] msgs [NF];
  int q_cycles = 0, busy_waits = 0, dropped = 0, reloads = 0, repeats = 0, overflows = 0;

  vlc_system_top dut (.*);

  always #5 clk = ~clk;
  always #20 sr_clk = ~sr_clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_in = 0;
  longint t_in [NB];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.fb_valid && dut.fb_ready) begin
      if (n_in % K == 0) t_in[n_in / K] = cyc;
      n_in++;
    end
    if (!dut.u_ct.f_empty) q_cycles++;
    if (!dut.u_ct.f_empty && (dut.u_ct.ctl_busy || dut.u_ct.tx_busy) && !dut.u_ct.f_rd)
      busy_waits++;
    if (dut.u_ct.f_rd && (!dut.u_ct.req_out.we || int'(dut.u_ct.req_out.addr) >= NF)) dropped++;
  end
  always @(posedge sr_clk) if (dut.u_ct.u_piso.wrap) reloads += $countones(dut.u_ct.u_piso.pend | (dut.u_ct.u_piso.s2 ^ dut.u_ct.u_piso.s3));

  // optical channel: inverting front-end, additive noise, 1 sample per bit
  always @(negedge clk) begin
    rx_adc_valid   <= 1'b0;
    rx_frame_start <= 1'b0;
    if (rst_n && tx_frame_valid) begin
      int s;
      s = (led ? LO : HI);
      for (int r = 0; r < 4; r++) s += $urandom_range(0, 2*fr_noise) - fr_noise;
      if (s < 0) s = 0;
      if (s > 255) s = 255;
      if ((s < (HI + LO) / 2) != led) flips++;
      rx_adc_valid   <= 1'b1;
      rx_adc_data    <= 8'(s);
      rx_frame_start <= !prev_fv;
      if (!prev_fv) begin t_rx[n_tx] = cyc + 1; end
    end
    if (rst_n && tx_frame_valid && !prev_fv) begin
      t_tx[n_tx] = cyc;
      n_tx++;
    end
    prev_fv = tx_frame_valid;
  end

  always @(negedge clk) if (rst_n && rx_dec_done) begin
    checks++;
    if (cyc - t_rx[n_done] + 1 != 386) begin
      failures++; $display("frame %0d: dec_done after %0d clocks", n_done, cyc - t_rx[n_done] + 1);
    end
    n_done++;
  end

  always @(negedge clk) if (rst_n && rx_id_valid) begin
    checks++;
    if (rx_id !== ids[n_got] || rx_ftype !== types[n_got] || !rx_crc_ok || !rx_preamble_ok) begin
      failures++; $display("frame %0d: id %h exp %h crc %b pre %b", n_got, rx_id, ids[n_got], rx_crc_ok, rx_preamble_ok);
    end
    if (rx_crc_ok) n_crc++;
    n_got++;
  end

  function automatic void ref_cw(input logic [127:0] m, input bit fz [], output bit xm []);
    bit u [], x [];
    int idx = 0;
    u = new[N];
    for (int i = 0; i < N; i++) begin
      u[i] = fz[i] ? 1'b0 : m[idx];
      if (!fz[i]) idx++;
    end
    polar_encode(N, u, x);
    xm = new[2*N];
    for (int i = 0; i < N; i++) begin xm[2*i] = x[i]; xm[2*i+1] = !x[i]; end
  endfunction

  function automatic bit is_rotation(input bit seen [], input bit want []);
    int w = want.size();
    for (int r = 0; r < w; r++) begin
      bit ok = 1;
      for (int i = 0; i < w && ok; i++) if (seen[i] != want[(r + i) % w]) ok = 0;
      if (ok) return 1;
    end
    return 0;
  endfunction

  task automatic wait_idle();
    int t = 0;
    @(negedge clk);
    while (ct_busy && t < 20000) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
  endtask

  // capture two frames of every front-end and compare with the reference
  task automatic check_fes(input bit fz []);
    bit s1 [NF][], s2 [NF][];
    for (int f = 0; f < NF; f++) begin s1[f] = new[512]; s2[f] = new[512]; end
    for (int i = 0; i < 1024; i++) begin
      @(negedge sr_clk);
      for (int f = 0; f < NF; f++) if (i < 512) s1[f][i] = fe_out[f]; else s2[f][i-512] = fe_out[f];
    end
    for (int f = 0; f < NF; f++) begin
      bit xm [];
      ref_cw(msgs[f], fz, xm);
      checks++;
      if (!is_rotation(s1[f], xm)) begin failures++; if (failures < 8) $display("front-end %0d codeword", f); end
      checks++;
      if (s1[f] != s2[f]) begin failures++; if (failures < 8) $display("front-end %0d not repeated", f); end
      else repeats++;
    end
  endtask

  // ---------------- beacon link ----------------
  initial begin : beacon
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1; sr_rst_n = 1;
    // idle light before the first frame trains the peak detector
    rx_peak_clear = 0;
    for (int f = 0; f < NB; f++) begin
      types[f] = 8'($urandom);
      ids[f] = {$urandom, $urandom, $urandom, $urandom};
      while (!tx_ready) @(negedge clk);
      fr_noise = 6 * f;
      tx_send = 1; tx_ftype = types[f]; tx_id = ids[f];
      t_send[f] = cyc;
      @(negedge clk);
      tx_send = 0;
      @(negedge clk);
    end
    while (n_got < NB && cyc < 10000) @(negedge clk);
  end

  // per-frame channel error count
  always @(negedge clk) begin
    static int last_n = 0;
    if (n_tx != last_n) begin
      if (flips > 0 && last_n > 0) noisy++;
      flips = 0;
      last_n = n_tx;
    end
  end

  // ---------------- centralized transmitter ----------------
  initial begin : ct
    bit fz [];
    logic [NF-1:0] tg;
    int d;
    frozen_set(N, 128, fz);
    repeat (3) @(posedge clk);
    @(negedge clk);
    @(negedge clk);
    for (int f = 0; f < NF; f++) msgs[f] = {$urandom, $urandom, $urandom, $urandom};
    // 8 back-to-back writes queue in the FIFO, the rest paced one per 8 clocks
    for (int f = 0; f < NF; f++) begin
      host_we = 1; host_addr = 7'(f); host_wdata = msgs[f];
      @(negedge clk);
      host_we = 0;
      if (f >= 7) repeat (7) @(negedge clk);
    end
    // write to a front-end that does not exist
    host_we = 1; host_addr = 7'd120; host_wdata = '1;
    @(negedge clk);
    host_we = 0;
    wait_idle();
    checks++; if (ct_fifo_overflow) begin failures++; $display("unexpected overflow"); end
    checks++; if (dropped != 1) begin failures++; $display("dropped %0d requests", dropped); end
    // read-back
    for (int f = 0; f < NF; f += 11) begin
      host_addr = 7'(f);
      @(negedge clk);
      @(negedge clk);
      checks++; if (host_rdata !== msgs[f]) begin failures++; $display("read-back %0d", f); end
    end
    // latency of one write into an idle system
    tg = dut.u_ct.fe_tgl;
    msgs[42] = {$urandom, $urandom, $urandom, $urandom};
    host_we = 1; host_addr = 7'd42; host_wdata = msgs[42];
    @(negedge clk);
    host_we = 0;
    d = 1;
    while (dut.u_ct.fe_tgl == tg && d < 100) begin @(negedge clk); d++; end
    checks++; if (d != 8) begin failures++; $display("write latency %0d", d); end
    // second quick update of the same front-end (two updates in one frame)
    msgs[42] = {$urandom, $urandom, $urandom, $urandom};
    host_we = 1; host_addr = 7'd42; host_wdata = msgs[42];
    @(negedge clk);
    host_we = 0;
    wait_idle();
    // wait for reloads at the next boundaries, then check all front-ends
    repeat (2 * 512 + 8) @(negedge sr_clk);
    checks++; if (fe_active !== '1) begin failures++; $display("fe_active %h", fe_active); end
    check_fes(fz);
    // over-long burst
    for (int i = 0; i < 20; i++) begin
      host_we = 1; host_addr = 7'(i); host_wdata = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
    end
    host_we = 0;
    wait_idle();
    if (ct_fifo_overflow) overflows++;
    checks++; if (!ct_fifo_overflow) begin failures++; $display("overflow not flagged"); end

    // wait for the beacon link, then summarise
    while (n_got < NB && cyc < 250000) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++; if (n_got != NB) begin failures++; $display("received %0d of %0d beacon frames", n_got, NB); end
    for (int f = 0; f < NB; f++) begin
      checks++;
      if (t_tx[f] - t_in[f] + 1 != 160) begin failures++; $display("frame %0d: tx latency %0d", f, t_tx[f] - t_in[f] + 1); end
      if (f > 0) begin
        checks++;
        if (t_tx[f] - t_tx[f-1] != 416) begin failures++; $display("frame %0d: period %0d", f, t_tx[f] - t_tx[f-1]); end
      end
    end
    if (flips > 0) noisy++;
    $display("beacons: sent %0d decoded %0d crc_ok %0d with-channel-errors %0d", n_tx, n_got, n_crc, noisy);
    $display("centralized: queued-cycles %0d busy-waits %0d dropped %0d reloads %0d repeats %0d overflow %0d",
             q_cycles, busy_waits, dropped, reloads, repeats, overflows);
    checks++; if (n_got == 0) failures++;
    checks++; if (noisy == 0) begin failures++; $display("no channel errors happened"); end
    checks++; if (n_crc == 0) failures++;
    checks++; if (q_cycles == 0) begin failures++; $display("no queueing"); end
    checks++; if (busy_waits == 0) begin failures++; $display("no busy waits"); end
    checks++; if (dropped == 0) failures++;
    checks++; if (reloads < NF) begin failures++; $display("reloads %0d", reloads); end
    checks++; if (repeats == 0) failures++;
    checks++; if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
