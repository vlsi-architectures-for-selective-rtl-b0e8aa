// tb_vlc_rx: end-to-end receiver test. Beacon frames are built, scrambled,
// frozen-inserted and polar encoded by the reference model, sent through an
// OOK channel with an inverting front-end (bit 0 -> high sample) and
// additive noise, and fed to the receiver back to back (one frame every 256
// samples). Checks ID, type, CRC and preamble flags of every frame, the
// decoder latency (dec_done 386 cycles after a frame's first sample) and
// counts frames in which noise flipped at least one hard decision.
module tb_vlc_rx;
  import tb_ref_pkg::*;
  localparam int N = 256, K = 158, NF = 6;
  localparam int HI = 190, LO = 60;
  logic clk = 0, rst_n = 0, peak_clear = 0, frame_start = 0, adc_valid = 0;
  logic [7:0] adc_data = 0;
  logic dec_done, id_valid, crc_ok, preamble_ok;
  logic [127:0] id;
  logic [7:0] ftype;
  int checks = 0, failures = 0, noisy_frames = 0, got = 0;
  longint cyc = 0, t_start [NF];
  logic [127:0] ids [NF];
  logic [7:0] types [NF];
  int ndone = 0;

  vlc_rx dut (.clk, .rst_n, .peak_clear, .frame_start, .adc_valid, .adc_data,
              .dec_done, .id_valid, .id, .ftype, .crc_ok, .preamble_ok);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && dec_done) begin
    checks++;
    if (cyc - t_start[ndone] != 386) begin
      failures++; $display("frame %0d: dec_done after %0d cycles, expected 386", ndone, cyc - t_start[ndone]);
    end
    ndone++;
  end

  always @(negedge clk) if (rst_n && id_valid) begin
    checks++;
    if (id !== ids[got] || ftype !== types[got] || !crc_ok || !preamble_ok) begin
      failures++; $display("frame %0d: id %h exp %h crc_ok %b pre_ok %b", got, id, ids[got], crc_ok, preamble_ok);
    end
    got++;
  end

  initial begin
    bit c [], fz [], u [], x [];
    logic [157:0] fr;
    cipher(K, c);
    frozen_set(N, K, fz);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // idle light: train the peak detector
    for (int i = 0; i < 8; i++) begin adc_valid = 1; adc_data = 8'(i[0] ? HI : LO); @(negedge clk); end
    adc_valid = 0;
    for (int f = 0; f < NF; f++) begin
      int idx, flips;
      types[f] = 8'($urandom);
      for (int w = 0; w < 4; w++) ids[f][w*32 +: 32] = $urandom;
      if (f == 1) ids[f] = '1;
      fr = {6'b101010, types[f], ids[f], frame_crc(types[f], ids[f])};
      u = new[N]; idx = 0;
      for (int i = 0; i < N; i++) begin
        u[i] = fz[i] ? 1'b0 : (fr[157-idx] ^ c[idx]);
        if (!fz[i]) idx++;
      end
      polar_encode(N, u, x);
      flips = 0;
      for (int i = 0; i < N; i++) begin
        int s, nz;
        nz = 0;
        for (int r = 0; r < 4; r++) nz += $urandom_range(0, 2*f*6) - f*6;   // noise grows per frame
        s = (x[i] ? LO : HI) + nz;
        if (s < 0) s = 0;
        if (s > 255) s = 255;
        if ((s < (HI + LO) / 2) != x[i]) flips++;
        adc_valid = 1; adc_data = 8'(s); frame_start = (i == 0);
        if (i == 0) t_start[f] = cyc;
        @(negedge clk);
      end
      if (flips > 0) noisy_frames++;
      $display("frame %0d: %0d hard-decision errors in the channel", f, flips);
    end
    adc_valid = 0; frame_start = 0;
    repeat (700) @(negedge clk);
    checks++; if (got != NF) begin failures++; $display("received %0d of %0d frames", got, NF); end
    checks++; if (noisy_frames == 0) begin failures++; $display("no frame had channel errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
