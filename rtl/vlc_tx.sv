// vlc_tx: non-RLL VLC beacon transmitter. Serial frame bits pass through the
// x^4+x^3+1 pre-scrambler into the S2P register; the frozen-bit inserter
// places them in the polar input register, the combinational (N,K) polar
// encoder produces the codeword, and the P2S/OOK stage sends it to the LED,
// one coded bit per clock. No RLL code is used: the scrambler plus the
// non-systematic polar encoder keep the light's on/off ratio balanced.
//
// Timing: the first frame bit accepted in cycle 0 appears as the first coded
// bit on led/tx_bit in cycle 160 (K+2 for K=158: S2P, polar input register,
// P2S load), the latency the document reports. Frames are not overlapped:
// in_ready drops after the K-th bit and returns when the last coded bit
// leaves, so a frame occupies 160+256 = 416 cycles, which reproduces the
// document's throughput (256 coded bits per 416 clocks). Structure follows
// the document; the handshake is a design choice.
module vlc_tx #(
  parameter int   N          = 256,
  parameter int   K          = vlc_pkg::FRAME_W,
  parameter logic IDLE_LEVEL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic tx_valid,
  output logic tx_bit,
  output logic led
);
  logic         acc, scr_bit, s2p_full, load_p2s, hold, p2s_busy, p2s_last;
  logic [K-1:0] s2p_data;
  logic [N-1:0] u, x;

  assign in_ready = !hold && !s2p_full;
  assign acc      = in_valid && in_ready;

  prescrambler #(.FRAME_BITS(K)) u_scr (
    .clk, .rst_n, .in_valid(acc), .in_bit, .out_bit(scr_bit));

  tx_s2p #(.K(K)) u_s2p (
    .clk, .rst_n, .in_valid(acc), .in_bit(scr_bit), .full(s2p_full), .data(s2p_data));

  frozen_inserter #(.N(N), .K(K)) u_fz (
    .clk, .rst_n, .load(s2p_full), .info(s2p_data), .u);

  polar_enc_core #(.N(N)) u_enc (.u, .x);

  tx_p2s_ook #(.N(N), .IDLE_LEVEL(IDLE_LEVEL)) u_p2s (
    .clk, .rst_n, .load(load_p2s), .cw(x), .busy(p2s_busy), .last(p2s_last),
    .tx_valid, .tx_bit, .led);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load_p2s <= 1'b0;
      hold     <= 1'b0;
    end else begin
      load_p2s <= s2p_full;
      if (s2p_full)                 hold <= 1'b1;
      else if (p2s_busy && p2s_last) hold <= 1'b0;
    end
  end
endmodule
