// vlc_rx: non-RLL soft-decoding VLC beacon receiver. ADC samples of the
// received light pass the 3-bit soft-decision filter (peak-based thresholds
// and an 8-entry LLR table), the Transformer quantizes and buffers the N
// LLRs of a frame, the register-free SC polar decoder decides two bits per
// clock, the P2S stage serializes the K information bits, the descrambler
// removes the x^4+x^3+1 cipher and frame decapsulation returns the ID.
//
// Interface: one sample per clock with adc_valid; frame_start marks the
// first sample of a frame (frame synchronization is outside this block, a
// design choice); samples outside a frame only train the peak detector.
// Timing: with the first sample of a frame in cycle 0, dec_done pulses in
// cycle 386 (256 receive cycles, 2 cycles of filter and Transformer, 128
// decoding cycles), the latency the document reports; id_valid follows 160
// cycles later (K serial bits plus descrambler and decapsulation). A new
// frame may start 256 cycles after the previous one. Synchronous reset.
// The filter's region output and the P2S 'last' flag are not needed here
// (frame_decap counts bits itself) and stay unconnected inside.
module vlc_rx #(
  parameter int N     = 256,
  parameter int K     = vlc_pkg::FRAME_W,
  parameter int ADC_W = 8,
  parameter int LLR_W = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       peak_clear,
  input  logic                       frame_start,
  input  logic                       adc_valid,
  input  logic [ADC_W-1:0]           adc_data,
  output logic                       dec_done,
  output logic                       id_valid,
  output logic [vlc_pkg::ID_W-1:0]   id,
  output logic [vlc_pkg::TYPE_W-1:0] ftype,
  output logic                       crc_ok,
  output logic                       preamble_ok
);
  logic                    llr_valid, llr_sof, fv, dec_busy, s_valid, s_bit, s_last, d_valid, d_bit;
  logic signed [8:0]       llr9;
  logic [2:0]              region;
  logic [N-1:0][LLR_W-1:0] llr;
  logic [N-1:0]            u;

  soft_decision_filter #(.ADC_W(ADC_W)) u_sdf (
    .clk, .rst_n, .peak_clear, .adc_valid, .adc_sof(frame_start), .adc_data,
    .llr_valid, .llr_sof, .llr9, .region);

  llr_transformer #(.N(N), .LLR_W(LLR_W)) u_tr (
    .clk, .rst_n, .in_valid(llr_valid), .in_sof(llr_sof), .llr9, .frame_valid(fv), .llr);

  sc_polar_decoder #(.N(N), .K(K), .LLR_W(LLR_W)) u_dec (
    .clk, .rst_n, .start(fv), .llr, .busy(dec_busy), .done(dec_done), .u);

  rx_p2s #(.N(N), .K(K)) u_p2s (
    .clk, .rst_n, .load(dec_done), .u, .out_valid(s_valid), .out_bit(s_bit), .last(s_last));

  descrambler #(.FRAME_BITS(K)) u_dscr (
    .clk, .rst_n, .in_valid(s_valid), .in_bit(s_bit), .out_valid(d_valid), .out_bit(d_bit));

  frame_decap u_decap (
    .clk, .rst_n, .in_valid(d_valid), .in_bit(d_bit), .id_valid, .id, .ftype, .crc_ok, .preamble_ok);

  // the decoder must be free when a frame of LLRs is complete
  assert property (@(posedge clk) disable iff (!rst_n) fv |-> !dec_busy)
    else $error("vlc_rx: frame completed while the decoder is busy");
endmodule
