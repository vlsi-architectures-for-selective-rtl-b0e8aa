// vlc_system_top: the selective-FEC VLC beacon system of this design in one
// module, with three independent parts side by side:
//  - stand-alone beacon transmitter: frame_encap builds the 158-bit JEITA
//    frame (preamble, type, ID, CRC-16) and streams it into vlc_tx
//    (pre-scrambler, S2P, frozen-bit insertion, (256,158) polar encoder,
//    P2S/OOK) whose output drives the LED pin;
//  - beacon receiver: vlc_rx takes ADC samples of the photodiode signal
//    (soft-decision filter, LLR transformer, SC polar decoder, P2S,
//    de-scrambler, frame check) and reports the decoded type and ID;
//  - centralized transmitter: one encoder serving N_FE LED front-ends from
//    host-written 128-bit messages ((256,128) polar code + RLL), with loop
//    PISO registers in the front-end clock domain.
// Interface: clk/rst_n is the system clock (50 MHz in the document) for all
// three parts; sr_clk/sr_rst_n is the front-end bit clock of the
// centralized transmitter. tx_frame_valid is high while the LED carries a
// codeword bit (the channel side uses its rising edge as rx_frame_start).
// Timing: 160 clocks from the first frame bit into vlc_tx to the first LED
// bit, a new frame every 416 clocks; dec_done 386 clocks after a frame's
// first ADC sample; host write to front-end register in 8 clocks.
// The partitioning follows the document's three systems; putting them in
// one top with separate ports is this design's choice (the optical
// channel, LED driver, photodiode/ADC, PLL and soft processor are outside).
module vlc_system_top #(
  parameter int            N_FE   = vlc_pkg::CT_N_FE,
  parameter vlc_pkg::rll_e CT_RLL = vlc_pkg::RLL_MANCHESTER
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // stand-alone transmitter
  input  logic                          tx_send,
  input  logic [vlc_pkg::TYPE_W-1:0]    tx_ftype,
  input  logic [vlc_pkg::ID_W-1:0]      tx_id,
  output logic                          tx_ready,
  output logic                          tx_frame_valid,
  output logic                          led,
  // receiver
  input  logic                          rx_peak_clear,
  input  logic                          rx_frame_start,
  input  logic                          rx_adc_valid,
  input  logic [7:0]                    rx_adc_data,
  output logic                          rx_dec_done,
  output logic                          rx_id_valid,
  output logic [vlc_pkg::ID_W-1:0]      rx_id,
  output logic [vlc_pkg::TYPE_W-1:0]    rx_ftype,
  output logic                          rx_crc_ok,
  output logic                          rx_preamble_ok,
  // centralized transmitter
  input  logic                          sr_clk,
  input  logic                          sr_rst_n,
  input  logic                          host_we,
  input  logic [vlc_pkg::CT_ADDR_W-1:0] host_addr,
  input  logic [vlc_pkg::CT_MSG_W-1:0]  host_wdata,
  output logic [vlc_pkg::CT_MSG_W-1:0]  host_rdata,
  output logic                          ct_fifo_overflow,
  output logic                          ct_busy,
  output logic [N_FE-1:0]               fe_out,
  output logic [N_FE-1:0]               fe_active
);
  logic fb_valid, fb_bit, fb_ready, tx_bit_unused;

  frame_encap u_encap (
    .clk, .rst_n, .send(tx_send), .ftype(tx_ftype), .id(tx_id), .ready(tx_ready),
    .bit_valid(fb_valid), .bit_out(fb_bit), .bit_ready(fb_ready));

  vlc_tx u_tx (
    .clk, .rst_n, .in_valid(fb_valid), .in_bit(fb_bit), .in_ready(fb_ready),
    .tx_valid(tx_frame_valid), .tx_bit(tx_bit_unused), .led);

  vlc_rx u_rx (
    .clk, .rst_n, .peak_clear(rx_peak_clear), .frame_start(rx_frame_start),
    .adc_valid(rx_adc_valid), .adc_data(rx_adc_data), .dec_done(rx_dec_done),
    .id_valid(rx_id_valid), .id(rx_id), .ftype(rx_ftype), .crc_ok(rx_crc_ok),
    .preamble_ok(rx_preamble_ok));

  centralized_tx #(.N_FE(N_FE), .RLL(CT_RLL)) u_ct (
    .clk, .rst_n, .sr_clk, .sr_rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .fifo_overflow(ct_fifo_overflow), .busy(ct_busy), .fe_out, .fe_active);
endmodule
