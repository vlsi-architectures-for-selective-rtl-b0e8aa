// frame_encap: builds the 158-bit JEITA visible-light beacon frame and sends
// it serially to the VLC transmitter.
//
// Frame layout (from the document): start of frame = 6-bit preamble + 8-bit
// frame type, payload = 128-bit ID, end of frame = 16-bit CRC. The preamble
// value and the CRC polynomial are not given; this design uses PREAMBLE and
// CRC-16-CCITT over type and ID (vlc_pkg::crc16_ccitt). Bits leave MSB
// first: preamble, type, ID, CRC.
// Interface: a 'send' pulse while 'ready' captures ftype/id; the frame then
// streams out with a valid/ready handshake (one bit per cycle when
// bit_ready stays high). 'ready' returns the cycle after the last bit is
// accepted. Synchronous active-low reset.
module frame_encap #(
  parameter logic [vlc_pkg::PRE_W-1:0] PREAMBLE = vlc_pkg::PREAMBLE_DEFAULT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       send,
  input  logic [vlc_pkg::TYPE_W-1:0] ftype,
  input  logic [vlc_pkg::ID_W-1:0]   id,
  output logic                       ready,
  output logic                       bit_valid,
  output logic                       bit_out,
  input  logic                       bit_ready
);
  import vlc_pkg::*;
  localparam int CW = $clog2(FRAME_W + 1);

  logic [FRAME_W-1:0] frame;
  logic [CW-1:0]      left;

  assign ready     = (left == '0);
  assign bit_valid = !ready;
  assign bit_out   = frame[FRAME_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame <= '0;
      left  <= '0;
    end else if (ready) begin
      if (send) begin
        frame <= {PREAMBLE, ftype, id, crc16_ccitt({ftype, id})};
        left  <= CW'(FRAME_W);
      end
    end else if (bit_ready) begin
      frame <= {frame[FRAME_W-2:0], 1'b0};
      left  <= left - 1'b1;
    end
  end
endmodule
