// frame_decap: frame decapsulation of the VLC receiver. Collects the 158
// descrambled bits of a beacon frame (MSB of the preamble first), strips the
// start of frame (6-bit preamble, 8-bit type) and end of frame (16-bit CRC)
// and outputs the 128-bit ID with the frame type, a preamble check against
// PREAMBLE and a CRC check (CRC-16-CCITT over type and ID, the same choice
// as frame_encap). id_valid pulses for one clock in the cycle after the
// 158th bit; the outputs hold until the next frame completes. The frame
// layout follows the document; checks and polynomial are design choices.
// Synchronous active-low reset.
module frame_decap #(
  parameter logic [vlc_pkg::PRE_W-1:0] PREAMBLE = vlc_pkg::PREAMBLE_DEFAULT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_bit,
  output logic                       id_valid,
  output logic [vlc_pkg::ID_W-1:0]   id,
  output logic [vlc_pkg::TYPE_W-1:0] ftype,
  output logic                       crc_ok,
  output logic                       preamble_ok
);
  import vlc_pkg::*;
  localparam int CW = $clog2(FRAME_W + 1);

  logic [FRAME_W-2:0] sr;
  logic [FRAME_W-1:0] f;
  logic [CW-1:0]      cnt;

  assign f = {sr, in_bit};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      id_valid    <= 1'b0;
      id          <= '0;
      ftype       <= '0;
      crc_ok      <= 1'b0;
      preamble_ok <= 1'b0;
    end else begin
      id_valid <= 1'b0;
      if (in_valid) begin
        sr <= f[FRAME_W-2:0];
        if (cnt == CW'(FRAME_W - 1)) begin
          cnt         <= '0;
          id_valid    <= 1'b1;
          preamble_ok <= (f[FRAME_W-1 -: PRE_W] == PREAMBLE);
          ftype       <= f[CRC_W+ID_W +: TYPE_W];
          id          <= f[CRC_W +: ID_W];
          crc_ok      <= (f[CRC_W-1:0] == crc16_ccitt(f[CRC_W +: TYPE_W+ID_W]));
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
