// tx_s2p: serial-to-parallel converter of the VLC transmitter. Collects K
// serial (pre-scrambled) bits; the i-th valid bit of a frame is stored in
// data[i]. When the K-th bit is written, 'full' pulses for one cycle in the
// next clock and 'data' holds the frame until the next frame's bits arrive.
// The document gives the function; bit ordering is a design choice.
// Synchronous active-low reset.
module tx_s2p #(
  parameter int K = vlc_pkg::FRAME_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         full,
  output logic [K-1:0] data
);
  localparam int CW = $clog2(K + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      full <= 1'b0;
      data <= '0;
    end else begin
      full <= 1'b0;
      if (in_valid) begin
        data[cnt] <= in_bit;
        if (cnt == CW'(K - 1)) begin
          cnt  <= '0;
          full <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
