// tx_p2s_ook: parallel-to-serial converter and OOK modulator of the VLC
// transmitter. 'load' captures an N-bit codeword; from the next clock one
// bit per cycle leaves on tx_bit, index 0 first, with tx_valid high for N
// cycles and 'last' high with the final bit. OOK maps bit 1 to LED on and
// bit 0 to LED off; between frames the LED is held at IDLE_LEVEL (a design
// choice: the document does not describe the idle state). A 'load' while
// busy is ignored. Synchronous active-low reset.
module tx_p2s_ook #(
  parameter int   N          = 256,
  parameter logic IDLE_LEVEL = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] cw,
  output logic         busy,
  output logic         last,
  output logic         tx_valid,
  output logic         tx_bit,
  output logic         led
);
  localparam int CW = $clog2(N + 1);
  logic [N-1:0]  sr;
  logic [CW-1:0] left;

  assign busy     = (left != '0);
  assign tx_valid = busy;
  assign tx_bit   = sr[0];
  assign last     = (left == CW'(1));
  assign led      = busy ? tx_bit : IDLE_LEVEL;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (busy) begin
      sr   <= sr >> 1;
      left <= left - 1'b1;
    end else if (load) begin
      sr   <= cw;
      left <= CW'(N);
    end
  end
endmodule
