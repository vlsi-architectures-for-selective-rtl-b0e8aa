// rx_p2s: parallel-to-serial stage of the VLC receiver. 'load' takes the
// decoded N-bit polar input vector, keeps only its K information positions
// (ascending index, the inverse of the transmitter's frozen-bit inserter)
// and sends them one per clock from the next cycle, with out_valid high
// for K cycles and 'last' on the final bit. A load while sending restarts
// with the new vector. Synchronous active-low reset.
module rx_p2s #(
  parameter int N = 256,
  parameter int K = vlc_pkg::FRAME_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] u,
  output logic         out_valid,
  output logic         out_bit,
  output logic         last
);
  localparam int CW = $clog2(K + 1);
  localparam logic [N-1:0] FROZEN = N'(vlc_pkg::frozen_mask(N, K));

  logic [K-1:0]  info, sr;
  logic [CW-1:0] left;

  always_comb begin
    int idx;
    idx  = 0;
    info = '0;
    for (int i = 0; i < N; i++) begin
      if (!FROZEN[i]) begin
        info[idx] = u[i];
        idx++;
      end
    end
  end

  assign out_valid = (left != '0);
  assign out_bit   = sr[0];
  assign last      = (left == CW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (load) begin
      sr   <= info;
      left <= CW'(K);
    end else if (out_valid) begin
      sr   <= sr >> 1;
      left <= left - 1'b1;
    end
  end
endmodule
