// frozen_inserter: forms the N-bit polar input vector from K information
// bits and registers it (this register is the polar encoder's input
// register). Frozen positions carry 0; the information bits fill the
// remaining positions in ascending index order, info[0] at the lowest
// non-frozen index. The frozen set is computed at elaboration by
// vlc_pkg::frozen_mask (Bhattacharyya construction, a design choice: the
// document only says the positions come from the code construction).
// 'load' captures in one clock. Synchronous active-low reset.
module frozen_inserter #(
  parameter int N = 256,
  parameter int K = vlc_pkg::FRAME_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [K-1:0] info,
  output logic [N-1:0] u
);
  localparam logic [N-1:0] FROZEN = N'(vlc_pkg::frozen_mask(N, K));
  logic [N-1:0] u_next;

  always_comb begin
    int idx;
    idx    = 0;
    u_next = '0;
    for (int i = 0; i < N; i++) begin
      if (!FROZEN[i]) begin
        u_next[i] = info[idx];
        idx++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    u <= '0;
    else if (load) u <= u_next;
  end
endmodule
