// sc_polar_decoder: non-systematic successive-cancellation polar decoder
// with a register-free processing-element network.
//
// Structure (from the document): log2(N) layers of processing elements are
// purely combinational (N/2, N/4, ..., 2 PEs, then one last PE); every clock
// the whole network recomputes, from the stored channel LLRs, the two LLRs
// of the next bit pair, and the modified last PE decides both bits u[2k] and
// u[2k+1] in the same cycle. A PE computes the min-sum
//   f(a,b) = sign(a)sign(b)min(|a|,|b|)  or  g(a,b,s) = b + (1-2s)a,
// selected by the bit of 2k belonging to its layer. The partial sums s for
// layer j are produced by a partial-sum generator made of polar encoders:
// the decoded bits of the left sibling sub-tree, u[base +: M], re-encoded by
// an M-bit polar encoder (M = N >> j).
// Frozen positions (vlc_pkg::frozen_mask) are forced to 0. Internal width is
// LLR_W + log2(N) so no layer saturates (a design choice; the PE insides
// are not given in the document).
// Timing: 'start' loads the channel LLRs; the next N/2 clocks decode two
// bits each; 'done' pulses the clock after the last pair, with 'u' valid
// until the next start. A start while busy is ignored. Synchronous
// active-low reset.
module sc_polar_decoder #(
  parameter int N     = 256,
  parameter int K     = vlc_pkg::FRAME_W,
  parameter int LLR_W = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [N-1:0][LLR_W-1:0] llr,
  output logic                    busy,
  output logic                    done,
  output logic [N-1:0]            u
);
  localparam int L  = $clog2(N);
  localparam int IW = LLR_W + L;
  localparam logic [N-1:0] FROZEN = N'(vlc_pkg::frozen_mask(N, K));

  typedef logic signed [IW-1:0] llr_t;

  function automatic llr_t pe_f(llr_t a, llr_t b);
    llr_t ma, mb, m;
    ma = a[IW-1] ? -a : a;
    mb = b[IW-1] ? -b : b;
    m  = (ma < mb) ? ma : mb;
    return (a[IW-1] ^ b[IW-1]) ? -m : m;
  endfunction

  function automatic llr_t pe_g(llr_t a, llr_t b, logic s);
    return s ? (b - a) : (b + a);
  endfunction

  logic [N-1:0][LLR_W-1:0] ch;      // stored channel LLRs
  logic [L-2:0]            step;    // bit-pair index k
  logic [L-1:0]            i0, i1;  // 2k, 2k+1
  llr_t                    lv [2*N-2];  // layer j at offset 2N - 2(N >> j)
  logic                    d0, d1;

  assign i0 = {step, 1'b0};
  assign i1 = {step, 1'b1};

  for (genvar t = 0; t < N; t++) begin : g_ch
    assign lv[t] = llr_t'(signed'(ch[t]));
  end

  for (genvar j = 1; j < L; j++) begin : g_layer
    localparam int M    = N >> j;
    localparam int IOFF = 2*N - 2*(N >> (j-1));
    localparam int OOFF = 2*N - 2*M;
    logic [M-1:0] ps;
    logic [L-1:0] base;
    logic         sel;
    assign sel  = i0[L-j];
    assign base = (i0 >> (L-j+1)) << (L-j+1);
    polar_enc_core #(.N(M)) u_psg (.u(u[base +: M]), .x(ps));
    for (genvar t = 0; t < M; t++) begin : g_pe
      assign lv[OOFF+t] = sel ? pe_g(lv[IOFF+t], lv[IOFF+t+M], ps[t])
                              : pe_f(lv[IOFF+t], lv[IOFF+t+M]);
    end
  end

  // last PE: two decisions per clock
  always_comb begin
    llr_t a, b;
    a  = lv[2*N-4];
    b  = lv[2*N-3];
    d0 = FROZEN[i0]        ? 1'b0 : pe_f(a, b) < 0;
    d1 = FROZEN[i1] ? 1'b0 : pe_g(a, b, d0) < 0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch   <= '0;
      u    <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        u[i0]        <= d0;
        u[i1] <= d1;
        step         <= step + 1'b1;
        if (&step) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        ch   <= llr;
        u    <= '0;
        step <= '0;
        busy <= 1'b1;
      end
    end
  end
endmodule
