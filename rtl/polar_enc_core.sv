// polar_enc_core: combinational non-systematic polar encoder x = u * F^(x)n,
// F = [[1,0],[1,1]], natural index order (no bit reversal).
//
// Recursive structure as in the document: an N-bit encoder is two N/2-bit
// encoders followed by N/2 XOR gates,
//   x[0 +: N/2]   = enc(u[0 +: N/2]) ^ enc(u[N/2 +: N/2])
//   x[N/2 +: N/2] = enc(u[N/2 +: N/2]),
// ending in a wire for N = 1. Equivalently x[j] is the XOR of all u[i] whose
// index i has every bit of j set. No clock: the surrounding block registers
// the input and/or output. N must be a power of two.
// Linting this module on its own as a top reports lo/hi of g_node as not
// driven. They are driven by the two sub-encoder instances; the report
// comes from the recursive self-instantiation and stands. The exhaustive
// and random comparison against the generator matrix in the testbench
// shows every output bit is driven.
module polar_enc_core #(
  parameter int N = 256
) (
  input  logic [N-1:0] u,
  output logic [N-1:0] x
);
  if (N == 1) begin : g_leaf
    assign x = u;
  end else begin : g_node
    logic [N/2-1:0] lo, hi;
    polar_enc_core #(.N(N/2)) u_lo (.u(u[0 +: N/2]),   .x(lo));
    polar_enc_core #(.N(N/2)) u_hi (.u(u[N/2 +: N/2]), .x(hi));
    assign x = {hi, lo ^ hi};
  end
endmodule
