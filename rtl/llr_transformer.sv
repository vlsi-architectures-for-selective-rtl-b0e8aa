// llr_transformer: the receiver's "Transformer". Quantizes each 9-bit LLR
// to LLR_W bits (arithmetic shift right by SHIFT, then saturation to
// +-(2^(LLR_W-1)-1)) and buffers the N LLRs of a frame, presenting them in
// parallel to the polar decoder. The document names the block and its job;
// the quantization rule and widths are this design's choices.
// A frame starts with in_sof (its LLR goes to entry 0); LLRs arriving
// outside a frame are ignored. frame_valid pulses in the clock after the
// N-th LLR is written; the buffer then holds until the next frame
// overwrites it entry by entry. Synchronous active-low reset.
module llr_transformer #(
  parameter int N     = 256,
  parameter int LLR_W = 5,
  parameter int SHIFT = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_sof,
  input  logic signed [8:0]             llr9,
  output logic                          frame_valid,
  output logic [N-1:0][LLR_W-1:0]       llr
);
  localparam int CW = $clog2(N);
  localparam int QMAX = (1 << (LLR_W - 1)) - 1;

  logic [CW-1:0]           cnt;
  logic                    active;
  logic signed [LLR_W-1:0] q;

  always_comb begin
    int v;
    v = int'(llr9) >>> SHIFT;
    if (v > QMAX)       v = QMAX;
    else if (v < -QMAX) v = -QMAX;
    q = LLR_W'(v);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt         <= '0;
      active      <= 1'b0;
      frame_valid <= 1'b0;
      llr         <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (in_valid && (in_sof || active)) begin
        llr[in_sof ? '0 : cnt] <= q;
        if (in_sof) begin
          cnt    <= CW'(1);
          active <= 1'b1;
        end else if (cnt == CW'(N - 1)) begin
          cnt         <= '0;
          active      <= 1'b0;
          frame_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
