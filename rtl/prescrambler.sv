// prescrambler: additive (synchronous) scrambler placed before the polar
// encoder so that frames with a skewed share of ones and zeros reach the
// encoder with a balanced bit distribution (non-RLL flicker mitigation).
//
// A 4-stage Fibonacci LFSR with generating polynomial P(x) = x^4 + x^3 + 1
// (from the document) produces the cipher bit c = s[3] ^ s[2], which is also
// the feedback; each valid input bit leaves as out_bit = in_bit ^ c
// (combinational) and the LFSR steps. After FRAME_BITS valid bits the LFSR is
// reloaded with SEED so that every frame uses the same cipher sequence and
// the receiver can descramble frame by frame. The seed value is a design
// choice (not given in the document). Synchronous active-low reset.
module prescrambler #(
  parameter logic [3:0] SEED       = vlc_pkg::SCR_SEED_DEFAULT,
  parameter int         FRAME_BITS = vlc_pkg::FRAME_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_bit
);
  localparam int CW = $clog2(FRAME_BITS + 1);
  logic [3:0]    s;
  logic [CW-1:0] cnt;
  logic          c;

  assign c       = s[3] ^ s[2];
  assign out_bit = in_bit ^ c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s   <= SEED;
      cnt <= '0;
    end else if (in_valid) begin
      if (cnt == CW'(FRAME_BITS - 1)) begin
        s   <= SEED;
        cnt <= '0;
      end else begin
        s   <= {s[2:0], c};
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
