// descrambler: receiver counterpart of the prescrambler. XORs each decoded
// information bit with the same x^4 + x^3 + 1 LFSR sequence (cipher bit
// s[3] ^ s[2], seed SEED, reloaded after every FRAME_BITS bits) and registers
// the result: out_valid/out_bit follow in_valid/in_bit by one clock.
// Polynomial from the document; seed and the output register are design
// choices. Synchronous active-low reset.
module descrambler #(
  parameter logic [3:0] SEED       = vlc_pkg::SCR_SEED_DEFAULT,
  parameter int         FRAME_BITS = vlc_pkg::FRAME_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  localparam int CW = $clog2(FRAME_BITS + 1);
  logic [3:0]    s;
  logic [CW-1:0] cnt;
  logic          c;

  assign c = s[3] ^ s[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s         <= SEED;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bit <= in_bit ^ c;
        if (cnt == CW'(FRAME_BITS - 1)) begin
          s   <= SEED;
          cnt <= '0;
        end else begin
          s   <= {s[2:0], c};
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
