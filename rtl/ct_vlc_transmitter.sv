// ct_vlc_transmitter: the encoder of the centralized transmitter. A K-bit
// message (128 bits) goes through three registered stages: frozen-bit
// insertion into the N=256 polar input vector, polar encoding with the
// recursive combinational encoder, and RLL encoding:
//   Manchester (RLL = RLL_MANCHESTER): bit 1 -> chips 1,0; bit 0 -> 0,1;
//     cw[2i] = x[i], cw[2i+1] = ~x[i]  (512 bits)
//   4B6B (RLL = RLL_4B6B): cw[6j +: 6] = enc4b6b(x[4j +: 4])  (384 bits)
// cw bit 0 is transmitted first. These mappings follow the document's
// transmitter algorithm; the 4B6B table is the IEEE 802.15.7 one. done
// pulses in the third clock after start (cw valid until the next start);
// busy is high meanwhile and a start while busy is ignored. Synchronous
// active-low reset.
module ct_vlc_transmitter #(
  parameter int            N    = 256,
  parameter int            K    = vlc_pkg::CT_MSG_W,
  parameter vlc_pkg::rll_e RLL  = vlc_pkg::RLL_MANCHESTER,
  parameter int            CW_W = vlc_pkg::rll_width(RLL, N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [K-1:0]    msg,
  output logic            busy,
  output logic            done,
  output logic [CW_W-1:0] cw
);
  logic [N-1:0]    u, x, x_r;
  logic [CW_W-1:0] rll;
  logic [2:0]      v;   // stage valid bits
  logic            go;

  assign go   = start && !busy;
  assign busy = |v;

  frozen_inserter #(.N(N), .K(K)) u_fz (.clk, .rst_n, .load(go), .info(msg), .u);
  polar_enc_core  #(.N(N))        u_enc (.u, .x);

  always_comb begin
    rll = '0;
    if (RLL == vlc_pkg::RLL_MANCHESTER) begin
      for (int i = 0; i < N; i++) begin
        rll[2*i]   = x_r[i];
        rll[2*i+1] = ~x_r[i];
      end
    end else begin
      for (int j = 0; j < N/4; j++) rll[6*j +: 6] = vlc_pkg::enc4b6b(x_r[4*j +: 4]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v    <= '0;
      x_r  <= '0;
      cw   <= '0;
      done <= 1'b0;
    end else begin
      v    <= {v[1:0], go};
      done <= v[1];
      if (v[0]) x_r <= x;
      if (v[1]) cw  <= rll;
    end
  end
endmodule
