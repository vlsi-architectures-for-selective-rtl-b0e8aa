// piso_loop_sr: loop parallel-in serial-out shift registers, one per
// front-end, in the front-end clock domain (sr_clk). Each register rotates
// its encoded message out on fe_out, bit 0 first, and repeats it for as long
// as no new message arrives. A front-end's new-message toggle (from the
// sys_clk domain) passes a two-flop synchronizer; every edge of the
// synchronized toggle sets a pending flag (so two updates inside one frame
// are not lost), and the newest message is taken from the buffering
// register at the end of the current repetition, so a frame is never cut. The buffer must stay stable for 3 sr_clk cycles after
// its toggle flips (the controller writes a front-end at most once per
// request, so this holds whenever sr_clk is slower than the request rate).
// All front-ends share one bit counter and are frame aligned; a front-end
// outputs 0 until its first message. Loop repetition follows the document;
// the boundary loading and synchronizer are design choices. Synchronous
// active-low reset in the sr_clk domain.
module piso_loop_sr #(
  parameter int N_FE = vlc_pkg::CT_N_FE,
  parameter int CW_W = 512
) (
  input  logic                      sr_clk,
  input  logic                      sr_rst_n,
  input  logic [N_FE-1:0][CW_W-1:0] fe_reg,
  input  logic [N_FE-1:0]           fe_tgl,
  output logic [N_FE-1:0]           fe_out,
  output logic [N_FE-1:0]           fe_active
);
  localparam int BW = $clog2(CW_W);
  logic [BW-1:0]           bitcnt;
  logic                    wrap;
  logic [N_FE-1:0]         s1, s2, s3, pend;
  logic [N_FE-1:0][CW_W-1:0] sr;

  assign wrap = (bitcnt == BW'(CW_W - 1));

  always_ff @(posedge sr_clk) begin
    if (!sr_rst_n) begin
      bitcnt    <= '0;
      s1        <= '0;
      s2        <= '0;
      s3        <= '0;
      pend      <= '0;
      for (int f = 0; f < N_FE; f++) sr[f] <= '0;
      fe_active <= '0;
    end else begin
      bitcnt <= wrap ? '0 : bitcnt + 1'b1;
      s1     <= fe_tgl;
      s2     <= s1;
      s3     <= s2;
      for (int f = 0; f < N_FE; f++) begin
        if (wrap && (pend[f] || (s2[f] != s3[f]))) begin
          sr[f]        <= fe_reg[f];
          pend[f]      <= 1'b0;
          fe_active[f] <= 1'b1;
        end else begin
          sr[f] <= {sr[f][0], sr[f][CW_W-1:1]};
          if (s2[f] != s3[f]) pend[f] <= 1'b1;
        end
      end
    end
  end

  for (genvar f = 0; f < N_FE; f++) begin : g_out
    assign fe_out[f] = fe_active[f] & sr[f][0];
  end
endmodule
