// message_memory: 2-port on-chip message memory of the centralized beacon
// transmitter, one MSG_W-bit message per front-end (100 x 128 bits = 1600
// bytes by default, as in the document). Port A belongs to the host
// processor (write and read-back), port B to the Address Pointer (read).
// Both reads are registered: data appears the clock after the address.
// No reset: the contents are whatever the host writes (entries read before
// being written are undefined). Written as an array so it maps to block RAM.
module message_memory #(
  parameter int DEPTH  = vlc_pkg::CT_N_FE,
  parameter int MSG_W  = vlc_pkg::CT_MSG_W,
  parameter int ADDR_W = vlc_pkg::CT_ADDR_W
) (
  input  logic              clk,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [MSG_W-1:0]  a_wdata,
  output logic [MSG_W-1:0]  a_rdata,
  input  logic              b_re,
  input  logic [ADDR_W-1:0] b_addr,
  output logic [MSG_W-1:0]  b_rdata
);
  logic [MSG_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && int'(a_addr) < DEPTH) mem[a_addr] <= a_wdata;
    if (int'(a_addr) < DEPTH) a_rdata <= mem[a_addr];
    if (b_re && int'(b_addr) < DEPTH) b_rdata <= mem[b_addr];
  end
endmodule
