// fe_demux_regs: DE-MUX and buffering registers of the centralized
// transmitter (sys_clk domain). A write (we, addr) stores the encoded
// message in front-end addr's register and toggles that front-end's flag,
// which tells the PISO shift registers in the sr_clk domain that a new
// message is waiting. Writes to addresses >= N_FE are ignored. Registers
// update in the clock after we. Synchronous active-low reset.
module fe_demux_regs #(
  parameter int N_FE = vlc_pkg::CT_N_FE,
  parameter int CW_W = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [vlc_pkg::CT_ADDR_W-1:0] addr,
  input  logic [CW_W-1:0]               cw,
  output logic [N_FE-1:0][CW_W-1:0]     fe_reg,
  output logic [N_FE-1:0]               fe_tgl
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FE; f++) fe_reg[f] <= '0;
      fe_tgl <= '0;
    end else if (we && int'(addr) < N_FE) begin
      fe_reg[addr] <= cw;
      fe_tgl[addr] <= ~fe_tgl[addr];
    end
  end
endmodule
