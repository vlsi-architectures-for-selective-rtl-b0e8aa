// centralized_tx: FPGA-style centralized VLC beacon transmitter serving
// N_FE LED front-ends from one encoder instead of one processor per lamp.
//
// The host (a soft processor in the document) writes each front-end's
// 128-bit ID message into port A of the 2-port message memory; each write is
// also queued as a 136-bit request in the request FIFO. The Address Pointer
// takes one request at a time when the encoder is free, reads the message
// from memory port B and hands it to the controller, which starts the VLC
// transmitter ((256,128) polar code + Manchester or 4B6B RLL) and, when it
// is done, has the DE-MUX store the codeword in the addressed front-end's
// buffering register. Loop PISO shift registers in the sr_clk domain repeat
// each front-end's codeword on its OOK output.
// Clocks: clk = sys_clk (50 MHz in the document), sr_clk = front-end bit
// clock (100 kHz); both come from outside (the PLL is not part of this RTL).
// Timing: a host write in cycle 0 reaches the front-end register in cycle
// 8; one request is processed every 7 sys_clk cycles (the document reports
// 14 clock cycles of latency). The front-end sees the message from the end
// of its current repetition, after two sr_clk synchronizer cycles.
// The FIFO's full flag is left unused on purpose: a write into a full FIFO
// is reported by the sticky fifo_overflow output instead.
module centralized_tx #(
  parameter int            N_FE  = vlc_pkg::CT_N_FE,
  parameter vlc_pkg::rll_e RLL   = vlc_pkg::RLL_MANCHESTER,
  parameter int            DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sr_clk,
  input  logic                          sr_rst_n,
  input  logic                          host_we,
  input  logic [vlc_pkg::CT_ADDR_W-1:0] host_addr,
  input  logic [vlc_pkg::CT_MSG_W-1:0]  host_wdata,
  output logic [vlc_pkg::CT_MSG_W-1:0]  host_rdata,
  output logic                          fifo_overflow,
  output logic                          busy,
  output logic [N_FE-1:0]               fe_out,
  output logic [N_FE-1:0]               fe_active
);
  import vlc_pkg::*;
  localparam int N    = 256;
  localparam int CW_W = rll_width(RLL, N);

  ct_req_t                   req_in, req_out;
  logic                      f_full, f_empty, f_rd, mem_read, msg_valid, tx_start, tx_busy, tx_done, dm_we, ctl_busy;
  logic [CT_ADDR_W-1:0]      mem_addr, msg_addr, dm_addr;
  logic [CT_MSG_W-1:0]       mem_data, msg;
  logic [CW_W-1:0]           cw;
  logic [N_FE-1:0][CW_W-1:0] fe_reg;
  logic [N_FE-1:0]           fe_tgl;

  assign req_in = '{we: 1'b1, addr: host_addr, msg: host_wdata};
  assign busy   = ctl_busy || !f_empty;

  message_memory #(.DEPTH(N_FE)) u_mem (
    .clk, .a_we(host_we), .a_addr(host_addr), .a_wdata(host_wdata), .a_rdata(host_rdata),
    .b_re(mem_read), .b_addr(mem_addr), .b_rdata(mem_data));

  request_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(host_we), .wr_data(req_in), .full(f_full),
    .rd_en(f_rd), .rd_data(req_out), .empty(f_empty), .overflow(fifo_overflow));

  address_pointer #(.N_FE(N_FE)) u_ap (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_data(req_out), .fifo_rd(f_rd),
    .tx_busy(ctl_busy || tx_busy), .mem_read, .mem_addr, .mem_data, .msg_valid, .msg, .msg_addr);

  ct_controller u_ctl (
    .clk, .rst_n, .msg_valid, .msg_addr, .tx_start, .tx_done, .dm_we, .dm_addr, .busy(ctl_busy));

  ct_vlc_transmitter #(.N(N), .K(CT_MSG_W), .RLL(RLL)) u_tx (
    .clk, .rst_n, .start(tx_start), .msg, .busy(tx_busy), .done(tx_done), .cw);

  fe_demux_regs #(.N_FE(N_FE), .CW_W(CW_W)) u_dm (
    .clk, .rst_n, .we(dm_we), .addr(dm_addr), .cw, .fe_reg, .fe_tgl);

  piso_loop_sr #(.N_FE(N_FE), .CW_W(CW_W)) u_piso (
    .sr_clk, .sr_rst_n, .fe_reg, .fe_tgl, .fe_out, .fe_active);
endmodule
