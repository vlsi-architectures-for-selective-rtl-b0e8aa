// address_pointer: fetches the next message to encode in the centralized
// transmitter. When the FIFO holds a request and the VLC transmitter path is
// free (tx_busy low and no message handed over last cycle), it pops the
// request, reads the message at the request's address from port B of the
// message memory and, one clock after the memory returns it, presents
// message and front-end address with a one-cycle msg_valid pulse.
// Requests that are not writes or address no front-end (addr >= N_FE) are
// popped and dropped. Sequence: pop (IDLE), read (READ), capture (DATA):
// msg_valid is high 3 clocks after the pop decision. The document gives the
// function; the sequencing is a design choice. Synchronous active-low reset.
// Only the write flag and address of a request are used: the message is
// read from the memory, so the request's message bits are left unused.
module address_pointer #(
  parameter int N_FE = vlc_pkg::CT_N_FE
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             fifo_empty,
  input  vlc_pkg::ct_req_t                 fifo_data,
  output logic                             fifo_rd,
  input  logic                             tx_busy,
  output logic                             mem_read,
  output logic [vlc_pkg::CT_ADDR_W-1:0]    mem_addr,
  input  logic [vlc_pkg::CT_MSG_W-1:0]     mem_data,
  output logic                             msg_valid,
  output logic [vlc_pkg::CT_MSG_W-1:0]     msg,
  output logic [vlc_pkg::CT_ADDR_W-1:0]    msg_addr
);
  typedef enum logic [1:0] {IDLE, READ, DATA} state_e;
  state_e state;
  logic   take;

  assign take     = (state == IDLE) && !fifo_empty && !tx_busy && !msg_valid;
  assign fifo_rd  = take;
  assign mem_read = (state == READ);
  assign mem_addr = msg_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      msg_valid <= 1'b0;
      msg       <= '0;
      msg_addr  <= '0;
    end else begin
      msg_valid <= 1'b0;
      case (state)
        IDLE: if (take) begin
          msg_addr <= fifo_data.addr;
          if (fifo_data.we && int'(fifo_data.addr) < N_FE) state <= READ;
        end
        READ: state <= DATA;
        DATA: begin
          msg       <= mem_data;
          msg_valid <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
