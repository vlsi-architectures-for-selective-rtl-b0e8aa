// ct_controller: sequencer of the centralized transmitter. On msg_valid
// from the Address Pointer it starts the VLC transmitter (tx_start in the
// same cycle) and keeps the front-end address; when the transmitter reports
// done it drives the DE-MUX write (dm_we, dm_addr) in that cycle and
// returns to idle. busy is high from the cycle after msg_valid until the
// DE-MUX write, so the Address Pointer fetches the next request only then.
// Synchronous active-low reset.
module ct_controller (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          msg_valid,
  input  logic [vlc_pkg::CT_ADDR_W-1:0] msg_addr,
  output logic                          tx_start,
  input  logic                          tx_done,
  output logic                          dm_we,
  output logic [vlc_pkg::CT_ADDR_W-1:0] dm_addr,
  output logic                          busy
);
  typedef enum logic {IDLE, ENCODE} state_e;
  state_e state;

  assign tx_start = (state == IDLE) && msg_valid;
  assign dm_we    = (state == ENCODE) && tx_done;
  assign busy     = (state == ENCODE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      dm_addr <= '0;
    end else begin
      case (state)
        IDLE:   if (msg_valid) begin
                  dm_addr <= msg_addr;
                  state   <= ENCODE;
                end
        ENCODE: if (tx_done) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) msg_valid |-> state == IDLE)
    else $error("ct_controller: message offered while encoding");
endmodule
