// request_fifo: FIFO of write requests in the centralized transmitter. Every
// host write to the message memory is also pushed here (write flag,
// front-end address, message: 136 bits), so only front-ends whose message
// changed are re-encoded. Show-ahead: rd_data is the oldest entry whenever
// !empty; rd_en pops it. Push and pop in the same cycle are allowed, also
// when full; a push into a full FIFO without a pop is dropped and raises
// the sticky 'overflow' flag. The
// depth is a design choice (not given in the document). Synchronous
// active-low reset.
module request_fifo #(
  parameter int W     = $bits(vlc_pkg::ct_req_t),
  parameter int DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          push, pop;

  assign full    = (cnt == (AW+1)'(DEPTH));
  assign empty   = (cnt == '0);
  assign push    = wr_en && (!full || rd_en);
  assign pop     = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
      if (wr_en && !push) overflow <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("request_fifo: pop while empty");
endmodule
