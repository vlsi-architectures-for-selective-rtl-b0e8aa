// tb_address_pointer: a request queue and a memory model drive the Address
// Pointer; checks that each valid request produces msg_valid with the
// memory word at its address exactly 3 clocks after the pop, that it waits
// while tx_busy is high, and that non-write or out-of-range requests are
// dropped.
module tb_address_pointer;
  import vlc_pkg::*;
  logic clk = 0, rst_n = 0, fifo_empty, fifo_rd, tx_busy = 0, mem_read, msg_valid;
  ct_req_t fifo_data;
  logic [6:0] mem_addr, msg_addr;
  logic [127:0] mem_data = 0, msg, mem [128];
  ct_req_t q [$];
  int checks = 0, failures = 0, popped = 0, delivered = 0, busy_waits = 0;
  longint cyc = 0, t_pop;

  address_pointer dut (.clk, .rst_n, .fifo_empty, .fifo_data, .fifo_rd, .tx_busy,
                       .mem_read, .mem_addr, .mem_data, .msg_valid, .msg, .msg_addr);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model outputs, refreshed whenever the queue changes
  function automatic void upd();
    fifo_empty = (q.size() == 0);
    fifo_data  = fifo_empty ? '0 : q[0];
  endfunction
  always @(posedge clk) begin
    cyc++;
    if (mem_read) mem_data <= mem[mem_addr];
  end

  initial begin
    upd();
    for (int i = 0; i < 128; i++) mem[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      ct_req_t rq;
      rq.we = (r % 7 != 3); rq.addr = (r % 11 == 5) ? 7'(100 + r % 20) : 7'($urandom_range(0, 99));
      rq.msg = '0;
      q.push_back(rq);
      upd();
      tx_busy = (r % 5 == 0);
      while (q.size() > 0) begin
        @(negedge clk);
        if (tx_busy) begin
          checks++; if (fifo_rd) begin failures++; $display("pop while busy"); end
          busy_waits++;
          tx_busy = 0;
          #1;
        end
        if (fifo_rd) begin
          ct_req_t h;
          h = q[0];
          t_pop = cyc;
          @(posedge clk);
          #1;
          void'(q.pop_front());
          upd();
          if (h.we && h.addr < 100) begin
            while (!msg_valid) @(negedge clk);
            checks++;
            if (msg !== mem[h.addr] || msg_addr !== h.addr || cyc - t_pop != 3) begin
              failures++; $display("req %0d: addr %0d/%0d delay %0d", r, msg_addr, h.addr, cyc - t_pop);
            end
            delivered++;
          end else begin
            repeat (4) begin
              @(negedge clk);
              checks++; if (msg_valid) begin failures++; $display("dropped request delivered"); end
            end
          end
        end
      end
    end
    checks++; if (busy_waits == 0 || delivered < 20) begin failures++; $display("coverage"); end
    $display("delivered %0d, busy waits %0d", delivered, busy_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
