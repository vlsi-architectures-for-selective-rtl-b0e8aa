// tb_fe_demux_regs: random DE-MUX writes to 100 front-end registers against
// a model; checks contents and toggle flags of every front-end after each
// write, and that out-of-range addresses change nothing.
module tb_fe_demux_regs;
  localparam int NF = 100, W = 512;
  logic clk = 0, rst_n = 0, we = 0;
  logic [6:0] addr = 0;
  logic [W-1:0] cw = 0;
  logic [NF-1:0][W-1:0] fe_reg, m_reg;
  logic [NF-1:0] fe_tgl, m_tgl;
  int checks = 0, failures = 0;

  fe_demux_regs #(.N_FE(NF), .CW_W(W)) dut (.clk, .rst_n, .we, .addr, .cw, .fe_reg, .fe_tgl);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_reg = '0; m_tgl = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      we = ($urandom_range(0, 3) != 0);
      addr = (t % 50 == 7) ? 7'(100 + t % 28) : 7'($urandom_range(0, NF-1));
      for (int w = 0; w < W/32; w++) cw[w*32 +: 32] = $urandom;
      @(negedge clk);
      if (we && addr < NF) begin m_reg[addr] = cw; m_tgl[addr] = ~m_tgl[addr]; end
      we = 0;
      checks++;
      if (fe_reg !== m_reg || fe_tgl !== m_tgl) begin failures++; if (failures < 5) $display("t=%0d mismatch", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
