// tb_piso_loop_sr: 4 front-ends with 16-bit frames. Loads messages through
// the toggle flags (from an unrelated clock), and checks every output bit
// against a model: output 0 before the first message, each message repeated
// bit 0 first, and a new message taken only at a frame boundary.
module tb_piso_loop_sr;
  localparam int NF = 4, W = 16;
  logic sr_clk = 0, clk = 0, sr_rst_n = 0;
  logic [NF-1:0][W-1:0] fe_reg = '0;
  logic [NF-1:0] fe_tgl = '0, fe_out, fe_active;
  int checks = 0, failures = 0, reloads = 0;
  int pos = 0;
  logic [W-1:0] cur [NF], pend [NF];
  bit act [NF], has_pend [NF];
  int wait_sync [NF];

  piso_loop_sr #(.N_FE(NF), .CW_W(W)) dut (.sr_clk, .sr_rst_n, .fe_reg, .fe_tgl, .fe_out, .fe_active);
  always #7 sr_clk = ~sr_clk;
  always #3 clk = ~clk;
  initial begin
    repeat (20000) @(posedge sr_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model in the sr_clk domain: check the output, then advance
  always @(posedge sr_clk) if (sr_rst_n) begin
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (fe_out[f] !== (act[f] ? cur[f][pos] : 1'b0)) begin
        failures++; if (failures < 6) $display("fe %0d pos %0d: got %b", f, pos, fe_out[f]);
      end
    end
    for (int f = 0; f < NF; f++) if (wait_sync[f] > 0) wait_sync[f]--;
    if (pos == W-1) begin
      for (int f = 0; f < NF; f++)
        if (has_pend[f] && wait_sync[f] == 0) begin
          cur[f] = pend[f]; act[f] = 1; has_pend[f] = 0; reloads++;
        end
      pos = 0;
    end else pos++;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin act[f] = 0; has_pend[f] = 0; wait_sync[f] = 0; end
    repeat (3) @(posedge sr_clk);
    @(negedge sr_clk) sr_rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int f = $urandom_range(0, NF-1);
      repeat ($urandom_range(5, 40)) @(posedge sr_clk);
      // only write when the model can tell the sync delay unambiguously
      if (pos >= 2 && pos <= W-4 && !has_pend[f]) begin
        @(negedge sr_clk);
        fe_reg[f] = 16'($urandom); pend[f] = fe_reg[f]; fe_tgl[f] = ~fe_tgl[f];
        has_pend[f] = 1; wait_sync[f] = 2;
      end
    end
    repeat (3*W) @(posedge sr_clk);
    checks++; if (reloads < 10) begin failures++; $display("only %0d reloads", reloads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
