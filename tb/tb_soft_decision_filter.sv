// tb_soft_decision_filter: feeds ADC samples and checks region and 9-bit
// LLR one clock later against a real-valued model of the threshold
// equations (Vt = (P+ + P-)/2, Vt+k = Vt + k(P+ - Vt)/4) and the mapping
// table scaled by 128, with the running peaks of all earlier samples.
// Exercises peak_clear, idle cycles and samples exactly on thresholds.
module tb_soft_decision_filter;
  logic clk = 0, rst_n = 0, peak_clear = 0, adc_valid = 0, adc_sof = 0;
  logic [7:0] adc_data = 0;
  logic llr_valid, llr_sof;
  logic signed [8:0] llr9;
  logic [2:0] region;
  int checks = 0, failures = 0;
  real tbl [8] = '{1.2017, 0.3630, 0.2185, 0.0656, -0.0702, -0.2116, -0.3547, -1.1943};
  int pmax, pmin;
  bit have = 0;

  soft_decision_filter dut (.clk, .rst_n, .peak_clear, .adc_valid, .adc_sof, .adc_data,
                            .llr_valid, .llr_sof, .llr9, .region);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_region(int s);
    real vt, d;
    int r = 0;
    if (!have) return 0;
    vt = (pmax + pmin) / 2.0;
    d  = (pmax - vt) / 4.0;
    for (int k = 3; k >= -3; k--) if (real'(s) < vt + k * d) r++;
    return r;
  endfunction

  task automatic sample(int s, bit sof);
    int er, el;
    @(negedge clk);
    adc_valid = 1; adc_data = 8'(s); adc_sof = sof;
    er = ref_region(s);
    el = $rtoi(tbl[er] * 128.0 + (tbl[er] > 0 ? 0.5 : -0.5));
    if (!have) begin pmax = s; pmin = s; have = 1; end
    else begin if (s > pmax) pmax = s; if (s < pmin) pmin = s; end
    @(negedge clk);
    adc_valid = 0; adc_sof = 0;
    checks++;
    if (!llr_valid || region !== 3'(er) || llr9 !== 9'(el) || llr_sof !== sof) begin
      failures++;
      if (failures < 8) $display("s=%0d peaks %0d/%0d: region %0d llr %0d, expected %0d %0d", s, pmin, pmax, region, llr9, er, el);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    sample(200, 1);
    sample(40, 0);
    // every value on and between thresholds (P+ = 200, P- = 40, step 20)
    for (int s = 0; s <= 255; s++) sample(s % 201 < 40 ? 40 + s % 7 : s % 201, 0);
    for (int i = 0; i < 300; i++) sample($urandom_range(0, 255), i == 5);
    @(negedge clk) peak_clear = 1;
    @(negedge clk) peak_clear = 0; have = 0;
    sample(120, 0);
    sample(130, 0);
    for (int i = 0; i < 100; i++) sample($urandom_range(100, 150), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
