// soft_decision_filter: 3-bit soft-decision filter of the VLC receiver. It
// turns ADC samples of the received light into 9-bit log-likelihood ratios
// for the soft-decoding polar decoder without estimating channel means or
// variances.
//
// Peak tracking: Vpeak+ / Vpeak- are the largest and smallest samples seen
// since peak_clear (or reset); a sample is judged against the peaks from the
// samples before it (with no earlier sample every threshold equals the
// sample itself, giving region 0). How the peaks are obtained is this design's choice.
// Thresholds (from the document): Vt = (Vpeak+ + Vpeak-)/2 and
// Vt+k = Vt + k*(Vpeak+ - Vt)/4 for k = -3..3. To stay exact in integers
// the comparison is 8*s against 4*(P+ + P-) + k*(P+ - P-).
// Region r (0..7) is the number of thresholds above the sample; a sample
// equal to a threshold belongs to the region above. The mapping table gives
// the document's LLRs 1.2017, 0.3630, 0.2185, 0.0656, -0.0702, -0.2116,
// -0.3547, -1.1943 scaled by 128 and rounded (positive = bit 0, as the
// table assigns to samples near Vpeak+).
// Timing: llr_valid/llr9/region/llr_sof are registered, one clock after
// adc_valid/adc_sof. Synchronous active-low reset.
module soft_decision_filter #(
  parameter int ADC_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              peak_clear,
  input  logic              adc_valid,
  input  logic              adc_sof,
  input  logic [ADC_W-1:0]  adc_data,
  output logic              llr_valid,
  output logic              llr_sof,
  output logic signed [8:0] llr9,
  output logic [2:0]        region
);
  localparam logic signed [8:0] LUT [8] = '{9'sd154, 9'sd46, 9'sd28, 9'sd8,
                                           -9'sd9, -9'sd27, -9'sd45, -9'sd153};

  logic [ADC_W-1:0] pmax, pmin;
  logic             have;
  logic [2:0]       r;

  always_comb begin
    int s8, sum4, span, cnt, hi, lo;
    hi   = have ? int'(pmax) : int'(adc_data);
    lo   = have ? int'(pmin) : int'(adc_data);
    s8   = 8 * int'(adc_data);
    sum4 = 4 * (hi + lo);
    span = hi - lo;
    cnt  = 0;
    for (int k = -3; k <= 3; k++)
      if (s8 < sum4 + k * span) cnt++;
    r = 3'(cnt);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pmax      <= '0;
      pmin      <= '0;
      have      <= 1'b0;
      llr_valid <= 1'b0;
      llr_sof   <= 1'b0;
      llr9      <= '0;
      region    <= '0;
    end else begin
      llr_valid <= adc_valid;
      llr_sof   <= adc_valid && adc_sof;
      if (adc_valid) begin
        llr9   <= LUT[r];
        region <= r;
      end
      if (peak_clear) begin
        have <= 1'b0;
      end else if (adc_valid) begin
        have <= 1'b1;
        if (!have || adc_data > pmax) pmax <= adc_data;
        if (!have || adc_data < pmin) pmin <= adc_data;
      end
    end
  end
endmodule
