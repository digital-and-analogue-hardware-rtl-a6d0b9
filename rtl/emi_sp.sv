// emi_sp: signal processing of the EMI detector (adder and subtractor paths).
//
// Line A carries the data and line B its inverse, so without interference
// A + B is a constant (twice the common-mode level) and |A - B| is the
// constant data swing. Interference that couples into both lines alike
// moves the sum; interference that differs between the lines moves the
// difference. Two paths, one sample per clock:
//
//   adder path:      s = A + B;  s - dc_sum (DC blocker);  |.| (rectifier);
//                    compare with thr_sum
//   subtractor path: d = (A - B) * SUB_GAIN;  |d| (rectifier);
//                    |d| - dc_diff (DC blocker);  |.| (rectifier);
//                    compare with thr_diff
//
// dc_sum is the quiet value of A + B, dc_diff the quiet value of
// |A - B| * SUB_GAIN; both are set from outside, like the external DC
// voltages of an analogue DC blocker. A comparator fires when the rectified
// value is strictly greater than its threshold.
//
// Timing: five register stages, one per operation, the adder path padded to
// the subtractor path's length. warn_sum/warn_diff/mag_* and the delayed
// input samples out_a/out_b all belong to the input sample of LATENCY
// cycles earlier.
//
// The operations and their order follow the document's block diagram; the
// widths, the gain value, the pipelining and the DC blocker as subtraction
// of a set level are this design's choices.
module emi_sp #(
  parameter int ADC_BITS = 6,
  parameter int SUB_GAIN = 2,
  // Width of the signed sum and of dc_sum.
  parameter int SUM_W    = ADC_BITS + 1,
  // Width of the adder-path magnitude and of thr_sum.
  parameter int SMAG_W   = ADC_BITS + 2,
  // Width of the subtractor-path magnitudes, of dc_diff and of thr_diff.
  parameter int DMAG_W   = ADC_BITS + $clog2(SUB_GAIN + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [ADC_BITS-1:0] in_a,
  input  logic signed [ADC_BITS-1:0] in_b,
  input  logic signed [SUM_W-1:0]    dc_sum,
  input  logic        [DMAG_W-1:0]   dc_diff,
  input  logic        [SMAG_W-1:0]   thr_sum,
  input  logic        [DMAG_W-1:0]   thr_diff,
  output logic                       out_valid,
  output logic signed [ADC_BITS-1:0] out_a,
  output logic signed [ADC_BITS-1:0] out_b,
  output logic        [SMAG_W-1:0]   mag_sum,
  output logic        [DMAG_W-1:0]   mag_diff,
  output logic                       warn_sum,
  output logic                       warn_diff
);

  localparam int LATENCY = 5;

  // Stage 1: adder and subtractor (with gain).
  logic signed [SUM_W-1:0]  s1_sum;
  logic signed [DMAG_W:0]   s1_diff;
  // Stage 2: adder-path DC blocker, subtractor-path first rectifier.
  logic signed [SMAG_W-1:0] s2_sum;
  logic        [DMAG_W-1:0] s2_diff;
  // Stage 3: adder-path rectifier, subtractor-path DC blocker.
  logic        [SMAG_W-1:0] s3_sum;
  logic signed [DMAG_W:0]   s3_diff;
  // Stage 4: adder-path delay, subtractor-path second rectifier.
  logic        [SMAG_W-1:0] s4_sum;
  logic        [DMAG_W-1:0] s4_diff;

  logic [LATENCY-1:0] vld;
  logic signed [ADC_BITS-1:0] da [LATENCY];
  logic signed [ADC_BITS-1:0] db [LATENCY];

  // Gain applied to the line difference, kept at the subtractor's width.
  logic signed [DMAG_W:0] diff_in;
  always_comb diff_in = (DMAG_W+1)'(in_a - in_b) * (DMAG_W+1)'(SUB_GAIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      s1_sum <= '0; s1_diff <= '0;
      s2_sum <= '0; s2_diff <= '0;
      s3_sum <= '0; s3_diff <= '0;
      s4_sum <= '0; s4_diff <= '0;
      warn_sum <= 1'b0; warn_diff <= 1'b0;
      mag_sum <= '0; mag_diff <= '0;
      for (int i = 0; i < LATENCY; i++) begin
        da[i] <= '0;
        db[i] <= '0;
      end
    end else begin
      vld <= {vld[LATENCY-2:0], in_valid};
      da[0] <= in_a;
      db[0] <= in_b;
      for (int i = 1; i < LATENCY; i++) begin
        da[i] <= da[i-1];
        db[i] <= db[i-1];
      end
      s1_sum  <= SUM_W'(in_a) + SUM_W'(in_b);
      s1_diff <= diff_in;
      s2_sum  <= SMAG_W'(s1_sum) - SMAG_W'(dc_sum);
      s2_diff <= DMAG_W'(s1_diff < 0 ? -s1_diff : s1_diff);
      s3_sum  <= SMAG_W'(s2_sum < 0 ? -s2_sum : s2_sum);
      s3_diff <= $signed({1'b0, s2_diff}) - $signed({1'b0, dc_diff});
      s4_sum  <= s3_sum;
      s4_diff <= DMAG_W'(s3_diff < 0 ? -s3_diff : s3_diff);
      mag_sum   <= s4_sum;
      mag_diff  <= s4_diff;
      warn_sum  <= vld[3] && (s4_sum  > thr_sum);
      warn_diff <= vld[3] && (s4_diff > thr_diff);
    end
  end

  assign out_valid = vld[LATENCY-1];
  assign out_a     = da[LATENCY-1];
  assign out_b     = db[LATENCY-1];

endmodule
