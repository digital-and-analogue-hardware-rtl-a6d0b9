// emi_detector_top: FPGA logic of the digital on-board EMI detector.
//
// The detector guards a wired link made of two lines that carry the same
// data, line A true and line B inverted. In a quiet channel the two
// received voltages add up to a constant and differ by the data swing;
// electromagnetic interference coupling into the lines shows up as a change
// of the sum (common-mode part) or of the magnitude of the difference
// (differential part). A dual-channel ADC samples both received line
// voltages three times per data bit; the FPGA adds and subtracts the
// samples, removes the DC level, rectifies, compares with thresholds, and
// raises a warning for every data bit during which either path exceeded
// its threshold. A frame of data with a warning is sent again. The FPGA
// also checks the received bits, counts bits, bit errors and the four
// result classes, and records the processed samples.
//
//   emi_line_tx        data on line A / inverse on line B, framing, resend
//   emi_adc_capture    ADC input registers, offset binary -> signed
//   emi_sp             adder and subtractor paths with DC blocker,
//                      rectifiers and comparators
//   emi_warn_select    internal flags or those of an external analogue
//                      detector (synchronised and aligned)
//   emi_warn_unit      per-bit warning window, frame verdict
//   emi_rx_check       received-bit check
//   emi_perf_counters  bits, errors, DTP+CTP, DFP+CFP, CTN, CFN, resends
//   emi_recorder       circular buffer of samples and comparator flags
//
// Clocking: one clock, the ADC sample clock (three times the bit rate by
// default); every block is synchronous to it, reset is synchronous and
// active low. ADC_LATENCY is the number of clock cycles between a line
// change at line_a_tx/line_b_tx and the matching codes at adc_data /
// adc_inv_data (converter pipeline plus board); the warning windows are
// aligned by it. EXT_LATENCY is the same for an external analogue
// detector: clock cycles from a line change at line_a_tx to the matching
// change of ext_warn_sum / ext_warn_diff. With warn_src_ext high those
// external comparator outputs replace the internal flags for the warnings,
// retransmission, counters and recorder (the measurement arrangement in
// which an FPGA classifies the bits by the analogue detector's warnings).
//
// adc_sample is held high: the ADC converts on every clock edge, and the
// capture register takes every sample.
//
// Following the document: the line pair with inverted data, the 6-bit
// dual-channel ADC at three samples per bit, the two processing paths and
// their order of operations, the threshold comparators, warnings,
// retransmission, recording, the result classes, and the use of an
// analogue detector's warnings. This design's own choices: framing and
// gap, PRBS-7 data, widths, pipeline, subtractor gain of 2, the DC blocker
// as subtraction of a set level, the recorder's contents and depth, and
// the synchronised, aligned input for the external warnings.
module emi_detector_top
  import emi_pkg::*;
#(
  parameter int ADC_BITS        = 6,
  parameter int SAMPLES_PER_BIT = 3,
  parameter int FRAME_BITS      = 8,
  parameter int GAP_BITS        = 6,
  parameter int SUB_GAIN        = 2,
  parameter int ADC_LATENCY     = 0,
  parameter int RX_SAMPLE_PHASE = 2,
  parameter int EXT_LATENCY     = 0,
  parameter int REC_DEPTH       = 1024,
  parameter int SUM_W           = ADC_BITS + 1,
  parameter int SMAG_W          = ADC_BITS + 2,
  parameter int DMAG_W          = ADC_BITS + $clog2(SUB_GAIN + 1),
  parameter int REC_W           = 2 * ADC_BITS + 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // transmitter
  input  logic                         run,
  output logic                         line_a_tx,
  output logic                         line_b_tx,
  // receiver
  input  logic                         line_a_rx,
  input  logic                         line_b_rx,
  // ADC
  output logic                         adc_sample,
  input  logic [ADC_BITS-1:0]          adc_data,
  input  logic [ADC_BITS-1:0]          adc_inv_data,
  // detector settings
  input  logic signed [SUM_W-1:0]      dc_sum,
  input  logic        [DMAG_W-1:0]     dc_diff,
  input  logic        [SMAG_W-1:0]     thr_sum,
  input  logic        [DMAG_W-1:0]     thr_diff,
  // external (analogue) detector
  input  logic                         warn_src_ext,
  input  logic                         ext_warn_sum,
  input  logic                         ext_warn_diff,
  // warnings
  output logic                         warn_sum,   // flags in use, per sample
  output logic                         warn_diff,
  output logic                         warning,
  output logic                         bit_error,
  output logic [SMAG_W-1:0]            mag_sum,   // rectified adder path
  output logic [DMAG_W-1:0]            mag_diff,  // rectified subtractor path
  // counters
  input  logic                         cnt_clear,
  output counters_t                    counters,
  // recorder
  input  logic                         rec_en,
  input  logic [$clog2(REC_DEPTH)-1:0] rec_rd_addr,
  output logic [REC_W-1:0]             rec_rd_data,
  output logic [$clog2(REC_DEPTH)-1:0] rec_wr_ptr,
  output logic                         rec_wrapped
);

  // Capture register (1) plus processing pipeline (5).
  localparam int WARN_DELAY = ADC_LATENCY + 1 + 5;
  // External flags: two synchroniser flops plus padding to the same delay.
  localparam int EXT_SYNC  = 2;
  localparam int EXT_ALIGN = WARN_DELAY - EXT_SYNC - EXT_LATENCY;

  // The frame verdict must be able to arrive within the gap (otherwise the
  // transmitter still works, but stretches the gap).
  if (GAP_BITS * SAMPLES_PER_BIT < SAMPLES_PER_BIT + WARN_DELAY + 3) begin : g_gap_check
    $info("GAP_BITS is shorter than the verdict latency; gaps will be stretched");
  end
  if (RX_SAMPLE_PHASE < 1 || RX_SAMPLE_PHASE >= SAMPLES_PER_BIT) begin : g_phase_check
    $error("RX_SAMPLE_PHASE must lie in 1 .. SAMPLES_PER_BIT-1");
  end
  if (EXT_ALIGN < 0) begin : g_ext_check
    $error("EXT_LATENCY must not exceed ADC_LATENCY + 4");
  end

  logic [$clog2(SAMPLES_PER_BIT)-1:0] phase;
  bit_desc_t desc;
  logic      retx_pulse, verdict_valid, verdict_retx;

  emi_line_tx #(
    .SAMPLES_PER_BIT(SAMPLES_PER_BIT), .FRAME_BITS(FRAME_BITS), .GAP_BITS(GAP_BITS)
  ) u_tx (
    .clk, .rst_n, .run,
    .verdict_valid, .verdict_retx,
    .line_a(line_a_tx), .line_b(line_b_tx),
    .phase, .desc, .retx_pulse
  );

  logic                       cap_valid;
  logic signed [ADC_BITS-1:0] cap_a, cap_b;

  emi_adc_capture #(.ADC_BITS(ADC_BITS)) u_cap (
    .clk, .rst_n, .en(1'b1),
    .adc_data, .adc_inv_data,
    .adc_sample, .sample_valid(cap_valid),
    .sample_a(cap_a), .sample_b(cap_b)
  );

  logic                       sp_valid;
  logic signed [ADC_BITS-1:0] sp_a, sp_b;
  logic                       sp_warn_sum, sp_warn_diff;

  emi_sp #(
    .ADC_BITS(ADC_BITS), .SUB_GAIN(SUB_GAIN),
    .SUM_W(SUM_W), .SMAG_W(SMAG_W), .DMAG_W(DMAG_W)
  ) u_sp (
    .clk, .rst_n,
    .in_valid(cap_valid), .in_a(cap_a), .in_b(cap_b),
    .dc_sum, .dc_diff, .thr_sum, .thr_diff,
    .out_valid(sp_valid), .out_a(sp_a), .out_b(sp_b),
    .mag_sum, .mag_diff,
    .warn_sum(sp_warn_sum), .warn_diff(sp_warn_diff)
  );

  emi_warn_select #(.SYNC_STAGES(EXT_SYNC), .ALIGN(EXT_ALIGN)) u_sel (
    .clk, .rst_n,
    .use_ext(warn_src_ext),
    .ext_warn_sum, .ext_warn_diff,
    .int_warn_sum(sp_warn_sum), .int_warn_diff(sp_warn_diff),
    .warn_sum, .warn_diff
  );

  warn_res_t warn_res;

  emi_warn_unit #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT), .DELAY(WARN_DELAY)) u_warn (
    .clk, .rst_n, .phase, .desc,
    .s_warn_sum(warn_sum), .s_warn_diff(warn_diff),
    .res(warn_res), .warning,
    .verdict_valid, .verdict_retx
  );

  rx_res_t rx_res;

  emi_rx_check #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT), .SAMPLE_PHASE(RX_SAMPLE_PHASE)) u_rx (
    .clk, .rst_n, .phase, .desc,
    .line_a_rx, .line_b_rx,
    .res(rx_res)
  );

  assign bit_error = rx_res.valid & rx_res.err;

  emi_perf_counters u_cnt (
    .clk, .rst_n, .clear(cnt_clear),
    .rx_res, .warn_res, .retx_pulse,
    .cnt(counters)
  );

  emi_recorder #(.REC_DEPTH(REC_DEPTH), .W(REC_W)) u_rec (
    .clk, .rst_n, .rec_en,
    .wr_valid(sp_valid),
    .wr_data({warn_sum, warn_diff, sp_a, sp_b}),
    .rd_addr(rec_rd_addr), .rd_data(rec_rd_data),
    .wr_ptr(rec_wr_ptr), .wrapped(rec_wrapped)
  );

endmodule
