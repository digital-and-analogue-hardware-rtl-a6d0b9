// emi_warn_unit: turns comparator hits into per-bit warnings and frame verdicts.
//
// The two comparators of the signal processing fire per sample. A data bit
// spans SAMPLES_PER_BIT samples; the bit is flagged when either comparator
// fired on any of its samples. Because the samples reach the comparators
// DELAY cycles after the bit was put on the lines (ADC latency, capture
// register, processing pipeline), the transmitter's slot boundary and bit
// descriptor are delayed by DELAY cycles here, so each window covers exactly
// the samples of one slot. At the end of a window the unit reports the bit
// (res), and at the end of a frame's last bit it reports whether any bit of
// the frame was flagged (verdict_valid/verdict_retx), which makes the
// transmitter send the frame again.
//
// Interface: phase/desc come from the transmitter; s_warn_sum/s_warn_diff
// from the signal processing. res is a one-cycle result per data bit,
// emitted at the first cycle of the following (delayed) slot, registered.
// warning mirrors res.valid & (res.warn_sum | res.warn_diff).
//
// That a warning is raised when either path exceeds its threshold, and
// that it triggers a retransmission, is the document's; the per-bit window
// and the frame verdict are this design's choices.
module emi_warn_unit
  import emi_pkg::*;
#(
  parameter int SAMPLES_PER_BIT = 3,
  parameter int DELAY           = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [$clog2(SAMPLES_PER_BIT)-1:0] phase,
  input  bit_desc_t desc,
  input  logic      s_warn_sum,
  input  logic      s_warn_diff,
  output warn_res_t res,
  output logic      warning,
  output logic      verdict_valid,
  output logic      verdict_retx
);

  // Delay line for the slot start and the descriptor.
  logic      d_start [DELAY+1];
  bit_desc_t d_desc  [DELAY+1];
  assign d_start[0] = (phase == '0);
  assign d_desc[0]  = desc;

  for (genvar i = 0; i < DELAY; i++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        d_start[i+1] <= 1'b0;
        d_desc[i+1]  <= '0;
      end else begin
        d_start[i+1] <= d_start[i];
        d_desc[i+1]  <= d_desc[i];
      end
    end
  end

  bit_desc_t cur;          // bit whose window is open
  logic      acc_sum, acc_diff, frame_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur           <= '0;
      acc_sum       <= 1'b0;
      acc_diff      <= 1'b0;
      frame_acc     <= 1'b0;
      res           <= '0;
      verdict_valid <= 1'b0;
      verdict_retx  <= 1'b0;
    end else begin
      res           <= '0;
      verdict_valid <= 1'b0;
      if (d_start[DELAY]) begin
        // Close the window of the previous slot.
        if (cur.valid) begin
          res.valid     <= 1'b1;
          res.last      <= cur.last;
          res.warn_sum  <= acc_sum;
          res.warn_diff <= acc_diff;
          res.tag       <= cur.tag;
          if (cur.last) begin
            verdict_valid <= 1'b1;
            verdict_retx  <= frame_acc | acc_sum | acc_diff;
            frame_acc     <= 1'b0;
          end else begin
            frame_acc <= frame_acc | acc_sum | acc_diff;
          end
        end
        cur      <= d_desc[DELAY];
        acc_sum  <= s_warn_sum;
        acc_diff <= s_warn_diff;
      end else begin
        acc_sum  <= acc_sum  | s_warn_sum;
        acc_diff <= acc_diff | s_warn_diff;
      end
    end
  end

  assign warning = res.valid & (res.warn_sum | res.warn_diff);

endmodule
