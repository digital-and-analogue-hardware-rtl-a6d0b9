// emi_warn_select: chooses where the comparator flags of the detector come
// from, the FPGA's own processing paths or an external analogue detector.
//
// The analogue version of the detector (op-amp adder and subtractor, DC
// blockers, diode rectifiers, comparators) delivers its two comparator
// outputs as logic levels that have no relation to the FPGA clock. When
// use_ext is high those levels drive the warning logic instead of the
// internal flags, so that the same transmitter, receive check, warning
// windows, retransmission and counters measure the analogue detector.
//
// How it works: each external flag passes a SYNC_STAGES-flop synchroniser
// and then ALIGN further flops, so that it reaches the output as many
// cycles after the line change that caused it as an internal flag does
// (see emi_detector_top for how ALIGN is derived). The internal flags pass
// straight through the multiplexer, without delay.
//
// Interface: use_ext is a setting and should only change while the link
// is idle; switching during a frame mixes the two sources within a window.
// Timing: output = internal flags in the same cycle, or external flags
// delayed by SYNC_STAGES + ALIGN cycles. Reset clears the delay chain.
//
// Following the document: the analogue detector with its two comparator
// outputs, and an FPGA that takes its warnings to classify the received
// bits. This design's own choice: bringing those warnings in through this
// selectable, synchronised and aligned input.
module emi_warn_select #(
  parameter int SYNC_STAGES = 2,
  parameter int ALIGN       = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic use_ext,
  input  logic ext_warn_sum,   // asynchronous
  input  logic ext_warn_diff,  // asynchronous
  input  logic int_warn_sum,
  input  logic int_warn_diff,
  output logic warn_sum,
  output logic warn_diff
);

  localparam int STAGES = SYNC_STAGES + ALIGN;

  if (SYNC_STAGES < 2) begin : g_sync_check
    $error("SYNC_STAGES must be at least 2");
  end

  // Stage 0 is the first synchroniser flop; stage STAGES-1 the output.
  logic [1:0] chain [STAGES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) chain[i] <= '0;
    end else begin
      chain[0] <= {ext_warn_sum, ext_warn_diff};
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  always_comb begin
    if (use_ext) {warn_sum, warn_diff} = chain[STAGES-1];
    else         {warn_sum, warn_diff} = {int_warn_sum, int_warn_diff};
  end

endmodule
