// emi_rx_check: receiver and bit-error check.
//
// Registers the received line pair every cycle and samples it once per
// slot, at cycle SAMPLE_PHASE of the transmitter's slot (the register adds
// one cycle, so the default samples the middle of a three-cycle bit). A
// data bit is in error when line A differs from the bit sent or line B
// differs from its inverse. One result per data bit is reported, tagged
// like the bit so that the counters can pair it with its warning.
//
// Interface: phase/desc come from the transmitter; res is a registered
// one-cycle result, valid one cycle after the sampling cycle.
//
// Receiving the data and counting bit errors is the document's; the sample
// point and the rule that either line may be in error are this design's.
module emi_rx_check
  import emi_pkg::*;
#(
  parameter int SAMPLES_PER_BIT = 3,
  parameter int SAMPLE_PHASE    = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [$clog2(SAMPLES_PER_BIT)-1:0] phase,
  input  bit_desc_t desc,
  input  logic      line_a_rx,
  input  logic      line_b_rx,
  output rx_res_t   res
);

  localparam int PH_W = $clog2(SAMPLES_PER_BIT);

  logic ra, rb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra  <= 1'b0;
      rb  <= 1'b1;
      res <= '0;
    end else begin
      ra  <= line_a_rx;
      rb  <= line_b_rx;
      res <= '0;
      if (phase == PH_W'(SAMPLE_PHASE) && desc.valid) begin
        res.valid <= 1'b1;
        res.err   <= (ra != desc.data) || (rb != !desc.data);
        res.tag   <= desc.tag;
      end
    end
  end

endmodule
