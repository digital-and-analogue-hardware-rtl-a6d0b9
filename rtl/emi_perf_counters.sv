// emi_perf_counters: classification counters of the EMI detector.
//
// Each data bit produces two results at different times: the receiver's
// error check and, later, the warning decision. The error result is stored
// in a small table indexed by the bit's tag; when the warning result of the
// same tag arrives, the bit is classified and counted:
//
//   correct, no warning  -> tp  (DTP + CTP)
//   correct, warning     -> fp  (DFP + CFP)
//   wrong,   warning     -> ctn (CTN, interference detected with a bit error)
//   wrong,   no warning  -> cfn (CFN, missed bit error)
//
// together with the number of bits, of bit errors and of retransmitted
// frames. Whether the interference alone was strong enough to disturb the
// data (the D and C variants) cannot be seen by the detector, so each pair
// shares a counter. All counters wrap; clear sets them to zero.
//
// Timing: counters update one cycle after the warning result.
//
// The classes are the document's; pairing by tag and the counter widths
// are this design's choices.
module emi_perf_counters
  import emi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  rx_res_t   rx_res,
  input  warn_res_t warn_res,
  input  logic      retx_pulse,
  output counters_t cnt
);

  localparam int NTAG = 2 ** TAG_BITS;

  logic [NTAG-1:0] err_tab;
  logic [NTAG-1:0] pending;

  wire e = err_tab[warn_res.tag];
  wire w = warn_res.warn_sum | warn_res.warn_diff;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_tab <= '0;
      pending <= '0;
    end else begin
      if (warn_res.valid) pending[warn_res.tag] <= 1'b0;
      if (rx_res.valid) begin
        err_tab[rx_res.tag] <= rx_res.err;
        pending[rx_res.tag] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt <= '0;
    end else begin
      if (retx_pulse) cnt.retx <= cnt.retx + 1'b1;
      if (warn_res.valid) begin
        cnt.bits <= cnt.bits + 1'b1;
        if (e) cnt.bit_errors <= cnt.bit_errors + 1'b1;
        unique case ({e, w})
          2'b00: cnt.tp  <= cnt.tp  + 1'b1;
          2'b01: cnt.fp  <= cnt.fp  + 1'b1;
          2'b11: cnt.ctn <= cnt.ctn + 1'b1;
          2'b10: cnt.cfn <= cnt.cfn + 1'b1;
          default: ;
        endcase
      end
    end
  end

  // The error check of a bit must come before its warning decision, and
  // its tag must not be reused before then.
  a_rx_first: assert property (@(posedge clk) disable iff (!rst_n)
    warn_res.valid |-> pending[warn_res.tag]);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    rx_res.valid && !(warn_res.valid && warn_res.tag == rx_res.tag) |-> !pending[rx_res.tag]);

endmodule
