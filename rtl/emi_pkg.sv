// emi_pkg: types and constants shared by the digital EMI detector.
//
// The detector sends a data stream on a pair of lines, line A carrying the
// data and line B its inverse, samples both lines with a dual-channel ADC and
// flags a data bit when the sum or the difference of the two line voltages
// departs from its quiet value by more than a threshold. The records below
// carry one data bit's identity from the transmitter to the receiver checker,
// the warning unit and the counters, which see the same bit at different
// clock cycles and pair their results by a small tag.
//
// Tag width, counter width and the PRBS used for the data are this design's
// own choices.
package emi_pkg;

  // Results of one bit may arrive up to 2**TAG_BITS data bits apart.
  localparam int TAG_BITS = 3;
  // Width of every event counter.
  localparam int CNT_W = 32;
  // PRBS-7 (x^7 + x^6 + 1) for the transmitted data.
  localparam int PRBS_W = 7;
  localparam logic [PRBS_W-1:0] PRBS_SEED = '1;

  typedef logic [TAG_BITS-1:0] tag_t;

  // The bit currently on the lines. valid = 0 marks an idle slot (line A low,
  // line B high) that carries no data and is not checked.
  typedef struct packed {
    logic valid;
    logic last;   // last data bit of a frame
    logic data;   // value on line A (line B carries its inverse)
    tag_t tag;
  } bit_desc_t;

  // Receiver check of one data bit.
  typedef struct packed {
    logic valid;
    logic err;    // a received line differed from what was sent
    tag_t tag;
  } rx_res_t;

  // Warning decision for one data bit.
  typedef struct packed {
    logic valid;
    logic last;
    logic warn_sum;   // adder-path comparator fired during the bit
    logic warn_diff;  // subtractor-path comparator fired during the bit
    tag_t tag;
  } warn_res_t;

  // Event counters. The D/C pairs of the classification cannot be told apart
  // by the detector itself, so each pair shares one counter.
  typedef struct packed {
    logic [CNT_W-1:0] bits;        // data bits checked
    logic [CNT_W-1:0] bit_errors;  // received bit wrong
    logic [CNT_W-1:0] tp;          // DTP + CTP: correct bit, no warning
    logic [CNT_W-1:0] fp;          // DFP + CFP: correct bit, warning
    logic [CNT_W-1:0] ctn;         // CTN: wrong bit, warning
    logic [CNT_W-1:0] cfn;         // CFN: wrong bit, no warning
    logic [CNT_W-1:0] retx;        // frames sent again after a warning
  } counters_t;

  // One PRBS-7 step: the output bit is the MSB, the feedback is bit6 ^ bit5.
  function automatic logic [PRBS_W-1:0] prbs_next(logic [PRBS_W-1:0] s);
    return {s[PRBS_W-2:0], s[6] ^ s[5]};
  endfunction

endpackage
