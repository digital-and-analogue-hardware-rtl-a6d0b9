// emi_line_tx: data transmitter of the EMI detector, with retransmission.
//
// Sends a PRBS-7 data stream on a line pair: line A carries each bit, line B
// its inverse, so that in a quiet channel the two received voltages add up
// to a constant and differ by a fixed swing. Each bit is held for
// SAMPLES_PER_BIT clock cycles (the clock is the ADC sample clock, three
// times the bit rate by default). Data goes out in frames of FRAME_BITS bits.
// After each frame at least GAP_BITS idle slots (line A low, line B high,
// not checked) follow, during which the warning unit delivers the frame's
// verdict. A frame with a warning is sent again from the PRBS state saved at
// its start; otherwise the next frame follows while run is high.
//
// Interface: phase counts the cycles of the current slot (0 .. N-1); desc
// describes the bit on the lines during the slot; line_a/line_b are
// registered and change together with desc at the start of a slot.
// verdict_valid/verdict_retx is the frame verdict; the transmitter waits in
// the gap until it has one. retx_pulse is high for one cycle when a frame
// restarts for a retransmission.
//
// That the FPGA transmits the data and retransmits it after a warning is
// the document's; the PRBS, the framing, the gap and the idle level are this
// design's choices.
module emi_line_tx
  import emi_pkg::*;
#(
  parameter int SAMPLES_PER_BIT = 3,
  parameter int FRAME_BITS      = 8,
  parameter int GAP_BITS        = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      run,
  input  logic      verdict_valid,
  input  logic      verdict_retx,
  output logic      line_a,
  output logic      line_b,
  output logic [$clog2(SAMPLES_PER_BIT)-1:0] phase,
  output bit_desc_t desc,
  output logic      retx_pulse
);

  localparam int PH_W  = $clog2(SAMPLES_PER_BIT);
  localparam int IDX_W = $clog2(FRAME_BITS > GAP_BITS ? FRAME_BITS : GAP_BITS) + 1;

  typedef enum logic [1:0] {ST_IDLE, ST_SEND, ST_GAP} state_t;

  state_t             state;
  logic [IDX_W-1:0]   idx;
  logic [PRBS_W-1:0]  prbs, prbs_frame;
  tag_t               tag;
  logic               have_verdict, retx_pending;

  wire slot_end = (phase == PH_W'(SAMPLES_PER_BIT - 1));

  // Next-slot decision, evaluated in the last cycle of a slot.
  state_t            n_state;
  logic              n_start, n_from_saved;
  always_comb begin
    n_state      = state;
    n_start      = 1'b0;
    n_from_saved = 1'b0;
    unique case (state)
      ST_IDLE: if (run) begin
        n_state = ST_SEND; n_start = 1'b1;
      end
      ST_SEND: if (idx == IDX_W'(FRAME_BITS - 1)) n_state = ST_GAP;
      ST_GAP: if (idx >= IDX_W'(GAP_BITS - 1) && have_verdict) begin
        if (retx_pending) begin
          n_state = ST_SEND; n_start = 1'b1; n_from_saved = 1'b1;
        end else if (run) begin
          n_state = ST_SEND; n_start = 1'b1;
        end else begin
          n_state = ST_IDLE;
        end
      end
      default: n_state = ST_IDLE;
    endcase
  end

  wire [PRBS_W-1:0] prbs_src = n_from_saved ? prbs_frame : prbs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase        <= '0;
      state        <= ST_IDLE;
      idx          <= '0;
      prbs         <= PRBS_SEED;
      prbs_frame   <= PRBS_SEED;
      tag          <= '0;
      have_verdict <= 1'b0;
      retx_pending <= 1'b0;
      desc         <= '0;
      line_a       <= 1'b0;
      line_b       <= 1'b1;
      retx_pulse   <= 1'b0;
    end else begin
      retx_pulse <= 1'b0;
      if (verdict_valid && state == ST_GAP && !have_verdict) begin
        have_verdict <= 1'b1;
        retx_pending <= verdict_retx;
      end
      phase <= slot_end ? '0 : phase + 1'b1;
      if (slot_end) begin
        state <= n_state;
        if (n_state == ST_SEND) begin
          // Next data bit, either the first of a frame or a following one.
          idx        <= n_start ? '0 : idx + 1'b1;
          prbs       <= prbs_next(prbs_src);
          if (n_start) prbs_frame <= prbs_src;
          desc.valid <= 1'b1;
          desc.last  <= n_start ? (FRAME_BITS == 1) : (idx == IDX_W'(FRAME_BITS - 2));
          desc.data  <= prbs_src[PRBS_W-1];
          desc.tag   <= tag;
          tag        <= tag + 1'b1;
          line_a     <= prbs_src[PRBS_W-1];
          line_b     <= ~prbs_src[PRBS_W-1];
          retx_pulse <= n_from_saved;
          have_verdict <= 1'b0;
          retx_pending <= 1'b0;
        end else begin
          // Idle slot: differential zero, not checked.
          if (state != n_state)                idx <= '0;
          else if (idx < IDX_W'(GAP_BITS - 1)) idx <= idx + 1'b1;
          desc   <= '0;
          line_a <= 1'b0;
          line_b <= 1'b1;
        end
      end
    end
  end

  // The verdict of a frame only ever arrives while its gap is being sent.
  a_verdict_in_gap: assert property (@(posedge clk) disable iff (!rst_n)
    verdict_valid |-> state == ST_GAP);

endmodule
