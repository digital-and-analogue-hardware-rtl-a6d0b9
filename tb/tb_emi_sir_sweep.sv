// tb_emi_sir_sweep: signal-to-interference sweep of the digital EMI detector.
//
// Repeats the kind of measurement the detector was characterised with: a
// 10 MHz bit stream (so a 30 MHz sample clock at three samples per bit) is
// disturbed by a continuous sine wave at 305 MHz and then at 326 MHz, whose
// amplitude is stepped so that the signal-to-interference ratio
//   SIR = 20 log10(V_sig,rms / V_int,rms)
// falls from 30 dB to -6 dB in 1 dB steps. The interference reaches line B
// with 0.8 times the amplitude and a 60 degree phase shift, so it has both
// a common-mode and a differential part. The ADC is modelled as rounding
// to 6-bit offset-binary codes with clipping, the receiver as the sign of
// A - B at the bit's sampling instant.
//
// For every step the testbench clears the counters, runs 240 bit slots,
// drains, and compares all counters with its own prediction, computed per
// sample with its own arithmetic for both detector paths and its own model
// of the framing and retransmission. It prints, per step, the share of
// data bits that were warned about and that were received wrongly. It also
// checks the expected shape of the sweep: no warning at the highest SIR,
// warnings on most bits at the lowest, bit errors in at least one of the
// two sweeps, and bit errors appearing only below the SIR at which
// warnings start. With this channel model the differential part of the
// 305 MHz interference happens to be small at the receiver's sampling
// instants, so that sweep ends without bit errors down to -6 dB.
module tb_emi_sir_sweep;
  import emi_pkg::*;
  localparam int N = 3, FB = 8, GB = 6, B = 6;
  localparam int SWING = 14, CM = 2;
  localparam real FS = 30.0e6;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, line_a_tx, line_b_tx, line_a_rx, line_b_rx, adc_sample;
  logic [B-1:0] adc_data, adc_inv_data;
  logic signed [B:0] dc_sum;
  logic [7:0] dc_diff, thr_diff, thr_sum, mag_sum, mag_diff;
  logic warn_sum, warn_diff, warning, bit_error, cnt_clear, rec_en, rec_wrapped;
  // the internal detector paths are measured here; the external input is idle
  logic warn_src_ext = 0, ext_warn_sum = 0, ext_warn_diff = 0;
  counters_t counters;
  logic [9:0] rec_rd_addr, rec_wr_ptr;
  logic [2*B+1:0] rec_rd_data;

  emi_detector_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- channel ----
  real amp = 0.0, f_int = 305.0e6;
  longint n_samp = 0;
  real ia, ib, va, vb;
  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 2 ** B - 1 ? 2 ** B - 1 : v);
  endfunction
  always_comb begin
    va = real'((line_a_tx ? SWING : -SWING) + CM) + ia;
    vb = real'((line_b_tx ? SWING : -SWING) + CM) + ib;
    adc_data     = B'(clip(2 ** (B - 1) + int'(va)));
    adc_inv_data = B'(clip(2 ** (B - 1) + int'(vb)));
    line_a_rx    = (va - vb) > 0.0;
    line_b_rx    = !((va - vb) > 0.0);
  end

  function automatic void ref_flags(input int ca, input int cb, output bit ws, output bit wd);
    int a = ca - 2 ** (B - 1), b = cb - 2 ** (B - 1);
    int s = a + b - int'(dc_sum);
    int d = (a - b) * 2;
    if (s < 0) s = -s;
    if (d < 0) d = -d;
    d = d - int'(dc_diff);
    if (d < 0) d = -d;
    ws = s > int'(thr_sum);
    wd = d > int'(thr_diff);
  endfunction

  int tb_phase = 0;
  always @(posedge clk) tb_phase <= rst_n ? (tb_phase + 1) % N : 0;

  // ---- expected counters ----
  int x_bits, x_err, x_tp, x_fp, x_ctn, x_cfn, x_retx;
  task automatic zero_expected();
    x_bits = 0; x_err = 0; x_tp = 0; x_fp = 0; x_ctn = 0; x_cfn = 0; x_retx = 0;
  endtask

  // ---- transmitter model ----
  typedef enum {M_IDLE, M_SEND, M_GAP} mstate_t;
  mstate_t mst = M_IDLE;
  int midx = 0;
  logic [6:0] m_prbs = 7'h7F, m_frame = 7'h7F;
  bit m_frame_warn = 0, m_retx_next = 0, prev_run = 0, run_next = 0;

  task automatic do_slot();
    bit is_data, dbit, ws, wd, wbit, ebit, first;
    first = 0;
    case (mst)
      M_IDLE: if (prev_run) begin mst = M_SEND; midx = 0; first = 1; end
      M_SEND: if (midx == FB - 1) begin mst = M_GAP; midx = 0; end else midx++;
      M_GAP: if (midx == GB - 1) begin
        if (m_retx_next) begin mst = M_SEND; m_prbs = m_frame; first = 1; x_retx++; end
        else if (prev_run) begin mst = M_SEND; first = 1; end
        else mst = M_IDLE;
        midx = 0;
      end else midx++;
    endcase
    if (first) begin m_frame = m_prbs; m_frame_warn = 0; end
    is_data = (mst == M_SEND);
    dbit = is_data ? m_prbs[6] : 1'b0;
    if (is_data) m_prbs = {m_prbs[5:0], m_prbs[6] ^ m_prbs[5]};
    wbit = 0; ebit = 0;
    for (int p = 0; p < N; p++) begin
      // inputs change one time step after the clock edge
      #1;
      if (p == 0) begin
        run = run_next;
        prev_run = run;
      end
      ia = amp * $sin(2.0 * PI * f_int * real'(n_samp) / FS);
      ib = 0.8 * amp * $sin(2.0 * PI * f_int * real'(n_samp) / FS + PI / 3.0);
      n_samp++;
      #1;
      if (p == 0) check(line_a_tx == dbit && line_b_tx == !dbit, "transmitted line pair");
      ref_flags(int'(adc_data), int'(adc_inv_data), ws, wd);
      wbit |= ws | wd;
      // the receiver register holds the value of phase 1 when it samples
      if (p == 1) ebit = (line_a_rx != dbit) || (line_b_rx != !dbit);
      @(posedge clk);
    end
    if (is_data) begin
      x_bits++;
      if (ebit) x_err++;
      case ({ebit, wbit})
        2'b00: x_tp++;
        2'b01: x_fp++;
        2'b11: x_ctn++;
        default: x_cfn++;
      endcase
      m_frame_warn |= wbit;
      if (midx == FB - 1) m_retx_next = m_frame_warn;
    end
  endtask

  initial begin
    real sir, pw, pe;
    int first_warn_step, first_err_step, step, any_err_sweep;
    run = 0; cnt_clear = 0; rec_en = 1; rec_rd_addr = 0; ia = 0.0; ib = 0.0; any_err_sweep = 0;
    dc_sum = (B+1)'(2 * CM);
    dc_diff = 8'(4 * SWING);
    thr_sum = 8'd4;
    thr_diff = 8'd6;
    zero_expected();
    repeat (4) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk); #1;
    end while (tb_phase != 2);
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      f_int = (f == 0) ? 305.0e6 : 326.0e6;
      first_warn_step = -1; first_err_step = -1; step = 0;
      $display("interference %0.0f MHz, bit frequency 10 MHz", f_int / 1.0e6);
      for (int s10 = 300; s10 >= -60; s10 -= 10) begin
        sir = real'(s10) / 10.0;
        // V_sig,rms = SWING (square wave); V_int,rms = amp / sqrt(2)
        amp = real'(SWING) * $sqrt(2.0) * (10.0 ** (-sir / 20.0));
        run_next = 1;
        for (int k = 0; k < 240; k++) do_slot();
        // stop and drain with the interference off, so that pending
        // retransmissions finish
        run_next = 0;
        amp = 0.0;
        for (int k = 0; k < 10 || mst != M_IDLE; k++) do_slot();
        for (int k = 0; k < 4; k++) do_slot();
        checks++;
        if (int'(counters.bits) != x_bits || int'(counters.bit_errors) != x_err ||
            int'(counters.tp) != x_tp || int'(counters.fp) != x_fp ||
            int'(counters.ctn) != x_ctn || int'(counters.cfn) != x_cfn ||
            int'(counters.retx) != x_retx) begin
          failures++;
          $display("counter mismatch at SIR %0.1f: bits %0d/%0d err %0d/%0d tp %0d/%0d fp %0d/%0d ctn %0d/%0d cfn %0d/%0d retx %0d/%0d",
                   sir, counters.bits, x_bits, counters.bit_errors, x_err, counters.tp, x_tp,
                   counters.fp, x_fp, counters.ctn, x_ctn, counters.cfn, x_cfn, counters.retx, x_retx);
        end
        sir = real'(s10) / 10.0;
        pw = 100.0 * real'(x_fp + x_ctn) / real'(x_bits);
        pe = 100.0 * real'(x_err) / real'(x_bits);
        $display("  SIR %5.1f dB: bits %4d  warned %6.2f %%  bit errors %6.2f %%  (tp %0d fp %0d ctn %0d cfn %0d, resent frames %0d)",
                 sir, x_bits, pw, pe, x_tp, x_fp, x_ctn, x_cfn, x_retx);
        if (x_fp + x_ctn > 0 && first_warn_step < 0) first_warn_step = step;
        if (x_err > 0 && first_err_step < 0) first_err_step = step;
        if (s10 == 300) check(x_fp + x_ctn == 0 && x_err == 0, "warnings or errors at the highest SIR");
        if (s10 == -60) check(pw > 50.0, "few warnings at the lowest SIR");
        // clear between steps, while the link is idle
        @(posedge clk); #1;
        cnt_clear = 1;
        @(posedge clk); #1;
        cnt_clear = 0;
        zero_expected();
        do begin
          @(posedge clk); #1;
        end while (tb_phase != 2);
        @(posedge clk);
        step++;
      end
      check(first_warn_step >= 0, "no warning in the sweep");
      if (first_err_step >= 0) any_err_sweep++;
      check(first_err_step < 0 || first_warn_step < first_err_step,
            "bit errors before warnings");
    end
    check(any_err_sweep > 0, "no bit error in either sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
