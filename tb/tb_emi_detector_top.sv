// tb_emi_detector_top: end-to-end test of the digital EMI detector at its
// default parameters.
//
// A channel model closes the loop: the transmitted line pair is turned
// into two voltages (in ADC steps around mid-scale: +-SWING for the data,
// plus a common-mode offset), interference is added per bit slot (a
// common-mode part on both lines and a differential part on line A), the
// ADC is modelled as rounding to 6-bit offset-binary codes with clipping,
// and the receiver decides each bit from the sign of A - B; a receive-side
// glitch on line B alone can be added to produce a bit error that the
// detector cannot see. Interference comes in episodes of quiet, light and
// heavy disturbance.
//
// The testbench keeps its own model of the transmitter's framing,
// PRBS-7 data and retransmission, and its own arithmetic for the adder and
// subtractor paths, so it predicts for every data bit whether it is
// flagged and whether it is received wrongly. It checks the transmitted
// data bit by bit, the warning and bit-error pulses, all counters after a
// drain (before and after a counter clear), and the frozen contents of the
// sample recorder. A third run takes the warnings from a model of an
// external analogue detector instead: comparators on the unrounded,
// unclipped line voltages with their own thresholds, whose outputs change
// with the line voltages and are brought in through the synchronised
// external input. Each mechanism (adder-path and subtractor-path
// warnings, bit errors, each result class, retransmission, ADC clipping,
// idle while stopped, counter clear, recorder wrap and freeze, bits judged
// by the external detector differently from the internal one) must occur.
module tb_emi_detector_top;
  import emi_pkg::*;
  localparam int N = 3, FB = 8, GB = 6, B = 6, DEPTH = 1024;
  localparam int SWING = 10, CM = 3;
  localparam int MAXC = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, line_a_tx, line_b_tx, line_a_rx, line_b_rx, adc_sample;
  logic [B-1:0] adc_data, adc_inv_data;
  logic signed [B:0] dc_sum;
  logic [7:0] dc_diff, thr_diff, thr_sum, mag_sum, mag_diff;
  logic warn_sum, warn_diff, warning, bit_error, cnt_clear, rec_en, rec_wrapped;
  logic warn_src_ext = 0, ext_warn_sum, ext_warn_diff;
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
    #(10 * MAXC);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- channel: interference of the current slot ----
  int e_cm = 0, e_d = 0;
  bit glitch_b = 0;
  int va, vb;
  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 2 ** B - 1 ? 2 ** B - 1 : v);
  endfunction
  always_comb begin
    va = (line_a_tx ? SWING : -SWING) + CM + e_cm + e_d;
    vb = (line_b_tx ? SWING : -SWING) + CM + e_cm;
    adc_data     = B'(clip(2 ** (B - 1) + va));
    adc_inv_data = B'(clip(2 ** (B - 1) + vb));
    line_a_rx    = (va - vb) > 0;
    line_b_rx    = !((va - vb) > 0) ^ glitch_b;
  end

  // ---- external analogue detector: same operations on the line voltages ----
  localparam int EXT_THR_SUM = 3, EXT_THR_DIFF = 5;
  function automatic void ext_flags(input int a, input int b, output bit ws, output bit wd);
    int s = a + b - 2 * CM;
    int d = (a - b) * 2;
    if (s < 0) s = -s;
    if (d < 0) d = -d;
    d = d - 4 * SWING;
    if (d < 0) d = -d;
    ws = s > EXT_THR_SUM;
    wd = d > EXT_THR_DIFF;
  endfunction
  always_comb begin
    bit ws, wd;
    ext_flags(va, vb, ws, wd);
    ext_warn_sum  = ws;
    ext_warn_diff = wd;
  end

  // ---- reference arithmetic of the two paths for one sample ----
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

  // ---- slot phase as the design defines it: 0 after reset, then 0..N-1 ----
  int tb_phase = 0;
  always @(posedge clk) tb_phase <= rst_n ? (tb_phase + 1) % N : 0;

  // ---- per-cycle log for the recorder check ----
  logic [2*B+1:0] log_q [$];
  always @(posedge clk) if (rst_n) begin
    bit ws, wd;
    ref_flags(int'(adc_data), int'(adc_inv_data), ws, wd);
    log_q.push_back({ws, wd, adc_data - B'(2 ** (B - 1)), adc_inv_data - B'(2 ** (B - 1))});
    if (log_q.size() > 4 * DEPTH) void'(log_q.pop_front());
  end

  // ---- counts of pulses seen at the outputs ----
  int n_warn_pulse = 0, n_err_pulse = 0;
  always @(posedge clk) if (rst_n) begin
    n_warn_pulse += warning;
    n_err_pulse  += bit_error;
  end

  // ---- expected counters and mechanism counts ----
  int x_bits, x_err, x_tp, x_fp, x_ctn, x_cfn, x_retx, x_warn;
  int m_ws = 0, m_wd = 0, m_clip = 0, m_idle_stop = 0, m_clear = 0, m_wrap = 0, m_freeze = 0;
  int m_retx = 0, m_tp = 0, m_fp = 0, m_ctn = 0, m_cfn = 0, m_err = 0, m_gap = 0;
  int m_ext_bits = 0, m_ext_differs = 0;

  task automatic zero_expected();
    x_bits = 0; x_err = 0; x_tp = 0; x_fp = 0; x_ctn = 0; x_cfn = 0; x_retx = 0; x_warn = 0;
  endtask

  task automatic compare_counters(string when);
    check(int'(counters.bits) == x_bits && int'(counters.bit_errors) == x_err &&
          int'(counters.tp) == x_tp && int'(counters.fp) == x_fp &&
          int'(counters.ctn) == x_ctn && int'(counters.cfn) == x_cfn &&
          int'(counters.retx) == x_retx, {"counters ", when});
    $display("%s: bits %0d/%0d err %0d/%0d tp %0d/%0d fp %0d/%0d ctn %0d/%0d cfn %0d/%0d retx %0d/%0d",
             when, counters.bits, x_bits, counters.bit_errors, x_err, counters.tp, x_tp,
             counters.fp, x_fp, counters.ctn, x_ctn, counters.cfn, x_cfn, counters.retx, x_retx);
  endtask

  // ---- transmitter model ----
  typedef enum {M_IDLE, M_SEND, M_GAP} mstate_t;
  mstate_t mst = M_IDLE;
  int midx = 0;
  logic [6:0] m_prbs = 7'h7F, m_frame = 7'h7F;
  bit m_frame_warn = 0, m_retx_next = 0, prev_run = 0, run_next = 0;

  // One slot: decide the model's bit, set the interference, wait N cycles,
  // then score the bit.
  task automatic do_slot(int p_dist, int p_heavy);
    bit is_data, dbit, ws, wd, wbit, ebit, first, xs, xd;
    int ca, cb, r;
    // inputs change one time step after the slot's first clock edge
    #1;
    run = run_next;
    // model of the next slot, decided with run as seen at the previous slot end
    first = 0;
    case (mst)
      M_IDLE: if (prev_run) begin mst = M_SEND; midx = 0; first = 1; end
      M_SEND: if (midx == FB - 1) begin mst = M_GAP; midx = 0; end else midx++;
      M_GAP: if (midx == GB - 1) begin
        if (m_retx_next) begin mst = M_SEND; m_prbs = m_frame; first = 1; m_retx++; x_retx++; end
        else if (prev_run) begin mst = M_SEND; first = 1; end
        else mst = M_IDLE;
        midx = 0;
      end else midx++;
    endcase
    if (first) begin m_frame = m_prbs; m_frame_warn = 0; end
    is_data = (mst == M_SEND);
    dbit = is_data ? m_prbs[6] : 1'b0;
    if (is_data) m_prbs = {m_prbs[5:0], m_prbs[6] ^ m_prbs[5]};
    if (mst == M_GAP) m_gap++;
    if (mst == M_IDLE && !prev_run) m_idle_stop++;
    prev_run = run;
    // interference for this slot
    e_cm = 0; e_d = 0; glitch_b = 0;
    r = $urandom_range(0, 99);
    if (r < p_dist) begin
      case ($urandom_range(0, 3))
        0: e_cm = $urandom_range(0, 1) == 32'd1 ? int'($urandom_range(1, p_heavy)) : -int'($urandom_range(1, p_heavy));
        1: e_d  = $urandom_range(0, 1) == 32'd1 ? int'($urandom_range(1, 2 * p_heavy)) : -int'($urandom_range(1, 2 * p_heavy));
        2: begin
             e_cm = int'($urandom_range(0, 2 * p_heavy)) - p_heavy;
             e_d  = int'($urandom_range(0, 4 * p_heavy)) - 2 * p_heavy;
           end
        default: glitch_b = 1;
      endcase
    end
    #1;  // let the channel settle
    check(line_a_tx == dbit && line_b_tx == !dbit, "transmitted line pair");
    ca = int'(adc_data); cb = int'(adc_inv_data);
    if (ca == 0 || ca == 2 ** B - 1 || cb == 0 || cb == 2 ** B - 1) m_clip++;
    ref_flags(ca, cb, ws, wd);
    if (warn_src_ext) begin
      ext_flags(va, vb, xs, xd);
      if (is_data) begin
        m_ext_bits++;
        if ((xs | xd) != (ws | wd)) m_ext_differs++;
      end
      ws = xs;
      wd = xd;
    end
    wbit = ws | wd;
    ebit = (line_a_rx != dbit) || (line_b_rx != !dbit);
    if (is_data) begin
      x_bits++;
      m_ws += ws; m_wd += wd;
      if (ebit) begin x_err++; m_err++; end
      if (wbit) x_warn++;
      case ({ebit, wbit})
        2'b00: begin x_tp++;  m_tp++;  end
        2'b01: begin x_fp++;  m_fp++;  end
        2'b11: begin x_ctn++; m_ctn++; end
        default: begin x_cfn++; m_cfn++; end
      endcase
      m_frame_warn |= wbit;
      if (midx == FB - 1) m_retx_next = m_frame_warn;
    end
    repeat (N) @(posedge clk);
  endtask

  initial begin
    int k, found, nrd;
    bit ok;
    logic [2*B+1:0] snap [$];
    run = 0; cnt_clear = 0; rec_en = 1; rec_rd_addr = 0;
    dc_sum = (B+1)'(2 * CM);
    dc_diff = 8'(4 * SWING);
    thr_sum = 8'd6;
    thr_diff = 8'd8;
    zero_expected();
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // align to the start of a slot
    do begin
      @(posedge clk); #1;
    end while (tb_phase != 2);
    @(posedge clk);
    run_next = 1;
    // episodes: quiet, light, heavy
    for (int s = 0; s < 3000; s++) begin
      case ((s / 150) % 4)
        0: do_slot(0, 1);
        1: do_slot(6, 6);
        2: do_slot(30, 16);
        default: do_slot(3, 30);
      endcase
    end
    // stop, drain, compare
    run_next = 0;
    for (int s = 0; s < 100; s++) do_slot(0, 1);
    compare_counters("after run 1");
    check(n_warn_pulse == x_warn, "warning pulse count");
    check(n_err_pulse == x_err, "bit error pulse count");
    // clear the counters
    @(posedge clk); #1;
    cnt_clear = 1;
    @(posedge clk); #1;
    cnt_clear = 0;
    m_clear++;
    zero_expected();
    n_warn_pulse = 0; n_err_pulse = 0;
    compare_counters("after clear");
    // realign to a slot start: the slot counter of the design keeps running
    do begin
      @(posedge clk); #1;
    end while (tb_phase != 2);
    @(posedge clk);
    run_next = 1;
    for (int s = 0; s < 3000; s++) begin
      if (s == 2500) begin
        // freeze the recorder in the middle of traffic
        rec_en = 0;
        snap = log_q;
        m_freeze++;
        m_wrap += rec_wrapped;
      end
      case ((s / 100) % 3)
        0: do_slot(2, 4);
        1: do_slot(20, 12);
        default: do_slot(10, 24);
      endcase
    end
    run_next = 0;
    for (int s = 0; s < 100; s++) do_slot(0, 1);
    compare_counters("after run 2");
    check(n_warn_pulse == x_warn, "warning pulse count 2");
    check(n_err_pulse == x_err, "bit error pulse count 2");
    // recorder: newest entry is at wr_ptr-1; find its place in the log
    found = 0;
    for (int d = 0; d < 12; d++) begin
      ok = 1;
      for (int i = 0; i < 64; i++) begin
        rec_rd_addr = 10'(int'(rec_wr_ptr) - 1 - i);
        @(posedge clk); #1;
        if (rec_rd_data !== snap[snap.size() - 1 - d - i]) begin ok = 0; break; end
      end
      if (ok) begin found = 1; k = d; break; end
    end
    check(found == 1, "recorder contents not found in the sample log");
    if (found != 0) begin
      nrd = 0;
      for (int i = 0; i < DEPTH; i++) begin
        rec_rd_addr = 10'(int'(rec_wr_ptr) - 1 - i);
        @(posedge clk); #1;
        checks++;
        if (rec_rd_data !== snap[snap.size() - 1 - k - i]) begin
          failures++;
          nrd++;
        end
      end
      if (nrd != 0) $display("recorder mismatches: %0d", nrd);
      // the capture register and the pipeline put the newest recorded
      // sample 6 cycles behind the freeze (7 counting the freeze cycle)
      check(k >= 5 && k <= 8, "recorder alignment");
    end
    // run 3: warnings from the external analogue detector, set while idle
    warn_src_ext = 1;
    do begin
      @(posedge clk); #1;
    end while (tb_phase != 2);
    @(posedge clk);
    run_next = 1;
    for (int s = 0; s < 1500; s++) begin
      case ((s / 100) % 3)
        0: do_slot(1, 3);
        1: do_slot(25, 10);
        default: do_slot(10, 20);
      endcase
    end
    run_next = 0;
    for (int s = 0; s < 100; s++) do_slot(0, 1);
    compare_counters("after run 3 (external detector)");
    check(n_warn_pulse == x_warn, "warning pulse count 3");
    check(n_err_pulse == x_err, "bit error pulse count 3");
    $display("mechanisms: sum-warn %0d diff-warn %0d errors %0d tp %0d fp %0d ctn %0d cfn %0d retx %0d clip %0d gap %0d idle %0d clear %0d wrap %0d freeze %0d ext-bits %0d ext-differs %0d",
             m_ws, m_wd, m_err, m_tp, m_fp, m_ctn, m_cfn, m_retx, m_clip, m_gap, m_idle_stop, m_clear, m_wrap, m_freeze, m_ext_bits, m_ext_differs);
    check(m_ws > 0, "no adder-path warning");
    check(m_wd > 0, "no subtractor-path warning");
    check(m_err > 0, "no bit error");
    check(m_tp > 0, "no DTP/CTP");
    check(m_fp > 0, "no DFP/CFP");
    check(m_ctn > 0, "no CTN");
    check(m_cfn > 0, "no CFN");
    check(m_retx > 0, "no retransmission");
    check(m_clip > 0, "no ADC clipping");
    check(m_gap > 0, "no gap");
    check(m_idle_stop > 0, "no idle while stopped");
    check(m_clear > 0, "no counter clear");
    check(m_wrap > 0, "recorder never wrapped");
    check(m_freeze > 0, "recorder never frozen");
    check(m_ext_bits > 0, "no bit judged by the external detector");
    check(m_ext_differs > 0, "external detector never differed from the internal one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
