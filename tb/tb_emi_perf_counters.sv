// tb_emi_perf_counters: self-checking test of the classification counters.
//
// Sends random data-bit results the way the detector does: the receiver's
// error result first, the warning result of the same tag a random 1..6
// cycles later, up to three bits in flight, plus random retransmission
// pulses. A reference count of each class is kept and compared with the
// counters at the end, before and after a clear, and every class must have
// occurred.
module tb_emi_perf_counters;
  import emi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, retx_pulse;
  rx_res_t rx_res;
  warn_res_t warn_res;
  counters_t cnt;

  emi_perf_counters dut (.*);

  int checks = 0, failures = 0;
  int e_bits = 0, e_err = 0, e_tp = 0, e_fp = 0, e_ctn = 0, e_cfn = 0, e_retx = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (int'(cnt.bits) != e_bits || int'(cnt.bit_errors) != e_err || int'(cnt.tp) != e_tp ||
        int'(cnt.fp) != e_fp || int'(cnt.ctn) != e_ctn || int'(cnt.cfn) != e_cfn ||
        int'(cnt.retx) != e_retx) begin
      failures++;
      $display("%s: bits %0d/%0d err %0d/%0d tp %0d/%0d fp %0d/%0d ctn %0d/%0d cfn %0d/%0d retx %0d/%0d",
               what, cnt.bits, e_bits, cnt.bit_errors, e_err, cnt.tp, e_tp, cnt.fp, e_fp,
               cnt.ctn, e_ctn, cnt.cfn, e_cfn, cnt.retx, e_retx);
    end
  endtask

  // Pending bits: tag, error, warning, cycles until the warning result.
  typedef struct { tag_t tag; bit err; bit ws; bit wd; int wait_c; } pend_t;
  pend_t pend[$];

  initial begin
    tag_t tg;
    pend_t p;
    clear = 0; retx_pulse = 0; rx_res = '0; warn_res = '0;
    tg = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      if (c % 50 == 0) compare("running");
      rx_res = '0; warn_res = '0;
      retx_pulse = ($urandom_range(0, 40) == 32'd0);
      if (retx_pulse) e_retx++;
      // warning result of the oldest pending bit when its time has come
      if (pend.size() > 0) begin
        if (pend[0].wait_c <= 0) begin
          p = pend.pop_front();
          warn_res.valid = 1; warn_res.tag = p.tag;
          warn_res.warn_sum = p.ws; warn_res.warn_diff = p.wd;
          e_bits++;
          if (p.err) e_err++;
          case ({p.err, p.ws | p.wd})
            2'b00: e_tp++;
            2'b01: e_fp++;
            2'b11: e_ctn++;
            default: e_cfn++;
          endcase
        end
        foreach (pend[i]) pend[i].wait_c--;
      end
      if (pend.size() < 3 && $urandom_range(0, 2) == 32'd0) begin
        p.tag = tg; tg++;
        p.err = ($urandom_range(0, 3) == 32'd0);
        p.ws  = ($urandom_range(0, 3) == 32'd0);
        p.wd  = ($urandom_range(0, 3) == 32'd0);
        p.wait_c = $urandom_range(1, 6);
        if (pend.size() > 0 && p.wait_c <= pend[$].wait_c) p.wait_c = pend[$].wait_c + 1;
        pend.push_back(p);
        rx_res.valid = 1; rx_res.tag = p.tag; rx_res.err = p.err;
      end
      if (c == 3000) begin
        @(negedge clk);
        rx_res = '0; warn_res = '0; retx_pulse = 0;
        compare("mid");
        checks++;
        if (e_tp == 0 || e_fp == 0 || e_ctn == 0 || e_cfn == 0) failures++;
        clear = 1;
        @(negedge clk);
        clear = 0;
        e_bits = 0; e_err = 0; e_tp = 0; e_fp = 0; e_ctn = 0; e_cfn = 0; e_retx = 0;
        compare("cleared");
      end
    end
    @(negedge clk);
    rx_res = '0; warn_res = '0; retx_pulse = 0;
    @(negedge clk);
    // count the bits still in flight as never reported
    compare("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
