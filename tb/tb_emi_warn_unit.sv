// tb_emi_warn_unit: self-checking test of the per-bit warning window and
// the frame verdict.
//
// Plays the transmitter (three-cycle slots, random data and idle slots,
// frames closed by a 'last' bit) and the comparators (random per-cycle
// flags). For every data bit the expected flags are the OR of the
// comparator flags over the bit's samples, which reach the unit DELAY
// cycles after the slot starts; the result must appear exactly
// SAMPLES_PER_BIT + DELAY + 1 cycles after the slot start. The frame
// verdict is the OR over the frame's bits.
module tb_emi_warn_unit;
  import emi_pkg::*;
  localparam int N = 3;
  localparam int DELAY = 6;
  localparam int NC = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(N)-1:0] phase;
  bit_desc_t desc;
  logic s_warn_sum, s_warn_diff, warning, verdict_valid, verdict_retx;
  warn_res_t res;

  emi_warn_unit #(.SAMPLES_PER_BIT(N), .DELAY(DELAY)) dut (.*);

  int checks = 0, failures = 0, n_warn = 0, n_retx = 0, n_ok = 0;
  bit fs [NC], fd [NC];
  bit_desc_t slot_desc [NC];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tag_t tg;
    int fidx, t0;
    bit ews, ewd, frame_w, e_vv, e_vr;
    phase = 0; desc = '0; s_warn_sum = 0; s_warn_diff = 0;
    tg = 0; fidx = 0; frame_w = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NC; c++) begin
      @(posedge clk); #1;
      // expected output in cycle c: the slot that started at c-N-DELAY-1
      t0 = c - N - DELAY - 1;
      e_vv = 0; e_vr = 0;
      if (t0 >= 0 && t0 % N == 0 && slot_desc[t0].valid) begin
        ews = 0; ewd = 0;
        for (int k = t0 + DELAY; k < t0 + DELAY + N; k++) begin
          ews |= fs[k]; ewd |= fd[k];
        end
        checks++;
        if (!res.valid || res.warn_sum != ews || res.warn_diff != ewd ||
            res.tag != slot_desc[t0].tag || res.last != slot_desc[t0].last ||
            warning != (ews | ewd)) begin
          failures++;
          if (failures < 10) $display("c=%0d: v=%0d ws=%0d/%0d wd=%0d/%0d", c, res.valid, res.warn_sum, ews, res.warn_diff, ewd);
        end
        if (ews | ewd) n_warn++; else n_ok++;
        frame_w |= ews | ewd;
        if (slot_desc[t0].last) begin
          e_vv = 1; e_vr = frame_w; frame_w = 0;
          n_retx += e_vr;
        end
      end else begin
        checks++;
        if (res.valid || warning) begin
          failures++;
          if (failures < 10) $display("c=%0d: unexpected result", c);
        end
      end
      checks++;
      if (verdict_valid != e_vv || (e_vv && verdict_retx != e_vr)) begin
        failures++;
        if (failures < 10) $display("c=%0d: verdict %0d/%0d retx %0d/%0d", c, verdict_valid, e_vv, verdict_retx, e_vr);
      end
      // inputs for cycle c
      phase = ($clog2(N))'(c % N);
      if (c % N == 0) begin
        desc = '0;
        if (c < NC - 60 && $urandom_range(0, 4) != 32'd0) begin
          desc.valid = 1;
          desc.data = 1'($urandom);
          desc.tag = tg; tg++;
          fidx++;
          desc.last = (fidx == 5);
          if (desc.last) fidx = 0;
        end
      end
      slot_desc[c] = desc;
      fs[c] = ($urandom_range(0, 15) == 32'd0);
      fd[c] = ($urandom_range(0, 15) == 32'd0);
      s_warn_sum = fs[c];
      s_warn_diff = fd[c];
    end
    checks++;
    if (n_warn < 50 || n_ok < 50 || n_retx < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
