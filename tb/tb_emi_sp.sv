// tb_emi_sp: self-checking test of the adder/subtractor processing paths.
//
// Drives random line samples, DC levels and thresholds (changed now and
// then), computes the expected rectified magnitudes and comparator flags
// with plain integer arithmetic, and checks them, and the delayed samples,
// five cycles later, every cycle.
module tb_emi_sp;
  localparam int ADC_BITS = 6;
  localparam int SUB_GAIN = 2;
  localparam int SUM_W  = ADC_BITS + 1;
  localparam int SMAG_W = ADC_BITS + 2;
  localparam int DMAG_W = ADC_BITS + $clog2(SUB_GAIN + 1);
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [ADC_BITS-1:0] in_a, in_b, out_a, out_b;
  logic signed [SUM_W-1:0] dc_sum;
  logic [DMAG_W-1:0] dc_diff, thr_diff, mag_diff;
  logic [SMAG_W-1:0] thr_sum, mag_sum;
  logic out_valid, warn_sum, warn_diff;

  emi_sp #(.ADC_BITS(ADC_BITS), .SUB_GAIN(SUB_GAIN)) dut (.*);

  int checks = 0, failures = 0;
  int n_ws = 0, n_wd = 0;

  typedef struct { bit skip; bit v; int a, b, ms, md; bit ws, wd; } exp_t;
  exp_t q[$];

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e, g;
    int a, b;
    in_valid = 0; in_a = 0; in_b = 0;
    dc_sum = 0; dc_diff = 40; thr_sum = 10; thr_diff = 10;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 500 == 0) begin
        // Settings are static in use: samples in flight when they change
        // are not checked.
        foreach (q[i]) q[i].skip = 1;
        dc_sum   = SUM_W'($signed($urandom_range(0, 40)) - 20);
        dc_diff  = DMAG_W'($urandom_range(0, 140));
        thr_sum  = SMAG_W'($urandom_range(0, 60));
        thr_diff = DMAG_W'($urandom_range(0, 60));
      end
      // Random samples, half of them near a clean inverted pair.
      if (t % 2 == 0) begin
        a = $urandom_range(0, 63) - 32;
        b = $urandom_range(0, 63) - 32;
      end else begin
        a = ($urandom_range(0, 1) == 32'd1) ? 20 : -20;
        b = -a + int'($urandom_range(0, 12)) - 6;
      end
      in_a = ADC_BITS'(a); in_b = ADC_BITS'(b);
      in_valid = ($urandom_range(0, 9) != 32'd0);
      e.skip = 0;
      e.v  = in_valid;
      e.a  = a; e.b = b;
      e.ms = iabs(a + b - int'(dc_sum));
      e.md = iabs(iabs((a - b) * SUB_GAIN) - int'(dc_diff));
      e.ws = in_valid && e.ms > int'(thr_sum);
      e.wd = in_valid && e.md > int'(thr_diff);
      q.push_back(e);
      if (q.size() > LAT) begin
        g = q.pop_front();
        // outputs now show the sample pushed LAT cycles before this one
        if (!g.skip) checks++;
        if (!g.skip && (out_valid !== g.v || warn_sum !== g.ws || warn_diff !== g.wd ||
            int'(mag_sum) != g.ms || int'(mag_diff) != g.md ||
            int'(out_a) != g.a || int'(out_b) != g.b)) begin
          failures++;
          if (failures < 10)
            $display("mismatch t=%0d v=%0d/%0d ws=%0d/%0d wd=%0d/%0d ms=%0d/%0d md=%0d/%0d",
                     t, out_valid, g.v, warn_sum, g.ws, warn_diff, g.wd, mag_sum, g.ms, mag_diff, g.md);
        end
        n_ws += g.ws; n_wd += g.wd;
      end
    end
    checks++;
    if (n_ws < 50 || n_wd < 50) begin
      failures++;
      $display("too few comparator hits: sum %0d diff %0d", n_ws, n_wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
