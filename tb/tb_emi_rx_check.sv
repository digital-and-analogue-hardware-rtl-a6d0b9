// tb_emi_rx_check: self-checking test of the received-bit check.
//
// Plays the transmitter: random data and idle slots of three cycles with a
// phase counter and bit descriptors, loops the lines back through a model
// that corrupts line A, line B or both during random slots, and checks
// that exactly one result comes per data bit, one cycle after the sampling
// cycle, with the right tag and error flag.
module tb_emi_rx_check;
  import emi_pkg::*;
  localparam int N = 3;
  localparam int SP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(N)-1:0] phase;
  bit_desc_t desc;
  logic line_a_rx, line_b_rx;
  rx_res_t res;

  emi_rx_check #(.SAMPLES_PER_BIT(N), .SAMPLE_PHASE(SP)) dut (.*);

  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fa, fb, exp_err, exp_valid;
    bit_desc_t exp_desc;
    tag_t tg;
    phase = 0; desc = '0; line_a_rx = 0; line_b_rx = 1;
    tg = 0; fa = 0; fb = 0; exp_err = 0; exp_valid = 0; exp_desc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(posedge clk); #1;
      // the result of the previous cycle's sampling
      if (c > 0) begin
        checks++;
        if (exp_valid) begin
          if (!res.valid || res.err != exp_err || res.tag != exp_desc.tag) begin
            failures++;
            if (failures < 10) $display("c=%0d: valid=%0d err=%0d/%0d", c, res.valid, res.err, exp_err);
          end
          if (exp_err) n_err++; else n_ok++;
        end else if (res.valid) begin
          failures++;
          if (failures < 10) $display("c=%0d: unexpected result", c);
        end
      end
      exp_valid = 0;
      phase = ($clog2(N))'(c % N);
      if (c % N == 0) begin
        desc.valid = ($urandom_range(0, 4) != 32'd0);
        desc.data  = desc.valid ? 1'($urandom) : 1'b0;
        desc.last  = 0;
        desc.tag   = tg;
        if (desc.valid) tg++;
        fa = ($urandom_range(0, 5) == 32'd0);
        fb = ($urandom_range(0, 5) == 32'd0);
      end
      // corruption lasts the slot; the sampled value is that of cycle SP-1
      line_a_rx = desc.data ^ fa;
      line_b_rx = ~desc.data ^ fb;
      if (c % N == SP) begin
        exp_valid = desc.valid;
        exp_err   = fa | fb;
        exp_desc  = desc;
      end
    end
    checks++;
    if (n_err < 50 || n_ok < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
