// tb_emi_line_tx: self-checking test of the transmitter with retransmission.
//
// Plays the warning unit: after the last bit of each frame it returns a
// verdict a random 1..15 cycles later, asking for a retransmission about a
// third of the time. Checks the slot timing (phase, lines changing only at
// slot starts, line B always the inverse of line A), the PRBS-7 data
// against an independent generator, frame length, the minimum gap, that a
// frame after a 'retransmit' verdict repeats the previous frame bit for
// bit, the retransmission pulse count, the tags, and that the transmitter
// goes idle while run is low and resumes afterwards.
module tb_emi_line_tx;
  import emi_pkg::*;
  localparam int N = 3;
  localparam int FB = 4;
  localparam int GB = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run, verdict_valid, verdict_retx, line_a, line_b, retx_pulse;
  logic [$clog2(N)-1:0] phase;
  bit_desc_t desc;

  emi_line_tx #(.SAMPLES_PER_BIT(N), .FRAME_BITS(FB), .GAP_BITS(GB)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("c=%0d: %s", c, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] ref_s, ref_frame;
  initial begin
    int bit_in_frame, idle_run, verdict_at, n_retx_exp, n_retx_got, n_frames, n_repeats;
    int since_run_low, max_idle;
    bit last_retx, prev_a, prev_b, got_verdict, was_idle;
    tag_t exp_tag;
    run = 0; verdict_valid = 0; verdict_retx = 0;
    ref_s = 7'h7F; ref_frame = 7'h7F;
    bit_in_frame = 0; idle_run = 100; verdict_at = -1; n_retx_exp = 0; n_retx_got = 0;
    n_frames = 0; n_repeats = 0; last_retx = 0; got_verdict = 1; exp_tag = 0;
    since_run_low = -1; max_idle = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    prev_a = line_a; prev_b = line_b;
    // c counts cycles since reset release (phase 0 at c = 0)
    for (int c = 1; c < 12001; c++) begin
      // run low for a while in the middle
      run = !(c >= 6000 && c < 6300);
      check(int'(phase) == c % N, "phase", c);
      check(line_b == !line_a, "line B not inverse of line A", c);
      check(line_a == desc.data, "line A differs from the descriptor", c);
      if (c % N != 0) check(line_a == prev_a && line_b == prev_b, "line changed inside a slot", c);
      n_retx_got += retx_pulse;
      if (c % N == 0) begin
        if (desc.valid) begin
          if (bit_in_frame == 0) begin
            // first bit of a frame
            check(idle_run >= GB, "gap too short", c);
            check(got_verdict, "frame started before the verdict", c);
            if (last_retx) begin
              ref_s = ref_frame;
              n_repeats++;
            end
            ref_frame = ref_s;
            n_frames++;
            got_verdict = 0;
            check(c <= 6000 || c > 6300 || last_retx, "frame started while run was low", c);
          end
          check(desc.data == ref_s[6], "data differs from PRBS-7", c);
          check(desc.tag == exp_tag, "tag", c);
          exp_tag++;
          ref_s = {ref_s[5:0], ref_s[6] ^ ref_s[5]};
          bit_in_frame++;
          check(desc.last == (bit_in_frame == FB), "last flag", c);
          if (bit_in_frame == FB) begin
            bit_in_frame = 0;
            verdict_at = c + N + $urandom_range(1, 15);
          end
          idle_run = 0;
        end else begin
          check(bit_in_frame == 0, "idle slot inside a frame", c);
          check(!line_a && line_b, "idle level", c);
          idle_run++;
          if (idle_run > max_idle) max_idle = idle_run;
        end
      end
      prev_a = line_a; prev_b = line_b;
      // verdict from the warning-unit model
      verdict_valid = 0;
      if (c == verdict_at) begin
        verdict_valid = 1;
        verdict_retx = ($urandom_range(0, 2) == 32'd0);
        last_retx = verdict_retx;
        n_retx_exp += verdict_retx;
        got_verdict = 1;
      end
      @(posedge clk); #1;
    end
    check(n_retx_got == n_retx_exp, "retransmission pulse count", 0);
    check(n_repeats == n_retx_exp || n_repeats == n_retx_exp - 1, "repeats", 0);
    check(max_idle >= 90, "did not go idle while run was low", 0);
    check(n_frames > 200 && n_repeats > 30, "too few frames/repeats", 0);
    $display("frames %0d repeats %0d", n_frames, n_repeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
