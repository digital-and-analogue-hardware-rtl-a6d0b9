// tb_emi_recorder: self-checking test of the circular sample recorder.
//
// Writes random entries with random write-valid gaps, more than the depth
// so the pointer wraps, then freezes the recorder and reads every entry
// back, comparing it with a reference copy kept by the testbench. Checks
// that writes while frozen change nothing, and the wrap flag.
module tb_emi_recorder;
  localparam int DEPTH = 64;
  localparam int W = 14;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rec_en, wr_valid, wrapped;
  logic [W-1:0] wr_data, rd_data;
  logic [AW-1:0] rd_addr, wr_ptr;

  emi_recorder #(.REC_DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [DEPTH];
  int ref_ptr = 0, nwr = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rec_en = 0; wr_valid = 0; wr_data = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (wr_ptr != 0 || wrapped) failures++;
    for (int round = 0; round < 3; round++) begin
      automatic int n = (round == 0) ? DEPTH / 2 : DEPTH + 17;
      rec_en = 1;
      for (int i = 0; i < n; i++) begin
        wr_valid = ($urandom_range(0, 3) != 32'd0);
        wr_data = W'($urandom);
        if (wr_valid) begin
          ref_mem[ref_ptr] = wr_data;
          ref_ptr = (ref_ptr + 1) % DEPTH;
          nwr++;
        end
        @(negedge clk);
      end
      wr_valid = 0;
      checks++;
      if (int'(wr_ptr) != ref_ptr || wrapped != (nwr >= DEPTH)) begin
        failures++;
        $display("round %0d: ptr %0d/%0d wrapped %0d", round, wr_ptr, ref_ptr, wrapped);
      end
      // frozen: writes are ignored
      rec_en = 0;
      for (int i = 0; i < 20; i++) begin
        wr_valid = 1; wr_data = W'($urandom);
        @(negedge clk);
      end
      wr_valid = 0;
      checks++;
      if (int'(wr_ptr) != ref_ptr) failures++;
      for (int a = 0; a < DEPTH; a++) begin
        if (a >= nwr) continue;
        rd_addr = AW'(a);
        @(negedge clk);
        checks++;
        if (rd_data !== ref_mem[a]) begin
          failures++;
          if (failures < 10) $display("addr %0d: %h exp %h", a, rd_data, ref_mem[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
