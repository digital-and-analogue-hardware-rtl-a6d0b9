// tb_emi_warn_select: self-checking test of the warning-source select.
//
// Random internal and external flags are applied one time step after each
// clock edge; the source select is changed every few dozen cycles. The
// testbench keeps a history of the external flags as they were at each
// clock edge (zero while in reset) and checks after every edge that the
// outputs equal the internal flags of the same cycle when the internal
// source is selected, or the external flags of SYNC_STAGES + ALIGN edges
// earlier when the external source is selected. This checks the select,
// the delay of the external path to the cycle, and its reset.
module tb_emi_warn_select;
  localparam int SYNC = 2, ALIGN = 4, DLY = SYNC + ALIGN;
  localparam int NCYC = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic use_ext = 0, ext_warn_sum = 0, ext_warn_diff = 0;
  logic int_warn_sum = 0, int_warn_diff = 0, warn_sum, warn_diff;

  emi_warn_select #(.SYNC_STAGES(SYNC), .ALIGN(ALIGN)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // external flags as seen at each clock edge; zero while in reset
  logic [1:0] hist [$];
  always @(posedge clk) hist.push_back(rst_n ? {ext_warn_sum, ext_warn_diff} : 2'b00);

  int n_ext = 0, n_int = 0, n_diff_src = 0;

  initial begin
    logic [1:0] exp;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk);
      #1;
      if (c % 37 == 0) use_ext = $urandom_range(0, 1) == 1;
      // bursts of external flags, so that delayed values are distinctive
      ext_warn_sum  = $urandom_range(0, 3) == 0;
      ext_warn_diff = $urandom_range(0, 4) == 0;
      int_warn_sum  = $urandom_range(0, 2) == 0;
      int_warn_diff = $urandom_range(0, 2) == 0;
      #1;
      if (use_ext) begin
        // after the edge just taken, the output holds the value seen at the
        // edge DLY-1 edges before it
        exp = (hist.size() >= DLY) ? hist[hist.size() - DLY] : 2'b00;
        n_ext++;
      end else begin
        exp = {int_warn_sum, int_warn_diff};
        n_int++;
      end
      if (hist.size() >= DLY && hist[hist.size() - DLY] != {int_warn_sum, int_warn_diff}) n_diff_src++;
      checks++;
      if ({warn_sum, warn_diff} != exp) begin
        failures++;
        if (failures < 10)
          $display("%0t: use_ext=%0b got %b expected %b", $time, use_ext, {warn_sum, warn_diff}, exp);
      end
    end
    checks++;
    if (n_ext == 0 || n_int == 0 || n_diff_src == 0) begin
      failures++;
      $display("a source was never selected");
    end
    $display("cycles with external source %0d, internal %0d", n_ext, n_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
