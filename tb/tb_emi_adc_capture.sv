// tb_emi_adc_capture: self-checking test of the ADC input registers.
//
// Drives random offset-binary codes on both buses with a random enable and
// checks, one cycle later, the valid flag and the signed samples
// (code - 2**(ADC_BITS-1)); with the enable low the samples must hold.
module tb_emi_adc_capture;
  localparam int ADC_BITS = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, adc_sample, sample_valid;
  logic [ADC_BITS-1:0] adc_data, adc_inv_data;
  logic signed [ADC_BITS-1:0] sample_a, sample_b;

  emi_adc_capture #(.ADC_BITS(ADC_BITS)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    bit ev;
    en = 0; adc_data = 0; adc_inv_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (sample_valid !== 1'b0 || sample_a != 0 || sample_b != 0) failures++;
    ea = 0; eb = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 32'd0);
      adc_data = ADC_BITS'($urandom);
      adc_inv_data = ADC_BITS'($urandom);
      checks++;
      if (adc_sample !== en) failures++;
      ev = en;
      if (en) begin
        ea = int'(adc_data) - 2 ** (ADC_BITS - 1);
        eb = int'(adc_inv_data) - 2 ** (ADC_BITS - 1);
      end
      @(negedge clk);
      checks++;
      if (sample_valid !== ev || int'(sample_a) != ea || int'(sample_b) != eb) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d %0d exp %0d %0d", t, sample_a, sample_b, ea, eb);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
