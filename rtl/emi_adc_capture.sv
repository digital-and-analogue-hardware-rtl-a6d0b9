// emi_adc_capture: input register for the two ADC channels.
//
// The ADC digitises the received voltage of line A (bus adc_data) and of
// line B (bus adc_inv_data) at every clock. This block registers both buses
// while sampling is enabled and turns the offset-binary codes into signed
// two's complement samples centred on mid-scale, by inverting the MSB, so
// that the adder and subtractor downstream work on signed values.
//
// Timing: one register stage; sample_valid follows en by one cycle.
// adc_sample is the enable presented to the ADC.
//
// The 6-bit dual-channel ADC and the two buses are the document's; the
// offset-binary coding is an assumption about the converter's output.
module emi_adc_capture #(
  parameter int ADC_BITS = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [ADC_BITS-1:0]        adc_data,
  input  logic [ADC_BITS-1:0]        adc_inv_data,
  output logic                       adc_sample,
  output logic                       sample_valid,
  output logic signed [ADC_BITS-1:0] sample_a,
  output logic signed [ADC_BITS-1:0] sample_b
);

  assign adc_sample = en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample_valid <= 1'b0;
      sample_a     <= '0;
      sample_b     <= '0;
    end else begin
      sample_valid <= en;
      if (en) begin
        sample_a <= {~adc_data[ADC_BITS-1],     adc_data[ADC_BITS-2:0]};
        sample_b <= {~adc_inv_data[ADC_BITS-1], adc_inv_data[ADC_BITS-2:0]};
      end
    end
  end

endmodule
