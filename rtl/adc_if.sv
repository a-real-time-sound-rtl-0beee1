// adc_if: incidence input from the A/D converter board.
//
// Captures each ADC_W-bit sample (two's complement, or offset binary when
// OFFSET_BINARY is set) that arrives with adc_valid, sign-extends it to the
// engine's DATA_W-bit pressure word, scales it by 2^ADC_SHIFT and holds it on
// `incidence`. The engine reads `incidence` once per time step, so the music
// is resampled from the converter rate to the rendering rate by holding the
// latest sample.
//
// The document only names this interface and the 14-bit ADS5474 converter
// behind it; the format handling, the scaling (default x4, so that full
// scale reaches about +-32768 and a 16384 pulse is representable) and the
// sample-and-hold are this design's. Timing: incidence changes one cycle
// after adc_valid.
module adc_if #(
  parameter int ADC_W         = 14,
  parameter int DATA_W        = 32,
  parameter int ADC_SHIFT     = 2,
  parameter bit OFFSET_BINARY = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADC_W-1:0]         adc_data,
  input  logic                     adc_valid,
  output logic signed [DATA_W-1:0] incidence
);

  logic signed [ADC_W-1:0] s;
  always_comb s = OFFSET_BINARY ? {~adc_data[ADC_W-1], adc_data[ADC_W-2:0]} : adc_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      incidence <= '0;
    end else begin
      if (adc_valid) incidence <= DATA_W'(s) <<< ADC_SHIFT;
    end
  end

endmodule
