// dac_if: rendered output to the D/A converter board.
//
// Each DATA_W-bit observation-point sample that arrives with din_valid is
// divided by 2^DAC_SHIFT (rounding toward zero), clipped to the DAC_W-bit
// two's-complement range of the converter and held on dac_data until the
// next sample; `clip` is high while the held sample was clipped. The DAC
// therefore plays the rendered stream at the rendering rate, one sample per
// time step, as a zero-order hold.
//
// The document only names this interface and the 16-bit DAC5682Z behind it;
// the scaling, clipping and hold are this design's. Timing: dac_data changes
// one cycle after din_valid.
module dac_if #(
  parameter int DATA_W    = 32,
  parameter int DAC_W     = 16,
  parameter int DAC_SHIFT = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] din,
  input  logic                     din_valid,
  output logic signed [DAC_W-1:0]  dac_data,
  output logic                     clip
);

  localparam logic signed [DATA_W-1:0] MAXV = DATA_W'((64'sd1 <<< (DAC_W - 1)) - 1);
  localparam logic signed [DATA_W-1:0] MINV = -DATA_W'(64'sd1 <<< (DAC_W - 1));

  logic signed [DATA_W-1:0] scaled;
  always_comb begin
    scaled = din >>> DAC_SHIFT;
    if (DAC_SHIFT > 0 && din < 0 && (din & DATA_W'((64'd1 << DAC_SHIFT) - 1)) != 0)
      scaled = scaled + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data <= '0;
      clip     <= 1'b0;
    end else if (din_valid) begin
      if (scaled > MAXV) begin
        dac_data <= DAC_W'(MAXV);
        clip     <= 1'b1;
      end else if (scaled < MINV) begin
        dac_data <= DAC_W'(MINV);
        clip     <= 1'b1;
      end else begin
        dac_data <= DAC_W'(scaled);
        clip     <= 1'b0;
      end
    end
  end

endmodule
