// sound_render_top: FPGA logic of the real-time sound rendering system.
//
// Music sampled by the A/D converter enters through adc_if, which holds the
// latest sample as the incidence of the rendering engine (dhm). The engine
// renders the sound field of the room with the time-sharing HO-FDTD scheme
// and gives one observation-point sample per time step; that stream leaves on
// edt_data/edt_valid towards the inter-FPGA transfer interface, which (with
// the board-to-board ATCA interface) is outside this RTL. On the receiving
// board the stream comes back in on atca_data/atca_valid and dac_if turns it
// into the word of the 16-bit D/A converter that drives the speakers.
//
// The chain follows the document's system architecture; the inter-FPGA and
// inter-board links are left as ports because their protocols are not given,
// so the two ends can be connected directly for a single-chip build.
// Parameters are the engine's (32 x 32 x 16 grids, 32-bit data, R = 0.95)
// and the converter widths (14-bit A/D, 16-bit D/A).
module sound_render_top #(
  parameter int DATA_W   = 32,
  parameter int NX       = 32,
  parameter int NY       = 32,
  parameter int NZ       = 16,
  parameter int REFL_Q16 = 62259,
  parameter int ADC_W    = 14,
  parameter int DAC_W    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // run control
  input  logic                     start,
  input  logic [15:0]              n_steps,
  output logic                     busy,
  output logic                     done,
  // A/D converter board
  input  logic [ADC_W-1:0]         adc_data,
  input  logic                     adc_valid,
  output logic                     din_req,     // engine read the held sample
  // towards the inter-FPGA transfer interface
  output logic signed [DATA_W-1:0] edt_data,
  output logic                     edt_valid,
  // from the board-to-board interface
  input  logic signed [DATA_W-1:0] atca_data,
  input  logic                     atca_valid,
  // D/A converter board
  output logic signed [DAC_W-1:0]  dac_data,
  output logic                     dac_clip
);

  logic signed [DATA_W-1:0] incidence;

  adc_if #(.ADC_W(ADC_W), .DATA_W(DATA_W)) u_adc_if (
    .clk, .rst_n, .adc_data, .adc_valid, .incidence
  );

  dhm #(.DATA_W(DATA_W), .NX(NX), .NY(NY), .NZ(NZ), .REFL_Q16(REFL_Q16)) u_dhm (
    .clk, .rst_n, .start, .n_steps, .busy, .done,
    .incidence, .din_req, .dataout(edt_data), .dataout_valid(edt_valid)
  );

  dac_if #(.DATA_W(DATA_W), .DAC_W(DAC_W)) u_dac_if (
    .clk, .rst_n, .din(atca_data), .din_valid(atca_valid), .dac_data, .clip(dac_clip)
  );

endmodule
