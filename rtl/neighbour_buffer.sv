// neighbour_buffer: lines up the seven P^n values one grid update needs.
//
// The block RAM holding P^n is read in raster order (i fastest, then j, then
// k), one word per clock, into `x`. The buffer is a tapped delay line
// 2*NX*NY+1 words long; with the grid being computed at delay NX*NY+1 the
// taps are its six neighbours:
//   Pt (k+1) delay 1          Pb (j+1) delay NX*NY-NX+1   Pr (i+1) delay NX*NY
//   P_1 (centre) NX*NY+1      Pl (i-1) delay NX*NY+2      Pf (j-1) NX*NY+NX+1
//   Pd (k-1) delay 2*NX*NY+1
// so every grid is fetched from the RAM once per time step. For a grid on a
// boundary the neighbour outside the space is the ghost point of the
// boundary condition; with the opposite neighbour counted twice in the
// boundary equations, the buffer replaces it by that opposite neighbour
// (`faces` says which faces the current grid lies on). Taps that then fall
// outside the space or into another time step are never used.
//
// The document shows this buffer with its seven outputs; the delay-line
// organisation, the ghost substitution being done here and the size (two
// planes instead of the one plane the document quotes for a buffer) are this
// design's: a single read port streaming in raster order needs two planes to
// reach both the k-1 and k+1 neighbours.
//
// Timing: outputs are combinational from the taps; the taps advance on every
// clock with `en` high. Taps at delay d hold the `x` sampled d enabled edges
// earlier.
module neighbour_buffer
  import fdtd_pkg::*;
#(
  parameter int DATA_W = 32,
  parameter int NX     = 32,
  parameter int NY     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] x,
  input  faces_t                   faces,
  output logic signed [DATA_W-1:0] pr,
  output logic signed [DATA_W-1:0] pl,
  output logic signed [DATA_W-1:0] pf,
  output logic signed [DATA_W-1:0] pb,
  output logic signed [DATA_W-1:0] pt,
  output logic signed [DATA_W-1:0] pd,
  output logic signed [DATA_W-1:0] p_1
);

  localparam int NM = NX * NY;

  logic [DATA_W-1:0] t_top, t_back, t_right, t_ctr, t_left, t_front, t_down;

  delay_line #(.DATA_W(DATA_W), .DEPTH(1))       u_d_top   (.clk, .rst_n, .en, .din(x),       .dout(t_top));
  delay_line #(.DATA_W(DATA_W), .DEPTH(NM - NX)) u_d_back  (.clk, .rst_n, .en, .din(t_top),   .dout(t_back));
  delay_line #(.DATA_W(DATA_W), .DEPTH(NX - 1))  u_d_right (.clk, .rst_n, .en, .din(t_back),  .dout(t_right));
  delay_line #(.DATA_W(DATA_W), .DEPTH(1))       u_d_ctr   (.clk, .rst_n, .en, .din(t_right), .dout(t_ctr));
  delay_line #(.DATA_W(DATA_W), .DEPTH(1))       u_d_left  (.clk, .rst_n, .en, .din(t_ctr),   .dout(t_left));
  delay_line #(.DATA_W(DATA_W), .DEPTH(NX - 1))  u_d_front (.clk, .rst_n, .en, .din(t_left),  .dout(t_front));
  delay_line #(.DATA_W(DATA_W), .DEPTH(NM - NX)) u_d_down  (.clk, .rst_n, .en, .din(t_front), .dout(t_down));

  // Ghost points: a missing neighbour takes the value of the opposite one.
  always_comb begin
    p_1 = t_ctr;
    pr  = faces.right ? t_left  : t_right;
    pl  = faces.left  ? t_right : t_left;
    pb  = faces.back  ? t_front : t_back;
    pf  = faces.front ? t_back  : t_front;
    pt  = faces.top   ? t_down  : t_top;
    pd  = faces.down  ? t_top   : t_down;
  end

endmodule
