// computing_unit: HO-FDTD update of one grid per clock cycle.
//
// Computes P^{n+1}(i,j,k) = C1 * S - C2 * P^{n-1}(i,j,k) (+ incidence at the
// source grid), where S = Pr + Pl + Pf + Pb + Pt + Pd + 2*P_1 is the output of
// Adder1, P_1 = P^n(i,j,k) is the grid itself and P_2 = P^{n-1}(i,j,k) the
// grid one step older. Loc_indicator selects the pair of multiplicands:
//   LOC_GENERAL      C1 = 1/4 by an arithmetic shift, C2 = 1 by bypassing
//                    the second multiplier (Eq. (3)),
//   LOC_FACE/EDGE/CORNER  multiplicand1/4, 2/5, 3/6 through the two
//                    fixed-point multipliers (Eqs. (11), (15), (17)).
// The neighbour inputs must already hold ghost values for neighbours outside
// the space (the neighbour buffer does that), so the same adder serves every
// grid type. The structure (Adder1, two multiplicand multiplexers, two
// multipliers, two bypass multiplexers, Subtractor1) follows the document.
// Shifts and products round toward zero, the compensation the document gives
// for the shift (it adds 1 to a negative operand that loses a set bit); using
// the same rounding for the products is this design's choice.
//
// Added by this design: the incidence din is added to the result when `src`
// marks the source grid (a soft source; the document only shows din entering
// the unit), and the result is wrapped to DATA_W bits.
//
// Timing: fully pipelined, one grid per clock. Register stage 1 holds the two
// multiplexer outputs, stage 2 holds Dout; out_valid (data_dvld) follows
// in_valid by CU_LATENCY = 2 cycles.
module computing_unit
  import fdtd_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  loc_t                     loc_indicator,
  input  logic                     src,
  input  logic signed [DATA_W-1:0] din,
  input  logic signed [DATA_W-1:0] pr,
  input  logic signed [DATA_W-1:0] pl,
  input  logic signed [DATA_W-1:0] pf,
  input  logic signed [DATA_W-1:0] pb,
  input  logic signed [DATA_W-1:0] pt,
  input  logic signed [DATA_W-1:0] pd,
  input  logic signed [DATA_W-1:0] p_1,
  input  logic signed [DATA_W-1:0] p_2,
  input  logic signed [COEF_W-1:0] multiplicand1,  // C1, face
  input  logic signed [COEF_W-1:0] multiplicand2,  // C1, edge
  input  logic signed [COEF_W-1:0] multiplicand3,  // C1, corner
  input  logic signed [COEF_W-1:0] multiplicand4,  // C2, face
  input  logic signed [COEF_W-1:0] multiplicand5,  // C2, edge
  input  logic signed [COEF_W-1:0] multiplicand6,  // C2, corner
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] dout
);

  localparam int SUM_W = DATA_W + 3;  // eight DATA_W terms

  logic signed [SUM_W-1:0]  r_sum;
  logic signed [COEF_W-1:0] multi_d1, multi_d2;
  logic signed [63:0]       sum_mult, p2_mult, sum_sel, p2_sel;

  // Adder1: six neighbours plus the centre shifted left by one.
  always_comb begin
    r_sum = SUM_W'(pr) + SUM_W'(pl) + SUM_W'(pf) + SUM_W'(pb)
          + SUM_W'(pt) + SUM_W'(pd) + (SUM_W'(p_1) <<< 1);
  end

  // Multiplicand multiplexers, controlled by Loc_indicator.
  always_comb begin
    unique case (loc_indicator)
      LOC_FACE:   begin multi_d1 = multiplicand1; multi_d2 = multiplicand4; end
      LOC_EDGE:   begin multi_d1 = multiplicand2; multi_d2 = multiplicand5; end
      LOC_CORNER: begin multi_d1 = multiplicand3; multi_d2 = multiplicand6; end
      default:    begin multi_d1 = '0;            multi_d2 = '0;            end
    endcase
  end

  // Multipliers and the bypass multiplexers.
  always_comb begin
    sum_mult = sra_rtz(64'(r_sum) * 64'(multi_d1), COEF_FRAC);
    p2_mult  = sra_rtz(64'(p_2) * 64'(multi_d2), COEF_FRAC);
    if (loc_indicator == LOC_GENERAL) begin
      sum_sel = sra_rtz(64'(r_sum), 2);
      p2_sel  = 64'(p_2);
    end else begin
      sum_sel = sum_mult;
      p2_sel  = p2_mult;
    end
  end

  // Stage 1 registers.
  logic signed [SUM_W-1:0]  s1_sum;
  logic signed [DATA_W:0]   s1_p2;
  logic signed [DATA_W-1:0] s1_din;
  logic                     s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sum   <= '0;
      s1_p2    <= '0;
      s1_din   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sum   <= SUM_W'(sum_sel);
      s1_p2    <= (DATA_W+1)'(p2_sel);
      s1_din   <= src ? din : '0;
    end
  end

  // Subtractor1 (and source injection), stage 2 registers.
  logic signed [SUM_W:0] diff;
  always_comb diff = (SUM_W+1)'(s1_sum) - (SUM_W+1)'(s1_p2) + (SUM_W+1)'(s1_din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= s1_valid;
      dout      <= DATA_W'(diff);
    end
  end

  // data_dvld follows the inputs after exactly CU_LATENCY cycles.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> ##CU_LATENCY out_valid);

endmodule
