// fdtd_pkg: types and constants shared by the HO-FDTD sound rendering engine.
//
// The engine updates a rectangular grid of sound pressures with the
// hardware-oriented FDTD scheme (Courant number 1/2), in which a general grid
// needs only shifts and a grid on a boundary needs two multiplications by
// constants derived from the boundary reflection factor R. This package
// defines the grid-type code that selects those constants (Loc_indicator),
// the record of which faces of the space a grid touches, the fixed-point
// format of the constants, and the functions that compute them from R and
// divide toward zero.
//
// The constants follow from the boundary equations of the scheme. With m the
// number of boundary faces a grid touches (1 face, 2 edge, 3 corner):
//   P^{n+1} = C1 * S - C2 * P^{n-1}
//   C1 = (1+R) / (4 (1+R) + 2 m (1-R))
//   C2 = (2 (1+R) - m (1-R)) / (2 (1+R) + m (1-R))
// where S is the sum of the six (ghost-substituted) neighbours plus twice the
// grid itself. For m = 0 the constants are 1/4 and 1, done by a shift and a
// bypass. R is given as an unsigned Q0.16 number; the constants are signed
// with COEF_FRAC fractional bits, rounded to nearest. The Q formats are this
// design's choice; the document only calls the multipliers fixed-point.
package fdtd_pkg;

  localparam int COEF_W    = 18;  // multiplicand width, signed
  localparam int COEF_FRAC = 16;  // fractional bits of a multiplicand
  localparam int CU_LATENCY = 2;  // clock cycles from computing-unit inputs to Dout

  // Loc_indicator: which set of multiplicands a grid uses.
  typedef enum logic [1:0] {
    LOC_GENERAL = 2'd0,  // inside the space: shifts only
    LOC_FACE    = 2'd1,  // interior of one boundary plane, Eq. (11)
    LOC_EDGE    = 2'd2,  // on two boundary planes, Eq. (15)
    LOC_CORNER  = 2'd3   // on three boundary planes, Eq. (17)
  } loc_t;

  // Faces of the space a grid lies on. x grows to the right, y to the back,
  // z to the top.
  typedef struct packed {
    logic left;   // i == 0
    logic right;  // i == NX-1
    logic front;  // j == 0
    logic back;   // j == NY-1
    logic down;   // k == 0
    logic top;    // k == NZ-1
  } faces_t;

  // Number of boundary planes a grid lies on, as a Loc_indicator code.
  function automatic loc_t loc_of(faces_t f);
    logic [1:0] m;
    m = 2'(f.left | f.right) + 2'(f.front | f.back) + 2'(f.down | f.top);
    return loc_t'(m);
  endfunction

  // Multiplicand for the neighbour sum (C1) of a grid on m planes.
  function automatic logic signed [COEF_W-1:0] coef_sum(int unsigned refl_q16, int unsigned m);
    longint num, den;
    num = (longint'(65536) + longint'(refl_q16)) <<< COEF_FRAC;
    den = 4 * (longint'(65536) + longint'(refl_q16))
        + 2 * longint'(m) * (longint'(65536) - longint'(refl_q16));
    return COEF_W'((num + den / 2) / den);
  endfunction

  // Multiplicand for the old pressure P^{n-1} (C2) of a grid on m planes.
  function automatic logic signed [COEF_W-1:0] coef_old(int unsigned refl_q16, int unsigned m);
    longint num, den;
    num = (2 * (longint'(65536) + longint'(refl_q16))
        - longint'(m) * (longint'(65536) - longint'(refl_q16))) <<< COEF_FRAC;
    den = 2 * (longint'(65536) + longint'(refl_q16))
        + longint'(m) * (longint'(65536) - longint'(refl_q16));
    if (num >= 0) return COEF_W'((num + den / 2) / den);
    else          return COEF_W'(-((-num + den / 2) / den));
  endfunction

  // Arithmetic right shift that rounds toward zero: a negative operand with
  // any shifted-out bit set gets 1 added, so that repeated shifts do not
  // drift the field negative.
  function automatic logic signed [63:0] sra_rtz(logic signed [63:0] x, int unsigned sh);
    logic signed [63:0] q;
    logic [63:0] lost_mask;
    q = x >>> sh;
    lost_mask = (64'd1 << sh) - 64'd1;
    if (x < 0 && (x & lost_mask) != 0) q = q + 64'sd1;
    return q;
  endfunction

endpackage
