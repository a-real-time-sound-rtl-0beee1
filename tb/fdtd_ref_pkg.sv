// fdtd_ref_pkg: reference model of the HO-FDTD room for the testbenches.
//
// fdtd_room holds P^n and P^{n-1} of an NX x NY x NZ room and advances it one
// time step at a time from the update equations: ghost points mirror the
// inner neighbour, S = the six neighbours + 2 P^n, a general grid gets
// S/4 - P^{n-1}, a grid on m boundary planes C1(m)*S - C2(m)*P^{n-1} with
// C1 = (1+R)/(4(1+R)+2m(1-R)) and C2 = (2(1+R)-m(1-R))/(2(1+R)+m(1-R))
// computed in floating point and rounded to 16 fractional bits, divisions
// truncating toward zero, and the incidence added at the source grid. It is
// written separately from the RTL and shares no code with it.
package fdtd_ref_pkg;

  class fdtd_room;
    int nx, ny, nz, src;
    longint c1 [4], c2 [4];
    int cur [], old [], nxt [];

    function new(int nx_, int ny_, int nz_, int refl_q16, int sx, int sy, int sz);
      real r;
      nx = nx_; ny = ny_; nz = nz_;
      src = sx + nx * (sy + ny * sz);
      cur = new[nx * ny * nz];
      old = new[nx * ny * nz];
      nxt = new[nx * ny * nz];
      foreach (cur[g]) begin cur[g] = 0; old[g] = 0; end
      r = refl_q16 / 65536.0;
      for (int m = 1; m <= 3; m++) begin
        c1[m] = longint'($rtoi((1.0 + r) / (4.0 * (1.0 + r) + 2.0 * m * (1.0 - r)) * 65536.0 + 0.5));
        c2[m] = longint'($rtoi((2.0 * (1.0 + r) - m * (1.0 - r)) / (2.0 * (1.0 + r) + m * (1.0 - r)) * 65536.0 + 0.5));
      end
    endfunction

    function int at(int i, int j, int k);
      return cur[i + nx * (j + ny * k)];
    endfunction

    // One time step with incidence `inc`; returns nothing, P^{n+1} in cur.
    function void step(int inc);
      for (int k = 0; k < nz; k++)
        for (int j = 0; j < ny; j++)
          for (int i = 0; i < nx; i++) begin
            longint sum, a, b, r;
            int m, g;
            g = i + nx * (j + ny * k);
            sum = 2 * longint'(cur[g]);
            sum += (i == 0)      ? at(i+1, j, k) : at(i-1, j, k);
            sum += (i == nx - 1) ? at(i-1, j, k) : at(i+1, j, k);
            sum += (j == 0)      ? at(i, j+1, k) : at(i, j-1, k);
            sum += (j == ny - 1) ? at(i, j-1, k) : at(i, j+1, k);
            sum += (k == 0)      ? at(i, j, k+1) : at(i, j, k-1);
            sum += (k == nz - 1) ? at(i, j, k-1) : at(i, j, k+1);
            m = int'(i == 0 || i == nx - 1) + int'(j == 0 || j == ny - 1) + int'(k == 0 || k == nz - 1);
            if (m == 0) begin
              a = sum / 4;
              b = old[g];
            end else begin
              a = (sum * c1[m]) / 65536;
              b = (longint'(old[g]) * c2[m]) / 65536;
            end
            r = a - b;
            if (g == src) r += inc;
            nxt[g] = int'(r);
          end
      old = cur;
      cur = nxt;
    endfunction
  endclass

endpackage
