// tb_computing_unit: random vectors through the computing unit.
//
// Drives one random grid update per cycle, with every grid type, random
// source flags and both signs, and compares Dout two cycles later with
// C1*S - C2*P_2 (+ din) computed here with truncating division, where the
// multiplicands are computed in floating point from R = 0.95. A general grid
// must give S/4 - P_2 exactly; negative sums check the rounding toward zero.
module tb_computing_unit;
  import fdtd_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, src, out_valid;
  loc_t loc_indicator;
  logic signed [31:0] din, pr, pl, pf, pb, pt, pd, p_1, p_2, dout;
  logic signed [COEF_W-1:0] m1, m2, m3, m4, m5, m6;

  computing_unit #(.DATA_W(32)) dut (
    .clk, .rst_n, .in_valid, .loc_indicator, .src, .din,
    .pr, .pl, .pf, .pb, .pt, .pd, .p_1, .p_2,
    .multiplicand1(m1), .multiplicand2(m2), .multiplicand3(m3),
    .multiplicand4(m4), .multiplicand5(m5), .multiplicand6(m6),
    .out_valid, .dout
  );

  int checks = 0, failures = 0, neg_rounded = 0;
  longint c1 [4], c2 [4];
  logic signed [31:0] exp_q [$];
  logic               vld_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int range);
    return $signed($urandom) % range;
  endfunction

  initial begin
    real r;
    r = 0.95;
    c1[0] = 0; c2[0] = 0;
    for (int m = 1; m <= 3; m++) begin
      c1[m] = longint'($rtoi((1.0 + r) / (4.0 * (1.0 + r) + 2.0 * m * (1.0 - r)) * 65536.0 + 0.5));
      c2[m] = longint'($rtoi((2.0 * (1.0 + r) - m * (1.0 - r)) / (2.0 * (1.0 + r) + m * (1.0 - r)) * 65536.0 + 0.5));
    end
    m1 = COEF_W'(c1[1]); m2 = COEF_W'(c1[2]); m3 = COEF_W'(c1[3]);
    m4 = COEF_W'(c2[1]); m5 = COEF_W'(c2[2]); m6 = COEF_W'(c2[3]);
    in_valid = 0; src = 0; din = 0; loc_indicator = LOC_GENERAL;
    {pr, pl, pf, pb, pt, pd, p_1, p_2} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      longint s, e;
      int range;
      @(negedge clk);
      range = (n % 3 == 0) ? 8 : ((n % 3 == 1) ? 100000 : 200000000);
      in_valid = ($urandom % 8) != 0;
      loc_indicator = loc_t'($urandom % 4);
      src = ($urandom % 4) == 0;
      din = rnd(30000);
      pr = rnd(range); pl = rnd(range); pf = rnd(range); pb = rnd(range);
      pt = rnd(range); pd = rnd(range); p_1 = rnd(range); p_2 = rnd(range);
      s = longint'(pr) + pl + pf + pb + pt + pd + 2 * longint'(p_1);
      if (loc_indicator == LOC_GENERAL) begin
        e = s / 4 - p_2;
        if (s < 0 && s % 4 != 0) neg_rounded++;
      end else
        e = (s * c1[loc_indicator]) / 65536 - (longint'(p_2) * c2[loc_indicator]) / 65536;
      if (src) e += din;
      exp_q.push_back(32'(e));
      vld_q.push_back(in_valid);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (neg_rounded == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Outputs two cycles after the inputs.
  int n_in = 0;
  logic signed [31:0] e_d1, e_d2;
  logic               v_d1, v_d2;
  always @(posedge clk) begin
    if (rst_n) begin
      if (n_in >= 2 && n_in <= 4001) begin
        checks++;
        if (out_valid !== v_d2 || (v_d2 && dout !== e_d2)) begin
          failures++;
          if (failures < 10) $display("vector %0d: dout %0d expected %0d valid %0b/%0b",
                                      n_in - 2, dout, e_d2, out_valid, v_d2);
        end
      end
      e_d2 <= e_d1;
      v_d2 <= v_d1;
      if (exp_q.size() > 0 && n_in >= 1) begin
        e_d1 <= exp_q.pop_front();
        v_d1 <= vld_q.pop_front();
      end else begin
        v_d1 <= 1'b0;
      end
      n_in++;
    end
  end
endmodule
