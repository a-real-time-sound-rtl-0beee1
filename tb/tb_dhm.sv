// tb_dhm: end-to-end check of the rendering engine on a small room.
//
// Runs the engine on a 5 x 4 x 4 grid (non-square so that swapped axes show)
// with the source and the observation point away from the middle, and checks
// every word written into the block RAMs and every observation sample
// against a reference model of the update equations written here directly
// from the scheme: ghost points mirror the inner neighbour, general grids use
// S/4 - P^{n-1}, boundary grids C1*S - C2*P^{n-1} with C1, C2 computed in
// floating point from R and rounded to Q.16, and all divisions truncate
// toward zero. Also checks that one step takes exactly N cycles, the run
// time from start to done, and that a second run starts from a cleared room.
module tb_dhm;
  localparam int NX = 5, NY = 4, NZ = 4, N = NX * NY * NZ;
  localparam int REFL_Q16 = 62259;
  localparam int SX = 1, SY = 2, SZ = 1;
  localparam int OX = 3, OY = 1, OZ = 2;
  localparam int STEPS = 60;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_steps;
  logic busy, done, din_req, dataout_valid;
  logic signed [31:0] incidence, dataout;

  always #5 clk = ~clk;

  dhm #(.NX(NX), .NY(NY), .NZ(NZ), .REFL_Q16(REFL_Q16),
        .SRC_X(SX), .SRC_Y(SY), .SRC_Z(SZ), .OBS_X(OX), .OBS_Y(OY), .OBS_Z(OZ))
    dut (.*);

  int checks = 0, failures = 0;

  // Reference model.
  longint c1 [4], c2 [4];
  int cur [N], old [N], nxt [N];
  int inc_seq [STEPS];

  function automatic int idx(int i, int j, int k);
    return i + NX * (j + NY * k);
  endfunction

  function automatic int pv(int i, int j, int k);
    return cur[idx(i, j, k)];
  endfunction

  task automatic model_step(int s);
    for (int k = 0; k < NZ; k++)
      for (int j = 0; j < NY; j++)
        for (int i = 0; i < NX; i++) begin
          longint sum, a, b, r;
          int m, xl, xr, yf, yb, zd, zt;
          xl = (i == 0)      ? pv(i+1, j, k) : pv(i-1, j, k);
          xr = (i == NX - 1) ? pv(i-1, j, k) : pv(i+1, j, k);
          yf = (j == 0)      ? pv(i, j+1, k) : pv(i, j-1, k);
          yb = (j == NY - 1) ? pv(i, j-1, k) : pv(i, j+1, k);
          zd = (k == 0)      ? pv(i, j, k+1) : pv(i, j, k-1);
          zt = (k == NZ - 1) ? pv(i, j, k-1) : pv(i, j, k+1);
          m = int'(i == 0 || i == NX - 1) + int'(j == 0 || j == NY - 1) + int'(k == 0 || k == NZ - 1);
          sum = longint'(xl) + xr + yf + yb + zd + zt + 2 * longint'(pv(i, j, k));
          if (m == 0) begin
            a = sum / 4;
            b = old[idx(i, j, k)];
          end else begin
            a = (sum * c1[m]) / 65536;
            b = (longint'(old[idx(i, j, k)]) * c2[m]) / 65536;
          end
          r = a - b;
          if (i == SX && j == SY && k == SZ) r += inc_seq[s];
          nxt[idx(i, j, k)] = int'(r);
        end
  endtask

  int step_of_write, writes;
  int expect_steps [2][N];   // expected value per step parity slot
  int obs_expect [STEPS];
  int obs_seen;
  int run_no;
  longint t_start, t_done, last_obs_t, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  // Check every computed word written to a RAM.
  always @(posedge clk) begin
    if (rst_n && dut.data_dvld) begin
      int s, a;
      s = writes / N;
      a = int'(dut.waddr_ram);
      checks++;
      if (a != writes % N || dut.wdin !== nxt_all[s][a]) begin
        failures++;
        if (failures < 10) $display("write %0d step %0d addr %0d: got %0d expected %0d",
                                    writes, s, a, dut.wdin, nxt_all[s][a]);
      end
      // ping-pong: even steps write Block_RAM_2, odd steps Block_RAM_1
      checks++;
      if (dut.we1 != (s % 2 == 1) || dut.we2 != (s % 2 == 0)) failures++;
      writes++;
    end
    if (rst_n && dataout_valid) begin
      checks++;
      if (dataout !== obs_expect[obs_seen]) begin
        failures++;
        $display("obs step %0d: got %0d expected %0d", obs_seen, dataout, obs_expect[obs_seen]);
      end
      if (obs_seen > 0) begin
        checks++;
        if (cyc - last_obs_t != N) begin
          failures++;
          $display("step period %0d, expected %0d", cyc - last_obs_t, N);
        end
      end
      last_obs_t = cyc;
      obs_seen++;
    end
  end

  int nxt_all [STEPS][N];

  // Incidence: the value of the current step, advanced after each read.
  int inc_ptr;
  always_comb incidence = inc_seq[inc_ptr < STEPS ? inc_ptr : 0];
  always @(posedge clk) if (rst_n && din_req) inc_ptr <= inc_ptr + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    r = REFL_Q16 / 65536.0;
    for (int m = 1; m <= 3; m++) begin
      c1[m] = longint'($rtoi((1.0 + r) / (4.0 * (1.0 + r) + 2.0 * m * (1.0 - r)) * 65536.0 + 0.5));
      c2[m] = longint'($rtoi((2.0 * (1.0 + r) - m * (1.0 - r)) / (2.0 * (1.0 + r) + m * (1.0 - r)) * 65536.0 + 0.5));
    end
    cyc = 0;
    for (run_no = 0; run_no < 2; run_no++) begin
      // run 0: impulse of 16384; run 1: random incidence every step
      for (int s = 0; s < STEPS; s++)
        inc_seq[s] = (run_no == 0) ? ((s == 0) ? 16384 : 0) : ($signed($urandom) % 20000);
      for (int g = 0; g < N; g++) begin cur[g] = 0; old[g] = 0; end
      for (int s = 0; s < STEPS; s++) begin
        model_step(s);
        nxt_all[s] = nxt;
        obs_expect[s] = nxt[idx(OX, OY, OZ)];
        old = cur;
        cur = nxt;
      end
      writes = 0; obs_seen = 0; inc_ptr = 0;
      n_steps = 16'(STEPS);
      if (run_no == 0) repeat (3) @(posedge clk);
      rst_n = 1;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t_start = cyc;
      @(posedge clk iff done);
      t_done = cyc;
      checks++;
      // start sampled at t_start-1; clear N, go 1, lag, steps, drain
      if (t_done - t_start != longint'(N + 1 + (NX * NY + 2) + STEPS * N + 1 + 2)) begin
        failures++;
        $display("run took %0d cycles", t_done - t_start);
      end
      checks++;
      if (obs_seen != STEPS || writes != STEPS * N) begin
        failures++;
        $display("saw %0d outputs and %0d writes", obs_seen, writes);
      end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
