// tb_system_ctrl: the controller with the grid counters on a 3 x 3 x 3 room.
//
// A stand-in for the computing unit returns data_dvld two cycles after
// cp_valid. Checks: the clear phase writes zeros to both RAMs at every
// address, `go` follows it, loc_indicator counts the boundary planes of each
// grid (27 grids: 1 general, 6 face, 12 edge, 8 corner; steps 0 and 2 counted), src marks only the
// source grid, writes go to address cp_addr two cycles late into Block_RAM_2
// on even and Block_RAM_1 on odd steps, obs pulses once per step, done comes
// at the computed cycle, and n_steps = 0 only clears.
module tb_system_ctrl;
  import fdtd_pkg::*;
  localparam int NX = 3, NY = 3, NZ = 3, N = NX * NY * NZ, STEPS = 3, LAG = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, go, rd_valid, rd_par, cp_valid, cp_par, finished;
  logic [15:0] n_steps;
  logic [4:0] rd_addr, cp_addr, raddr_ram, waddr_ram;
  logic [1:0] cp_i, cp_j, cp_k;
  logic data_dvld, src, obs, ram_rd_sel, ram_we_sel, clearing, we1, we2;
  loc_t loc_indicator;
  faces_t faces;

  grid_position_ctrl #(.NX(NX), .NY(NY), .NZ(NZ), .LAG(LAG)) u_gp (
    .clk, .rst_n, .go, .n_steps, .rd_valid, .rd_addr, .rd_par,
    .cp_valid, .cp_i, .cp_j, .cp_k, .cp_addr, .cp_par, .finished);

  system_ctrl #(.NX(NX), .NY(NY), .NZ(NZ), .SRC_X(2), .SRC_Y(0), .SRC_Z(1),
                .OBS_X(1), .OBS_Y(2), .OBS_Z(0)) dut (
    .clk, .rst_n, .start, .n_steps, .busy, .done, .go,
    .rd_addr, .rd_par, .cp_valid, .cp_i, .cp_j, .cp_k, .cp_addr, .cp_par, .finished,
    .data_dvld, .loc_indicator, .faces, .src, .obs,
    .raddr_ram, .ram_rd_sel, .waddr_ram, .ram_we_sel, .clearing, .we1, .we2);

  logic v1, v2;
  logic [4:0] a1, a2;
  logic p1, p2;
  always_ff @(posedge clk) begin
    v1 <= rst_n && cp_valid; v2 <= v1;
    a1 <= cp_addr; a2 <= a1;
    p1 <= cp_par;  p2 <= p1;
  end
  always_comb data_dvld = v2;

  int checks = 0, failures = 0;
  int busy_cycles, cyc, clr_writes, n_src, n_obs, n_go, loc_cnt [4], writes, t_start, t_done;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (clearing) begin
      chk(we1 && we2 && waddr_ram == 5'(clr_writes), "clear write");
      clr_writes++;
    end
    if (go) n_go++;
    chk(raddr_ram == rd_addr, "raddr");
    if (cp_valid) begin
      int m;
      m = int'(cp_i == 0 || cp_i == 2) + int'(cp_j == 0 || cp_j == 2) + int'(cp_k == 0 || cp_k == 2);
      chk(int'(loc_indicator) == m, "loc_indicator");
      chk(faces.left == (cp_i == 0) && faces.right == (cp_i == 2) && faces.front == (cp_j == 0)
          && faces.back == (cp_j == 2) && faces.down == (cp_k == 0) && faces.top == (cp_k == 2), "faces");
      if (cp_par == 0) loc_cnt[m]++;
      chk(src == (cp_addr == 5'(2 + 3 * (0 + 3 * 1))), "src");
      if (src) n_src++;
    end else chk(!src, "src idle");
    if (!clearing) begin
      chk(we1 == (v2 && p2) && we2 == (v2 && !p2), "write enables");
      if (v2) begin
        chk(waddr_ram == a2 && waddr_ram == 5'(writes % N), "waddr");
        writes++;
      end
    end
    chk(obs == (v2 && a2 == 5'(1 + 3 * (2 + 3 * 0))), "obs");
    if (obs) n_obs++;
    if (done) t_done = cyc;
    if (busy) busy_cycles++;
  end

  initial begin
    start = 0; n_steps = STEPS;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    @(posedge clk iff done);
    @(negedge clk);
    chk(clr_writes == N && n_go == 1 && writes == STEPS * N, "counts");
    chk(n_src == STEPS && n_obs == STEPS, "src/obs per step");
    chk(loc_cnt[0] == 2 && loc_cnt[1] == 12 && loc_cnt[2] == 24 && loc_cnt[3] == 16, "grid types");
    chk(busy_cycles == N + 1 + LAG + STEPS * N + 1 + CU_LATENCY, "run length");
    // n_steps = 0: clear only
    n_go = 0; clr_writes = 0; writes = 0;
    n_steps = 0;
    @(negedge clk); start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    @(posedge clk iff done);
    @(negedge clk);
    chk(n_go == 0 && clr_writes == N && writes == 0 && !busy, "zero steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
