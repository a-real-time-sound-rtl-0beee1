// tb_grid_position_ctrl: both counters over a 3 x 2 x 3 room for 3 steps.
//
// After `go` the read side must give addresses 0..N-1 three times with the
// step parity, one per cycle, and the compute side the same grids as
// (i, j, k) exactly LAG cycles later; `finished` must pulse once, in the
// cycle after the last computed grid. Run twice, with LAG 8 and with 1.
module tb_grid_position_ctrl;
  localparam int NX = 3, NY = 2, NZ = 3, N = NX * NY * NZ, STEPS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic go8, go1;
  logic [15:0] n_steps;
  logic rdv [2], rdp [2], cpv [2], cpp [2], fin [2];
  logic [4:0] rda [2], cpa [2];
  logic [1:0] ci [2], ck [2];
  logic [0:0] cj [2];

  grid_position_ctrl #(.NX(NX), .NY(NY), .NZ(NZ), .LAG(8)) u8 (
    .clk, .rst_n, .go(go8), .n_steps, .rd_valid(rdv[0]), .rd_addr(rda[0]), .rd_par(rdp[0]),
    .cp_valid(cpv[0]), .cp_i(ci[0]), .cp_j(cj[0]), .cp_k(ck[0]), .cp_addr(cpa[0]),
    .cp_par(cpp[0]), .finished(fin[0]));
  grid_position_ctrl #(.NX(NX), .NY(NY), .NZ(NZ), .LAG(1)) u1 (
    .clk, .rst_n, .go(go1), .n_steps, .rd_valid(rdv[1]), .rd_addr(rda[1]), .rd_par(rdp[1]),
    .cp_valid(cpv[1]), .cp_i(ci[1]), .cp_j(cj[1]), .cp_k(ck[1]), .cp_addr(cpa[1]),
    .cp_par(cpp[1]), .finished(fin[1]));

  task automatic run(int u, int lag);
    int t, fin_seen;
    t = 0; fin_seen = 0;
    // t counts cycles from the first read-side cycle
    while (t < STEPS * N + lag + 5) begin
      #1;
      checks++;
      if (t < STEPS * N) begin
        if (!rdv[u] || rda[u] != 5'(t % N) || rdp[u] != 1'((t / N) % 2)) failures++;
      end else if (rdv[u]) failures++;
      checks++;
      if (t >= lag && t < lag + STEPS * N) begin
        int g;
        g = (t - lag) % N;
        if (!cpv[u] || cpa[u] != 5'(g) || ci[u] != 2'(g % NX) || cj[u] != 1'((g / NX) % NY)
            || ck[u] != 2'(g / (NX * NY)) || cpp[u] != 1'(((t - lag) / N) % 2)) begin
          failures++;
          if (failures < 10) $display("lag %0d t %0d: cp %0d (%0d,%0d,%0d)", lag, t, cpa[u], ci[u], cj[u], ck[u]);
        end
      end else if (cpv[u]) failures++;
      if (fin[u]) begin
        fin_seen++;
        checks++;
        if (t != lag + STEPS * N) failures++;
      end
      t++;
      @(negedge clk);
    end
    checks++;
    if (fin_seen != 1) failures++;
  endtask

  initial begin
    go8 = 0; go1 = 0; n_steps = STEPS;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); go8 = 1;
    @(negedge clk); go8 = 0;
    #0 run(0, 8);
    go1 = 1;
    @(negedge clk); go1 = 0;
    #0 run(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
