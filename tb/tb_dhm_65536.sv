// tb_dhm_65536: the engine sized for 65,536 grids (32 x 32 x 64).
//
// This is the largest room the time-sharing system is reported to fit in its
// FPGA. The engine is built with NZ = 64 (all else default) and renders a
// 16,384 pulse at the middle for 12 time steps. Every observation sample is
// compared with the reference model, and one step must take 65,536 cycles
// (3.05 kHz at 200 MHz).
module tb_dhm_65536;
  import fdtd_ref_pkg::*;
  localparam int NX = 32, NY = 32, NZ = 64, N = NX * NY * NZ, STEPS = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_steps;
  logic busy, done, din_req, dataout_valid;
  logic signed [31:0] incidence, dataout;

  always #5 clk = ~clk;

  dhm #(.NZ(NZ)) dut (.*);

  int checks = 0, failures = 0, n_obs = 0, n_req = 0;
  int obs [STEPS];
  longint cyc = 0, last_t = 0;

  always_comb incidence = (n_req == 0) ? 32'sd16384 : 32'sd0;

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && din_req) n_req <= n_req + 1;
    if (rst_n && dataout_valid) begin
      if (n_obs < STEPS) obs[n_obs] = dataout;
      if (n_obs > 0) begin
        checks++;
        if (cyc - last_t != N) failures++;
      end
      last_t = cyc;
      n_obs++;
    end
  end

  initial begin
    fdtd_room room;
    n_steps = STEPS;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff done);
    repeat (3) @(posedge clk);
    checks++;
    if (n_obs != STEPS) failures++;
    room = new(NX, NY, NZ, 62259, NX / 2, NY / 2, NZ / 2);
    for (int s = 0; s < STEPS; s++) begin
      room.step(s == 0 ? 16384 : 0);
      checks++;
      if (obs[s] != room.at(NX / 2, NY / 2, NZ / 2)) begin
        failures++;
        $display("step %0d: got %0d expected %0d", s, obs[s], room.at(NX / 2, NY / 2, NZ / 2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
