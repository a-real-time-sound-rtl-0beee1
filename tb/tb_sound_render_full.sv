// tb_sound_render_full: impulse response of the full 32 x 32 x 16 room.
//
// The top runs with all parameters at their defaults (R = 0.95, source and
// observation at the middle grid (16, 16, 8)). The A/D side holds 4096,
// which the interface scales to a 16384 pulse, for the first time step only
// and 0 afterwards; the engine renders 1000 time steps. Every observation
// sample is compared with the reference model, the step period must be
// exactly 16384 cycles, and the response is summarised: its peak and the
// largest magnitude after step 400, which must be under 2% of the peak.
module tb_sound_render_full;
  import fdtd_ref_pkg::*;
  localparam int NX = 32, NY = 32, NZ = 16, N = NX * NY * NZ, STEPS = 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, adc_valid, din_req, edt_valid, atca_valid, dac_clip;
  logic [15:0] n_steps;
  logic [13:0] adc_data;
  logic signed [31:0] edt_data, atca_data;
  logic signed [15:0] dac_data;

  sound_render_top dut (.*);

  always_comb begin
    atca_data  = edt_data;
    atca_valid = edt_valid;
  end

  int checks = 0, failures = 0, n_obs = 0, n_req = 0;
  int obs [STEPS];
  longint cyc = 0, last_t = 0;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && din_req) n_req++;
    if (rst_n && edt_valid) begin
      if (n_obs < STEPS) obs[n_obs] = edt_data;
      if (n_obs > 0) begin
        checks++;
        if (cyc - last_t != N) failures++;
      end
      last_t = cyc;
      n_obs++;
    end
  end

  // A/D: the pulse until the engine has read it once, then silence.
  always @(negedge clk) begin
    adc_valid = 1'b1;
    adc_data = (n_req == 0) ? 14'd4096 : 14'd0;
  end

  initial begin
    fdtd_room room;
    int peak, late;
    start = 0; n_steps = STEPS;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff done);
    repeat (3) @(posedge clk);
    checks++;
    if (n_obs != STEPS || n_req != STEPS) failures++;
    room = new(NX, NY, NZ, 62259, NX / 2, NY / 2, NZ / 2);
    peak = 0; late = 0;
    for (int s = 0; s < STEPS; s++) begin
      int e;
      room.step(s == 0 ? 16384 : 0);
      e = room.at(NX / 2, NY / 2, NZ / 2);
      checks++;
      if (obs[s] != e) begin
        failures++;
        if (failures < 10) $display("step %0d: got %0d expected %0d", s, obs[s], e);
      end
      if ((obs[s] < 0 ? -obs[s] : obs[s]) > peak) peak = obs[s] < 0 ? -obs[s] : obs[s];
      if (s >= 400 && (obs[s] < 0 ? -obs[s] : obs[s]) > late) late = obs[s] < 0 ? -obs[s] : obs[s];
    end
    $display("impulse response: first samples %0d %0d %0d %0d, peak |P| %0d, largest |P| after step 400: %0d",
             obs[0], obs[1], obs[2], obs[3], peak, late);
    // settled: after step 400 the response stays below 2% of its peak
    checks++;
    if (late * 50 > peak) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
