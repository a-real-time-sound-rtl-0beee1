// tb_sound_render_top: the whole chain on a 6 x 5 x 4 room, end to end.
//
// A/D samples arrive every 37 cycles (random at first, then a full-scale
// constant); the engine renders 90 time steps; its observation stream is
// looped from the inter-FPGA port back into the board-to-board port, as in a
// single-chip build, and the D/A word is checked. Every observation sample is
// compared with the reference model fed with the sample the A/D side held
// when the engine read it. Counts each mechanism of the design and fails if
// one never happened: RAM clearing, RAM ping-pong swaps, general/face/edge/
// corner updates, multiplier use and bypass, the round-toward-zero
// correction, source injection, overlapping steps, a held A/D sample read in
// several steps, and D/A clipping. A second run checks the RAMs are cleared.
module tb_sound_render_top;
  import fdtd_ref_pkg::*;
  import fdtd_pkg::*;
  localparam int NX = 6, NY = 5, NZ = 4, N = NX * NY * NZ, STEPS = 90;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, adc_valid, din_req, edt_valid, atca_valid, dac_clip;
  logic [15:0] n_steps;
  logic [13:0] adc_data;
  logic signed [31:0] edt_data, atca_data;
  logic signed [15:0] dac_data;

  sound_render_top #(.NX(NX), .NY(NY), .NZ(NZ)) dut (.*);

  // single-chip loop-back of the inter-FPGA link
  always_comb begin
    atca_data  = edt_data;
    atca_valid = edt_valid;
  end

  int checks = 0, failures = 0;
  int n_clear, n_swap, n_loc [4], n_rtz, n_src, n_overlap, n_hold_reuse, n_clip, n_obs;
  int held, inc_at_req [STEPS], obs [STEPS], n_req, last_req_val, cyc;
  logic last_we_sel;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%s", msg);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A/D side: a sample every 37 cycles.
  always @(negedge clk) begin
    cyc++;
    adc_valid = (cyc % 37 == 0);
    if (adc_valid) adc_data = (cyc < 4000) ? 14'($urandom) : 14'h1fff;
  end

  // The sample the A/D side holds: taken at the clock edge that sees adc_valid.
  always @(posedge clk)
    if (adc_valid) held <= (int'(adc_data) >= 8192 ? int'(adc_data) - 16384 : int'(adc_data)) * 4;

  // Monitors.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dhm.clearing) n_clear++;
    if (dut.u_dhm.data_dvld) begin
      if (dut.u_dhm.ram_we_sel != last_we_sel) n_swap++;
      last_we_sel <= dut.u_dhm.ram_we_sel;
    end
    if (dut.u_dhm.cp_valid) begin
      n_loc[dut.u_dhm.loc_indicator]++;
      if (dut.u_dhm.loc_indicator == LOC_GENERAL && dut.u_dhm.u_cu.r_sum < 0
          && dut.u_dhm.u_cu.r_sum[1:0] != 0) n_rtz++;
      if (dut.u_dhm.rd_valid && dut.u_dhm.rd_par != dut.u_dhm.cp_par) n_overlap++;
    end
    if (din_req) begin
      if (n_req > 0 && n_req < STEPS && held == last_req_val) n_hold_reuse++;
      if (n_req < STEPS) inc_at_req[n_req] = held;
      last_req_val = held;
      n_req++;
      n_src++;
    end
    if (edt_valid) begin
      if (n_obs < STEPS) obs[n_obs] = edt_data;
      n_obs++;
    end
  end

  // D/A side: the held word follows the looped-back stream.
  always @(posedge clk) if (rst_n && atca_valid) begin
    longint v;
    v = longint'(atca_data);
    #1;
    chk(dac_data == 16'(v > 32767 ? 32767 : (v < -32768 ? -32768 : v)), "dac word");
    chk(dac_clip == (v > 32767 || v < -32768), "dac clip");
    if (dac_clip) n_clip++;
  end

  initial begin
    fdtd_room room;
    start = 0; n_steps = STEPS; adc_data = 0; held = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      n_req = 0; n_obs = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      @(posedge clk iff done);
      repeat (3) @(posedge clk);
      chk(n_req == STEPS && n_obs == STEPS, "one source read and one output per step");
      room = new(NX, NY, NZ, 62259, NX / 2, NY / 2, NZ / 2);
      for (int s = 0; s < STEPS; s++) begin
        room.step(inc_at_req[s]);
        chk(obs[s] == room.at(NX / 2, NY / 2, NZ / 2), $sformatf("run %0d step %0d: got %0d expected %0d",
            run, s, obs[s], room.at(NX / 2, NY / 2, NZ / 2)));
      end
    end
    $display("clear %0d swap %0d general %0d face %0d edge %0d corner %0d rtz %0d src %0d overlap %0d hold %0d clip %0d",
             n_clear, n_swap, n_loc[0], n_loc[1], n_loc[2], n_loc[3], n_rtz, n_src, n_overlap, n_hold_reuse, n_clip);
    chk(n_clear == 2 * N, "RAM clearing");
    chk(n_swap > 0, "RAM ping-pong");
    chk(n_loc[0] > 0 && n_loc[1] > 0, "general and face grids");
    chk(n_loc[2] > 0 && n_loc[3] > 0, "edge and corner grids");
    chk(n_rtz > 0, "round-toward-zero correction");
    chk(n_src == 2 * STEPS, "source injection");
    chk(n_overlap > 0, "overlapping steps");
    chk(n_hold_reuse > 0, "held A/D sample");
    chk(n_clip > 0, "D/A clipping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
