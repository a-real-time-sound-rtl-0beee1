// tb_sound_render_music: streamed music through the full-size system.
//
// The top runs with all parameters at their defaults. Music stands in as a
// two-tone signal (440 Hz and 1250 Hz, near full scale) sampled at 44.1 kHz,
// with the engine clock taken as 200 MHz: the A/D side delivers a new 14-bit
// sample every 4535 cycles. The engine renders 300 time steps. Checks: every
// observation sample against the reference model fed with the sample the A/D
// side held when the engine read it; one step every 16,384 cycles (12.2 kHz
// at 200 MHz, i.e. the engine keeps up with real time at that rate); and the
// D/A word following the rendered stream.
module tb_sound_render_music;
  import fdtd_ref_pkg::*;
  localparam int NX = 32, NY = 32, NZ = 16, N = NX * NY * NZ, STEPS = 300;
  localparam int ADC_PERIOD = 4535;   // 200 MHz / 44.1 kHz

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

  int checks = 0, failures = 0, n_obs = 0, n_req = 0, n_samples = 0;
  int obs [STEPS], inc_at_req [STEPS], held = 0;
  longint cyc = 0, last_t = 0;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A/D side.
  always @(negedge clk) begin
    adc_valid = (cyc % ADC_PERIOD == 0);
    if (adc_valid) begin
      real t;
      int v;
      t = n_samples / 44100.0;
      v = $rtoi(4000.0 * $sin(2.0 * 3.14159265 * 440.0 * t) + 3000.0 * $sin(2.0 * 3.14159265 * 1250.0 * t));
      adc_data = 14'(v);
      n_samples++;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (adc_valid) held <= (int'(adc_data) >= 8192 ? int'(adc_data) - 16384 : int'(adc_data)) * 4;
    if (rst_n && din_req) begin
      if (n_req < STEPS) inc_at_req[n_req] = held;
      n_req++;
    end
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

  // D/A word.
  always @(posedge clk) if (rst_n && atca_valid) begin
    longint v;
    v = longint'(atca_data);
    #1;
    checks++;
    if (dac_data != 16'(v > 32767 ? 32767 : (v < -32768 ? -32768 : v))) failures++;
  end

  initial begin
    fdtd_room room;
    int peak;
    start = 0; n_steps = STEPS;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff done);
    repeat (3) @(posedge clk);
    checks++;
    if (n_obs != STEPS || n_req != STEPS) failures++;
    room = new(NX, NY, NZ, 62259, NX / 2, NY / 2, NZ / 2);
    peak = 0;
    for (int s = 0; s < STEPS; s++) begin
      int e;
      room.step(inc_at_req[s]);
      e = room.at(NX / 2, NY / 2, NZ / 2);
      checks++;
      if (obs[s] != e) begin
        failures++;
        if (failures < 10) $display("step %0d: got %0d expected %0d", s, obs[s], e);
      end
      if ((e < 0 ? -e : e) > peak) peak = e < 0 ? -e : e;
    end
    $display("%0d A/D samples in, %0d rendered samples out, peak |P| %0d", n_samples, n_obs, peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
