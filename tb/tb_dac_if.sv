// tb_dac_if: scaling, clipping and hold of the DAC word.
//
// Sends random 32-bit samples, some inside and many outside the 16-bit range,
// to instances with DAC_SHIFT 0 and 3 and checks the held word and the clip
// flag against a truncating division and explicit limits.
module tb_dac_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [31:0] din;
  logic din_valid;
  logic signed [15:0] d0, d3;
  logic c0, c3;

  dac_if #(.DATA_W(32), .DAC_W(16), .DAC_SHIFT(0)) u0 (.clk, .rst_n, .din, .din_valid, .dac_data(d0), .clip(c0));
  dac_if #(.DATA_W(32), .DAC_W(16), .DAC_SHIFT(3)) u3 (.clk, .rst_n, .din, .din_valid, .dac_data(d3), .clip(c3));

  int checks = 0, failures = 0, clips = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lim(longint v, output logic c);
    c = 0;
    if (v > 32767) begin c = 1; return 32767; end
    if (v < -32768) begin c = 1; return -32768; end
    return int'(v);
  endfunction

  initial begin
    int e0, e3;
    logic ec0, ec3;
    din = 0; din_valid = 0;
    e0 = 0; e3 = 0; ec0 = 0; ec3 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (d0 !== 16'(e0) || d3 !== 16'(e3) || c0 !== ec0 || c3 !== ec3) begin
        failures++;
        if (failures < 10) $display("n %0d: %0d %0d expected %0d %0d", n, d0, d3, e0, e3);
      end
      din_valid = ($urandom % 2) == 0;
      case (n % 4)
        0: din = $signed($urandom) % 40000;
        1: din = $signed($urandom) % 300000;
        2: din = $signed($urandom);
        default: din = -($signed($urandom) % 262150);
      endcase
      if (din_valid) begin
        e0 = lim(longint'(din), ec0);
        e3 = lim(longint'(din) / 8, ec3);
        if (ec0) clips++;
      end
    end
    checks++;
    if (clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
