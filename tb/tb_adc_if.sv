// tb_adc_if: sample capture, sign extension, scaling and hold.
//
// Sends random 14-bit samples at irregular intervals to a two's-complement
// and an offset-binary instance and checks that each one appears, sign
// extended and multiplied by 4, one cycle later and is held until the next.
module tb_adc_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [13:0] adc_data;
  logic adc_valid;
  logic signed [31:0] inc_tc, inc_ob;

  adc_if #(.ADC_W(14), .DATA_W(32), .ADC_SHIFT(2), .OFFSET_BINARY(1'b0)) u_tc (
    .clk, .rst_n, .adc_data, .adc_valid, .incidence(inc_tc));
  adc_if #(.ADC_W(14), .DATA_W(32), .ADC_SHIFT(2), .OFFSET_BINARY(1'b1)) u_ob (
    .clk, .rst_n, .adc_data, .adc_valid, .incidence(inc_ob));

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_tc, e_ob;
    adc_data = 0; adc_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    e_tc = 0; e_ob = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (inc_tc !== e_tc || inc_ob !== e_ob) begin
        failures++;
        if (failures < 10) $display("n %0d: %0d %0d expected %0d %0d", n, inc_tc, inc_ob, e_tc, e_ob);
      end
      adc_valid = ($urandom % 3) == 0;
      adc_data = (n % 7 == 0) ? ((n % 14 == 0) ? 14'h2000 : 14'h1fff) : 14'($urandom);
      if (adc_valid) begin
        int v;
        v = int'(adc_data);
        e_tc = (v >= 8192) ? (v - 16384) * 4 : v * 4;
        e_ob = (v - 8192) * 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
