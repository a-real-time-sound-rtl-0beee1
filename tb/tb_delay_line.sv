// tb_delay_line: delays of 0, 1, 2 and 37 cycles, with the enable toggled.
//
// Feeds a random stream and compares each output with the value the stream
// had DEPTH enabled edges earlier, kept in a history queue here. Outputs are
// only compared once DEPTH values have gone in.
module tb_delay_line;
  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;
  logic [15:0] din;
  logic [15:0] d0, d1, d2, d37;

  delay_line #(.DATA_W(16), .DEPTH(0))  u0  (.clk, .rst_n, .en, .din, .dout(d0));
  delay_line #(.DATA_W(16), .DEPTH(1))  u1  (.clk, .rst_n, .en, .din, .dout(d1));
  delay_line #(.DATA_W(16), .DEPTH(2))  u2  (.clk, .rst_n, .en, .din, .dout(d2));
  delay_line #(.DATA_W(16), .DEPTH(37)) u37 (.clk, .rst_n, .en, .din, .dout(d37));

  int checks = 0, failures = 0;
  logic [15:0] hist [$];   // values sampled on enabled edges, newest last

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, int depth);
    if (hist.size() >= depth) begin
      checks++;
      if (got !== hist[hist.size() - depth]) begin
        failures++;
        if (failures < 10) $display("depth %0d: got %h expected %h", depth, got, hist[hist.size() - depth]);
      end
    end
  endtask

  initial begin
    en = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = (n < 100) ? 1'b1 : (($urandom % 4) != 0);
      din = 16'($urandom);
      checks++;
      if (d0 !== din) failures++;
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
      if (en || hist.size() > 0) begin
        chk(d1, 1);
        chk(d2, 2);
        chk(d37, 37);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
