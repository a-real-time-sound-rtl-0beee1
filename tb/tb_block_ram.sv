// tb_block_ram: writes and reads of the one-read one-write memory.
//
// Fills a 256-word memory with random words, reads all of them back (one
// cycle read latency), then runs random simultaneous reads and writes to
// different addresses against a model array, and checks that a read of the
// address being written returns the old word.
module tb_block_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] raddr, waddr;
  logic [31:0] dout, wdin;
  logic we;

  block_ram #(.DATA_W(32), .DEPTH(256)) dut (.clk, .raddr, .dout, .we, .waddr, .wdin);

  int checks = 0, failures = 0;
  logic [31:0] model [256];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    we = 0; raddr = 0; waddr = 0; wdin = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdin = $urandom; model[a] = wdin;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      we = $urandom % 2;
      waddr = (n % 50 == 0) ? raddr : 8'($urandom);
      wdin = $urandom;
      expv = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdin;
      #1;
      checks++;
      if (dout !== expv) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", raddr, dout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
