// tb_neighbour_buffer: the seven outputs for every grid of a 4 x 3 x 4 room.
//
// Streams tagged words (1000 * step + grid index) in raster order, two time
// steps back to back, and for each grid that has reached the centre tap
// (NX*NY+1 cycles after it entered) drives its faces and checks the six
// neighbour outputs and the centre against the tags of its neighbours, with
// a neighbour outside the room replaced by the opposite one.
module tb_neighbour_buffer;
  import fdtd_pkg::*;
  localparam int NX = 4, NY = 3, NZ = 4, NM = NX * NY, N = NM * NZ;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [31:0] x, pr, pl, pf, pb, pt, pd, p_1;
  faces_t faces;

  neighbour_buffer #(.DATA_W(32), .NX(NX), .NY(NY)) dut (
    .clk, .rst_n, .en(1'b1), .x, .faces, .pr, .pl, .pf, .pb, .pt, .pd, .p_1
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tag(int s, int i, int j, int k);
    return 1000 * s + i + NX * (j + NY * k);
  endfunction

  task automatic expect_eq(string nm, logic signed [31:0] got, int e);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", nm, got, e);
    end
  endtask

  initial begin
    x = 0; faces = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cycle c: x = tag of stream element c; centre at c - (NM+1)
    for (int c = 0; c < 2 * N + NM + 1; c++) begin
      int g, s, i, j, k;
      @(negedge clk);
      x = (c < 2 * N) ? 1000 * (c / N) + (c % N) : -1;
      g = c - (NM + 1);
      if (g >= 0) begin
        s = g / N;
        i = (g % N) % NX; j = ((g % N) / NX) % NY; k = (g % N) / NM;
        faces.left = (i == 0); faces.right = (i == NX - 1);
        faces.front = (j == 0); faces.back = (j == NY - 1);
        faces.down = (k == 0); faces.top = (k == NZ - 1);
        #1;
        expect_eq("p_1", p_1, tag(s, i, j, k));
        expect_eq("pr", pr, tag(s, (i == NX - 1) ? i - 1 : i + 1, j, k));
        expect_eq("pl", pl, tag(s, (i == 0) ? i + 1 : i - 1, j, k));
        expect_eq("pb", pb, tag(s, i, (j == NY - 1) ? j - 1 : j + 1, k));
        expect_eq("pf", pf, tag(s, i, (j == 0) ? j + 1 : j - 1, k));
        expect_eq("pt", pt, tag(s, i, j, (k == NZ - 1) ? k - 1 : k + 1));
        expect_eq("pd", pd, tag(s, i, j, (k == 0) ? k + 1 : k - 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
