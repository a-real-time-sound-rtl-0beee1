// block_ram: memory with one read port and one write port (Block_RAM_1/2).
//
// Holds the sound pressure of every grid for one time step, DEPTH words of
// DATA_W bits. Read is synchronous: the word at raddr appears on dout in the
// cycle after raddr is presented. A write of wdin to waddr with we high takes
// effect at the clock edge; a read of the same address in the same cycle
// returns the old word (the engine never does both). One read and one write
// port per memory is what the document gives; the read latency is this
// design's choice. The contents are not reset; the engine clears them before
// a run.
module block_ram #(
  parameter int DATA_W = 32,
  parameter int DEPTH  = 16384,
  parameter int AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] dout,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdin
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    dout <= mem[raddr];
    if (we) mem[waddr] <= wdin;
  end

endmodule
