// delay_line: delays a data stream by a fixed number of clock cycles.
//
// dout in the cycle after the k-th enabled clock edge equals the din that was
// sampled DEPTH enabled edges earlier. A long delay is kept in a circular
// memory of DEPTH-1 words with one read and one write per cycle (read before
// write at the same address) followed by an output register, so it maps onto
// a block or distributed RAM; DEPTH 1 is a plain register and DEPTH 0 a wire.
// The engine uses it as Buffer-P^{n-2} and, in segments, as the buffer that
// holds the neighbours of the grid being computed, both of which the document
// shows; building them as circular memories is this design's choice.
// The memory is not reset: its first DEPTH outputs after reset are undefined.
module delay_line #(
  parameter int DATA_W = 32,
  parameter int DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else if (DEPTH == 1) begin : g_reg
    always_ff @(posedge clk) if (en) dout <= din;
  end else begin : g_mem
    localparam int L  = DEPTH - 1;
    localparam int AW = (L > 1) ? $clog2(L) : 1;
    logic [DATA_W-1:0] mem [L];
    logic [AW-1:0]     ptr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     ptr <= '0;
      else if (en) ptr <= (ptr == AW'(L - 1)) ? '0 : ptr + AW'(1);
    end

    always_ff @(posedge clk) begin
      if (en) begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
      end
    end
  end

endmodule
