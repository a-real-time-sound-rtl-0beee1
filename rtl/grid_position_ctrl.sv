// grid_position_ctrl: the grid counters of the time-sharing engine.
//
// A run of n_steps time steps starts with a one-cycle `go`. Two counters then
// advance one grid per clock in raster order (i fastest, then j, then k):
//   read side     rd_addr 0..N-1 repeated n_steps times, the address streamed
//                 out of the block RAMs, with rd_par the parity of its step;
//   compute side  (cp_i, cp_j, cp_k) and cp_addr of the grid the computing
//                 unit works on, LAG cycles behind the read side (the time the
//                 neighbour buffer needs to hold a grid's k+1 neighbour), with
//                 cp_par, the parity of its time step, which flips each time
//                 the counter has covered all N = NX*NY*NZ grids.
// Both sides run without a gap between steps, so after the initial LAG cycles
// one time step takes exactly N cycles. `finished` pulses in the cycle after
// the last grid of the last step. The document gives the counter that is
// updated every clock and flips the RAM selection when it reaches the number
// of grids; the split into a read side and a lagging compute side is this
// design's way of prefetching into the buffers.
// Requires 1 <= LAG <= N and n_steps >= 1.
module grid_position_ctrl #(
  parameter int NX     = 32,
  parameter int NY     = 32,
  parameter int NZ     = 16,
  parameter int LAG    = NX * NY + 2,
  parameter int STEP_W = 16,
  localparam int N     = NX * NY * NZ,
  localparam int AW    = $clog2(N),
  localparam int XW    = (NX > 1) ? $clog2(NX) : 1,
  localparam int YW    = (NY > 1) ? $clog2(NY) : 1,
  localparam int ZW    = (NZ > 1) ? $clog2(NZ) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [STEP_W-1:0] n_steps,
  output logic              rd_valid,
  output logic [AW-1:0]     rd_addr,
  output logic              rd_par,
  output logic              cp_valid,
  output logic [XW-1:0]     cp_i,
  output logic [YW-1:0]     cp_j,
  output logic [ZW-1:0]     cp_k,
  output logic [AW-1:0]     cp_addr,
  output logic              cp_par,
  output logic              finished
);

  logic [STEP_W-1:0] rd_step, cp_step, steps_q;
  logic              rd_first;  // read side is in the first time step

  // Read side.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_addr  <= '0;
      rd_par   <= 1'b0;
      rd_step  <= '0;
      rd_first <= 1'b0;
      steps_q  <= '0;
    end else if (go) begin
      rd_valid <= 1'b1;
      rd_addr  <= '0;
      rd_par   <= 1'b0;
      rd_step  <= '0;
      rd_first <= 1'b1;
      steps_q  <= n_steps;
    end else if (rd_valid) begin
      if (rd_addr == AW'(N - 1)) begin
        rd_addr  <= '0;
        rd_par   <= ~rd_par;
        rd_step  <= rd_step + 1'b1;
        rd_first <= 1'b0;
        if (rd_step == steps_q - 1'b1) rd_valid <= 1'b0;
      end else begin
        rd_addr <= rd_addr + 1'b1;
      end
    end
  end

  // Compute side: starts when the read side has run LAG cycles.
  logic cp_start;
  always_comb cp_start = rd_valid && rd_first && (rd_addr == AW'(LAG - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_valid <= 1'b0;
      cp_i     <= '0;
      cp_j     <= '0;
      cp_k     <= '0;
      cp_addr  <= '0;
      cp_par   <= 1'b0;
      cp_step  <= '0;
      finished <= 1'b0;
    end else begin
      finished <= 1'b0;
      if (cp_start) begin
        cp_valid <= 1'b1;
        cp_i     <= '0;
        cp_j     <= '0;
        cp_k     <= '0;
        cp_addr  <= '0;
        cp_par   <= 1'b0;
        cp_step  <= '0;
      end else if (cp_valid) begin
        if (cp_addr == AW'(N - 1)) begin
          cp_addr <= '0;
          cp_i    <= '0;
          cp_j    <= '0;
          cp_k    <= '0;
          cp_par  <= ~cp_par;
          cp_step <= cp_step + 1'b1;
          if (cp_step == steps_q - 1'b1) begin
            cp_valid <= 1'b0;
            finished <= 1'b1;
          end
        end else begin
          cp_addr <= cp_addr + 1'b1;
          if (cp_i == XW'(NX - 1)) begin
            cp_i <= '0;
            if (cp_j == YW'(NY - 1)) begin
              cp_j <= '0;
              cp_k <= cp_k + 1'b1;
            end else begin
              cp_j <= cp_j + 1'b1;
            end
          end else begin
            cp_i <= cp_i + 1'b1;
          end
        end
      end
    end
  end

  // The counters must stay consistent: the linear address is the raster
  // position of (i, j, k).
  a_pos_consistent: assert property (@(posedge clk) disable iff (!rst_n)
    cp_valid |-> (32'(cp_addr) == 32'(cp_i) + NX * (32'(cp_j) + NY * 32'(cp_k))));

endmodule
