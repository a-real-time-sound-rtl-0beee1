// dhm: time-sharing HO-FDTD sound rendering engine.
//
// One computing unit updates all N = NX*NY*NZ grids of a rectangular room one
// after another, one grid per clock, so one time step takes N cycles and the
// output sample rate is f_clk / N (12.2 kHz at 200 MHz for 32x32x16 grids).
// Two block RAMs hold the pressures of the two latest time steps. In a step
// the newer one (P^n) is streamed in raster order into the neighbour buffer,
// which presents the six neighbours and the grid itself to the computing
// unit; the older one (P^{n-1}) is read at the same address into
// Buffer-P^{n-2}, which delays it to the same grid, and the new pressure
// P^{n+1} overwrites it there. At the end of a step the roles of the two RAMs
// swap (ram_we_sel). Reading runs NX*NY+2 cycles ahead of computing, and the
// next step's reads start while the last grids of a step are still being
// computed: the addresses they read were written long before, so there is no
// gap between steps.
//
// The incident sample is read on `incidence` in the cycle `din_req` is high
// (once per step, when the source grid is computed) and added to that grid's
// new pressure. The new pressure of the observation grid appears on `dataout`
// with `dataout_valid` for one cycle per step. A run: pulse `start` with
// n_steps; both RAMs are cleared (N cycles), the steps run, `done` pulses.
//
// From the document: the blocks and their connections (Fig. 6), the update
// equations, 32-bit data, one grid per clock, the RAM ping-pong, the grid
// size and R = 0.95, source and observation at the middle of the space. This
// design's choices: the buffer organisation, the overlap of steps, clearing
// before a run, the soft source and the handshake.
//
// Latency: the first dataout of a run comes N + (NX*NY + 2) + OBS_ADDR +
// CU_LATENCY + 1 cycles after `start` is sampled, then one every N cycles.
module dhm
  import fdtd_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int NX       = 32,
  parameter int NY       = 32,
  parameter int NZ       = 16,
  parameter int REFL_Q16 = 62259,   // reflection factor R in Q0.16 (0.95)
  parameter int SRC_X    = NX / 2,
  parameter int SRC_Y    = NY / 2,
  parameter int SRC_Z    = NZ / 2,
  parameter int OBS_X    = NX / 2,
  parameter int OBS_Y    = NY / 2,
  parameter int OBS_Z    = NZ / 2,
  parameter int STEP_W   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [STEP_W-1:0]        n_steps,
  output logic                     busy,
  output logic                     done,
  input  logic signed [DATA_W-1:0] incidence,
  output logic                     din_req,
  output logic signed [DATA_W-1:0] dataout,
  output logic                     dataout_valid
);

  localparam int N   = NX * NY * NZ;
  localparam int AW  = $clog2(N);
  localparam int XW  = (NX > 1) ? $clog2(NX) : 1;
  localparam int YW  = (NY > 1) ? $clog2(NY) : 1;
  localparam int ZW  = (NZ > 1) ? $clog2(NZ) : 1;
  // Read-to-compute lag: one cycle of RAM read, NX*NY+1 cycles in the buffer.
  localparam int LAG = NX * NY + 2;

  // Multiplicands from the reflection factor.
  localparam logic signed [COEF_W-1:0] MC1 = coef_sum(REFL_Q16, 1);
  localparam logic signed [COEF_W-1:0] MC2 = coef_sum(REFL_Q16, 2);
  localparam logic signed [COEF_W-1:0] MC3 = coef_sum(REFL_Q16, 3);
  localparam logic signed [COEF_W-1:0] MC4 = coef_old(REFL_Q16, 1);
  localparam logic signed [COEF_W-1:0] MC5 = coef_old(REFL_Q16, 2);
  localparam logic signed [COEF_W-1:0] MC6 = coef_old(REFL_Q16, 3);

  // Grid position controller.
  logic          go, rd_valid, rd_par, cp_valid, cp_par, finished;
  logic [AW-1:0] rd_addr, cp_addr;
  logic [XW-1:0] cp_i;
  logic [YW-1:0] cp_j;
  logic [ZW-1:0] cp_k;

  grid_position_ctrl #(
    .NX(NX), .NY(NY), .NZ(NZ), .LAG(LAG), .STEP_W(STEP_W)
  ) u_grid_pos (
    .clk, .rst_n, .go, .n_steps,
    .rd_valid, .rd_addr, .rd_par,
    .cp_valid, .cp_i, .cp_j, .cp_k, .cp_addr, .cp_par, .finished
  );

  // System controller.
  loc_t          loc_indicator;
  faces_t        faces;
  logic          src, obs, data_dvld, ram_rd_sel, ram_we_sel, clearing, we1, we2;
  logic [AW-1:0] raddr_ram, waddr_ram;

  system_ctrl #(
    .NX(NX), .NY(NY), .NZ(NZ),
    .SRC_X(SRC_X), .SRC_Y(SRC_Y), .SRC_Z(SRC_Z),
    .OBS_X(OBS_X), .OBS_Y(OBS_Y), .OBS_Z(OBS_Z), .STEP_W(STEP_W)
  ) u_sys_ctrl (
    .clk, .rst_n, .start, .n_steps, .busy, .done,
    .go, .rd_addr, .rd_par,
    .cp_valid, .cp_i, .cp_j, .cp_k, .cp_addr, .cp_par, .finished,
    .data_dvld, .loc_indicator, .faces, .src, .obs,
    .raddr_ram, .ram_rd_sel, .waddr_ram, .ram_we_sel, .clearing, .we1, .we2
  );

  // Block RAMs.
  logic signed [DATA_W-1:0] ram1_dout, ram2_dout, cu_dout, wdin;

  always_comb wdin = clearing ? '0 : cu_dout;

  block_ram #(.DATA_W(DATA_W), .DEPTH(N), .AW(AW)) u_block_ram_1 (
    .clk, .raddr(raddr_ram), .dout(ram1_dout), .we(we1), .waddr(waddr_ram), .wdin(wdin)
  );
  block_ram #(.DATA_W(DATA_W), .DEPTH(N), .AW(AW)) u_block_ram_2 (
    .clk, .raddr(raddr_ram), .dout(ram2_dout), .we(we2), .waddr(waddr_ram), .wdin(wdin)
  );

  // Output multiplexers: the newer step to the neighbour buffer, the older
  // one to Buffer-P^{n-2}.
  logic signed [DATA_W-1:0] p_new, p_old;
  always_comb begin
    p_new = ram_rd_sel ? ram2_dout : ram1_dout;
    p_old = ram_rd_sel ? ram1_dout : ram2_dout;
  end

  // Buffers.
  logic signed [DATA_W-1:0] pr, pl, pf, pb, pt, pd, p_1, p_2;

  neighbour_buffer #(.DATA_W(DATA_W), .NX(NX), .NY(NY)) u_nb_buf (
    .clk, .rst_n, .en(1'b1), .x(p_new), .faces,
    .pr, .pl, .pf, .pb, .pt, .pd, .p_1
  );

  delay_line #(.DATA_W(DATA_W), .DEPTH(NX * NY + 1)) u_buf_pn2 (
    .clk, .rst_n, .en(1'b1), .din(p_old), .dout(p_2)
  );

  // Computing unit.
  always_comb din_req = src;

  computing_unit #(.DATA_W(DATA_W)) u_cu (
    .clk, .rst_n, .in_valid(cp_valid), .loc_indicator, .src, .din(incidence),
    .pr, .pl, .pf, .pb, .pt, .pd, .p_1, .p_2,
    .multiplicand1(MC1), .multiplicand2(MC2), .multiplicand3(MC3),
    .multiplicand4(MC4), .multiplicand5(MC5), .multiplicand6(MC6),
    .out_valid(data_dvld), .dout(cu_dout)
  );

  // Observation point.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dataout       <= '0;
      dataout_valid <= 1'b0;
    end else begin
      dataout_valid <= obs;
      if (obs) dataout <= cu_dout;
    end
  end

  // The read side only runs inside a run, and outside the clear phase a
  // write goes to the RAM ram_we_sel names.
  a_read_in_run: assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> busy);
  a_we_sel: assert property (@(posedge clk) disable iff (!rst_n)
    !clearing |-> ((!we1 || ram_we_sel) && (!we2 || !ram_we_sel)));

  // Static requirements of the schedule: NZ >= 3 keeps the next step's reads
  // behind this step's writes.
  if (NX < 2 || NY < 2 || NZ < 3) begin : g_size_check
    $error("dhm: grid must be at least 2 x 2 x 3");
  end

endmodule
