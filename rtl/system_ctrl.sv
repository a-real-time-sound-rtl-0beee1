// system_ctrl: computation flow and control signals of the engine.
//
// Flow: after `start` the controller first clears both block RAMs (N cycles
// writing zeros at clr address 0..N-1), so a run starts from a silent space;
// it then pulses `go` to the grid position controller, waits for its
// `finished`, lets the computing unit drain for CU_LATENCY cycles and pulses
// `done`. n_steps = 0 ends right after the clear.
//
// Per grid it produces, from the grid position:
//   raddr_ram      read address for both RAMs (the read side of the stream);
//   ram_rd_sel     which RAM feeds the neighbour buffer, aligned with the RAM
//                  output (0: Block_RAM_1, 1: Block_RAM_2); the other RAM feeds
//                  Buffer-P^{n-2};
//   loc_indicator  grid type, and `faces` for the ghost points;
//   src            the grid is the source point: its incidence is read now;
//   waddr_ram, ram_we_sel, obs
//                  the compute-side address, step parity and "observation
//                  point" flag delayed by CU_LATENCY to line up with data_dvld;
//   we1, we2       write enables: data_dvld gated by ram_we_sel (1 writes
//                  Block_RAM_1, 0 Block_RAM_2), or both while clearing.
// The document names raddr_RAM, waddr_RAM, we, ram_we_sel and loc_indicator
// and says ram_we_sel inverts when a step's grids are done; the clearing
// phase, ram_rd_sel and the start/done handshake are this design's.
module system_ctrl
  import fdtd_pkg::*;
#(
  parameter int NX     = 32,
  parameter int NY     = 32,
  parameter int NZ     = 16,
  parameter int SRC_X  = NX / 2,
  parameter int SRC_Y  = NY / 2,
  parameter int SRC_Z  = NZ / 2,
  parameter int OBS_X  = NX / 2,
  parameter int OBS_Y  = NY / 2,
  parameter int OBS_Z  = NZ / 2,
  parameter int STEP_W = 16,
  localparam int N     = NX * NY * NZ,
  localparam int AW    = $clog2(N),
  localparam int XW    = (NX > 1) ? $clog2(NX) : 1,
  localparam int YW    = (NY > 1) ? $clog2(NY) : 1,
  localparam int ZW    = (NZ > 1) ? $clog2(NZ) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [STEP_W-1:0] n_steps,
  output logic              busy,
  output logic              done,
  // grid position controller
  output logic              go,
  input  logic [AW-1:0]     rd_addr,
  input  logic              rd_par,
  input  logic              cp_valid,
  input  logic [XW-1:0]     cp_i,
  input  logic [YW-1:0]     cp_j,
  input  logic [ZW-1:0]     cp_k,
  input  logic [AW-1:0]     cp_addr,
  input  logic              cp_par,
  input  logic              finished,
  // computing unit
  input  logic              data_dvld,
  output loc_t              loc_indicator,
  output faces_t            faces,
  output logic              src,
  output logic              obs,
  // block RAMs
  output logic [AW-1:0]     raddr_ram,
  output logic              ram_rd_sel,
  output logic [AW-1:0]     waddr_ram,
  output logic              ram_we_sel,
  output logic              clearing,
  output logic              we1,
  output logic              we2
);

  localparam int SRC_ADDR = SRC_X + NX * (SRC_Y + NY * SRC_Z);
  localparam int OBS_ADDR = OBS_X + NX * (OBS_Y + NY * OBS_Z);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [AW-1:0]   clr_addr;
  logic [1:0]      drain_cnt;
  logic [STEP_W-1:0] steps_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      clr_addr  <= '0;
      drain_cnt <= '0;
      steps_q   <= '0;
      go        <= 1'b0;
      done      <= 1'b0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_CLEAR;
          clr_addr <= '0;
          steps_q  <= n_steps;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(N - 1)) begin
            if (steps_q == '0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              go    <= 1'b1;
            end
          end
        end
        S_RUN: if (finished) begin
          state     <= S_DRAIN;
          drain_cnt <= '0;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'(CU_LATENCY - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb busy     = (state != S_IDLE);
  always_comb clearing = (state == S_CLEAR);

  // Read side.
  always_comb raddr_ram = rd_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ram_rd_sel <= 1'b0;
    else        ram_rd_sel <= rd_par;
  end

  // Grid type of the grid being computed.
  always_comb begin
    faces.left    = (cp_i == '0);
    faces.right   = (cp_i == XW'(NX - 1));
    faces.front   = (cp_j == '0);
    faces.back    = (cp_j == YW'(NY - 1));
    faces.down    = (cp_k == '0);
    faces.top     = (cp_k == ZW'(NZ - 1));
    loc_indicator = loc_of(faces);
    src           = cp_valid && (cp_addr == AW'(SRC_ADDR));
  end

  // Write side: compute-side signals delayed to meet data_dvld.
  logic [AW-1:0] addr_pipe [CU_LATENCY];
  logic          par_pipe  [CU_LATENCY];
  logic          obs_pipe  [CU_LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < CU_LATENCY; s++) begin
        addr_pipe[s] <= '0;
        par_pipe[s]  <= 1'b0;
        obs_pipe[s]  <= 1'b0;
      end
    end else begin
      addr_pipe[0] <= cp_addr;
      par_pipe[0]  <= cp_par;
      obs_pipe[0]  <= cp_valid && (cp_addr == AW'(OBS_ADDR));
      for (int s = 1; s < CU_LATENCY; s++) begin
        addr_pipe[s] <= addr_pipe[s-1];
        par_pipe[s]  <= par_pipe[s-1];
        obs_pipe[s]  <= obs_pipe[s-1];
      end
    end
  end

  always_comb begin
    ram_we_sel = par_pipe[CU_LATENCY-1];
    obs        = obs_pipe[CU_LATENCY-1] && data_dvld;
    if (clearing) begin
      waddr_ram = clr_addr;
      we1       = 1'b1;
      we2       = 1'b1;
    end else begin
      waddr_ram = addr_pipe[CU_LATENCY-1];
      we1       = data_dvld &&  ram_we_sel;
      we2       = data_dvld && !ram_we_sel;
    end
  end

  // A run never overlaps the clearing of the RAMs.
  a_no_write_in_clear: assert property (@(posedge clk) disable iff (!rst_n)
    clearing |-> !data_dvld);

endmodule
