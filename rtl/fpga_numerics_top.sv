// fpga_numerics_top: the two numerical engines of the design side by side.
//
//   * fdtd_array   - a 2-D FDTD electromagnetic simulator in which every
//                    Yee cell has its own single-adder circuit and its own
//                    512-iteration Ez record; 65 cells at the defaults.
//   * euler_solver - a Forward Euler integrator for one linear first-order
//                    differential equation, dy/dt = a*y + b.
//
// The two share only the clock and the reset; each has its own ports,
// prefixed fdtd_ and ode_. All numbers are IEEE-754 single precision and the
// clock is meant to run at 100 MHz, the rate the original design assumes. The
// seven-equation cAMP reaction-network solver, which the original design builds from
// the Euler circuit, is not part of this RTL.
// See fdtd_array and euler_solver for the timing of each engine.
module fpga_numerics_top
  import fp32_pkg::*;
  import fdtd_pkg::*;
#(
  parameter int unsigned NX          = 13,
  parameter int unsigned NY          = 5,
  parameter int unsigned MAX_ITER    = 512,
  parameter int unsigned ADD_LATENCY = 3,
  parameter int unsigned MUL_LATENCY = 3,
  parameter int unsigned STEP_W      = 16,
  localparam int unsigned NCELL      = NX * NY,
  localparam int unsigned CW         = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned IW         = $clog2(MAX_ITER + 1),
  localparam int unsigned AW         = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // FDTD engine
  input  logic              fdtd_load_en,
  input  logic [CW-1:0]     fdtd_load_cell,
  input  field_sel_t        fdtd_load_sel,
  input  logic [31:0]       fdtd_load_data,
  input  logic              fdtd_start,
  input  logic [IW-1:0]     fdtd_n_iter,
  output logic              fdtd_busy,
  output logic              fdtd_done,
  output logic [IW-1:0]     fdtd_iter,
  input  logic [CW-1:0]     fdtd_rd_cell,
  input  logic [AW-1:0]     fdtd_rd_addr,
  output logic [31:0]       fdtd_rd_data,
  // Forward Euler engine
  input  logic              ode_start,
  input  fp32_t             ode_y0,
  input  fp32_t             ode_a,
  input  fp32_t             ode_b,
  input  fp32_t             ode_h,
  input  logic [STEP_W-1:0] ode_n_steps,
  output logic              ode_busy,
  output logic              ode_done,
  output logic              ode_y_valid,
  output fp32_t             ode_y,
  output logic [STEP_W-1:0] ode_y_step
);

  fdtd_array #(
    .NX          (NX),
    .NY          (NY),
    .MAX_ITER    (MAX_ITER),
    .ADD_LATENCY (ADD_LATENCY)
  ) u_fdtd (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_en   (fdtd_load_en),
    .load_cell (fdtd_load_cell),
    .load_sel  (fdtd_load_sel),
    .load_data (fdtd_load_data),
    .start     (fdtd_start),
    .n_iter    (fdtd_n_iter),
    .busy      (fdtd_busy),
    .done      (fdtd_done),
    .iter      (fdtd_iter),
    .rd_cell   (fdtd_rd_cell),
    .rd_addr   (fdtd_rd_addr),
    .rd_data   (fdtd_rd_data)
  );

  euler_solver #(
    .ADD_LATENCY (ADD_LATENCY),
    .MUL_LATENCY (MUL_LATENCY),
    .STEP_W      (STEP_W)
  ) u_ode (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (ode_start),
    .y0      (ode_y0),
    .coef_a  (ode_a),
    .coef_b  (ode_b),
    .h       (ode_h),
    .n_steps (ode_n_steps),
    .busy    (ode_busy),
    .done    (ode_done),
    .y_valid (ode_y_valid),
    .y_out   (ode_y),
    .y_step  (ode_y_step)
  );

endmodule
