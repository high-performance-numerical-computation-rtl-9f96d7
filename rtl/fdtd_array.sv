// fdtd_array: a two-dimensional FDTD (TMz) simulator made of NX x NY Yee-cell
// circuits that all run at once.
//
// Every grid point has its own yee_cell (one floating-point adder each) and
// its own field_history_ram. One fdtd_control sequences all cells in lock
// step: the H half step of every cell, then the E half step, then the
// recording of every cell's Ez for that iteration. Cells exchange fields
// only with their grid neighbours: a cell reads Ez of the cells at i+1 and
// j+1 and Hy at i-1 and Hx at j-1. Outside the grid those fields are zero,
// which makes the grid edge a perfect electric conductor (a design choice;
// no boundary is specified by the original design).
//
// Default size: 65 cells (13 x 5) and 512 recorded iterations, the number of
// Yee cells and iterations the original design reports fitting in one Xilinx
// XC2V4000; the 13 x 5 shape of the grid is this design's choice. With an
// adder latency of 3 an iteration takes 36 cycles, so 512 iterations take
// 18,432 cycles, 184 us at the 100 MHz clock of the original design.
//
// Interface:
//   load_en/load_cell/load_sel/load_data  write one cell register while idle
//                                        (cell index = j*NX + i)
//   start, n_iter                        run n_iter (1..MAX_ITER) iterations
//   busy, done, iter                     status; done pulses once at the end
//   rd_cell, rd_addr -> rd_data          read Ez of cell rd_cell after
//                                        iteration rd_addr; rd_data is valid
//                                        one clock after the address
module fdtd_array
  import fp32_pkg::*;
  import fdtd_pkg::*;
#(
  parameter int unsigned NX          = 13,
  parameter int unsigned NY          = 5,
  parameter int unsigned MAX_ITER    = 512,
  parameter int unsigned ADD_LATENCY = 3,
  localparam int unsigned NCELL      = NX * NY,
  localparam int unsigned CW         = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned IW         = $clog2(MAX_ITER + 1),
  localparam int unsigned AW         = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host load port
  input  logic          load_en,
  input  logic [CW-1:0] load_cell,
  input  field_sel_t    load_sel,
  input  logic [31:0]   load_data,
  // run control
  input  logic          start,
  input  logic [IW-1:0] n_iter,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] iter,
  // history read-back
  input  logic [CW-1:0] rd_cell,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data
);

  fp32_t ez_f [NX][NY];
  fp32_t hx_f [NX][NY];
  fp32_t hy_f [NX][NY];
  logic  [NCELL-1:0] cell_busy;
  logic  [31:0] hist_q [NCELL];

  logic          start_h, start_e, rec_we;
  logic [AW-1:0] rec_addr;

  fdtd_control #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .n_iter     (n_iter),
    .cells_busy (|cell_busy),
    .start_h    (start_h),
    .start_e    (start_e),
    .rec_we     (rec_we),
    .rec_addr   (rec_addr),
    .iter       (iter),
    .busy       (busy),
    .done       (done)
  );

  for (genvar i = 0; i < NX; i++) begin : g_x
    for (genvar j = 0; j < NY; j++) begin : g_y
      localparam int unsigned IDX = j * NX + i;
      fp32_t ez_xp, ez_yp, hy_xm, hx_ym;

      assign ez_xp = (i + 1 < NX) ? ez_f[(i + 1) % NX][j] : FP32_POS_ZERO;
      assign ez_yp = (j + 1 < NY) ? ez_f[i][(j + 1) % NY] : FP32_POS_ZERO;
      assign hy_xm = (i > 0) ? hy_f[(i + NX - 1) % NX][j] : FP32_POS_ZERO;
      assign hx_ym = (j > 0) ? hx_f[i][(j + NY - 1) % NY] : FP32_POS_ZERO;

      yee_cell #(.ADD_LATENCY(ADD_LATENCY)) u_cell (
        .clk       (clk),
        .rst_n     (rst_n),
        .load_en   (load_en && !busy && load_cell == CW'(IDX)),
        .load_sel  (load_sel),
        .load_data (load_data),
        .start_h   (start_h),
        .start_e   (start_e),
        .busy      (cell_busy[IDX]),
        .ez_xp     (ez_xp),
        .ez_yp     (ez_yp),
        .hy_xm     (hy_xm),
        .hx_ym     (hx_ym),
        .ez        (ez_f[i][j]),
        .hx        (hx_f[i][j]),
        .hy        (hy_f[i][j])
      );

      field_history_ram #(.DEPTH(MAX_ITER), .WIDTH(32)) u_hist (
        .clk   (clk),
        .we    (rec_we),
        .waddr (rec_addr),
        .wdata (ez_f[i][j]),
        .raddr (rd_addr),
        .rdata (hist_q[IDX])
      );
    end
  end

  // Read-back multiplexer, aligned with the one-cycle RAM read.
  logic [CW-1:0] rd_cell_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_cell_q <= '0;
    else        rd_cell_q <= rd_cell;
  end

  assign rd_data = (32'(rd_cell_q) < NCELL) ? hist_q[rd_cell_q] : 32'd0;

endmodule
