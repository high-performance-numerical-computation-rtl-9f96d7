// fdtd_control: the control/counter of the FDTD Yee-cell array.
//
// It counts iterations and runs every cell through the two half steps of
// one iteration in lock step: a start_h pulse, a wait until no cell is
// busy, a start_e pulse, a second wait, and in the cycle the last cell
// finishes, a write of every cell's new Ez into its history RAM at address
// rec_addr (the iteration number). After n_iter iterations it returns to
// idle and pulses done. Because all cells finish a half step together, the
// neighbour fields a cell reads never change under it.
//
// Timing with the default adder latency of 3: a half step keeps the cells
// busy for 16 cycles, plus one start cycle and one cycle in which the
// controller sees them idle, so an iteration takes 36 cycles and a run of
// n_iter iterations ends with done high 36*n_iter + 1 cycles after the
// cycle in which start was high. The original design states that such a controller
// exists and adds no clock cycles to the cell datapath; the phase sequence
// and its handshake are this design's choices.
//
// Interface: start (pulse, ignored while busy or when n_iter is 0), n_iter
// (1..MAX_ITER iterations), cells_busy (OR of all cells' busy), start_h,
// start_e (to all cells), rec_we/rec_addr (to all history RAMs), iter (the
// iteration in progress), busy, done (one-cycle pulse).
module fdtd_control #(
  parameter int unsigned MAX_ITER = 512,
  localparam int unsigned IW      = $clog2(MAX_ITER + 1),
  localparam int unsigned AW      = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] n_iter,
  input  logic          cells_busy,
  output logic          start_h,
  output logic          start_e,
  output logic          rec_we,
  output logic [AW-1:0] rec_addr,
  output logic [IW-1:0] iter,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {C_IDLE, C_H_START, C_H_WAIT, C_E_START, C_E_WAIT} cstate_t;

  cstate_t       state;
  logic [IW-1:0] n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      iter  <= '0;
      n_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (start && n_iter != '0) begin
            iter  <= '0;
            n_q   <= n_iter;
            state <= C_H_START;
          end
        end
        C_H_START: state <= C_H_WAIT;
        C_H_WAIT:  if (!cells_busy) state <= C_E_START;
        C_E_START: state <= C_E_WAIT;
        C_E_WAIT: begin
          if (!cells_busy) begin
            if (iter + 1'b1 == n_q) begin
              state <= C_IDLE;
              done  <= 1'b1;
            end else begin
              iter  <= iter + 1'b1;
              state <= C_H_START;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign start_h  = (state == C_H_START);
  assign start_e  = (state == C_E_START);
  assign rec_we   = (state == C_E_WAIT) && !cells_busy;
  assign rec_addr = iter[AW-1:0];
  assign busy     = (state != C_IDLE);

  a_n_iter_range : assert property (@(posedge clk) disable iff (!rst_n)
                                    (start && state == C_IDLE) |-> n_iter <= IW'(MAX_ITER));

endmodule
