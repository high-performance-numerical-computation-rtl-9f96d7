// yee_cell: one Yee cell of a two-dimensional FDTD (TMz) simulation, built
// around a single floating-point adder.
//
// Each iteration updates the cell's three field components in two half
// steps, in normalised units (c_h = dt/(mu*dx), c_e = dt/(eps*dx)):
//
//   H half step   Hx <- Hx - c_h * (Ez(i,j+1) - Ez(i,j))
//                 Hy <- Hy + c_h * (Ez(i+1,j) - Ez(i,j))
//   E half step   Ez <- Ez + c_e * ((Hy(i,j) - Hy(i-1,j)) - (Hx(i,j) - Hx(i,j-1)))
//
// All eight additions/subtractions are issued one after another on one
// pipelined fp_add; the multiplications by c_h and c_e are done without
// delay by fp_const_mul, since both coefficients are powers of two. A 3-bit
// op counter steps through the fixed schedule below; the next op is issued
// in the cycle after the previous result was written back, so a half step
// takes 4 * (ADD_LATENCY + 1) cycles.
//
//   op  A        B              sub  dest      op  A      B              sub  dest
//   0   Ez(j+1)  Ez             1    T0        4   Hy     Hy(i-1)        1    T0
//   1   Hx       c_h*T0         1    Hx        5   Hx     Hx(j-1)        1    T1
//   2   Ez(i+1)  Ez             1    T1        6   T0     T1             1    T0
//   3   Hy       c_h*T1         0    Hy        7   Ez     c_e*T0         0    Ez
//
// Interface: start_h / start_e (one-cycle pulses, only while busy is low)
// begin a half step; busy is high until its last result is written. The
// neighbour inputs must hold still during a half step, which the array's
// controller guarantees by running every cell's half steps in lock step.
// load_en writes Ez, Hx, Hy or the coefficient word (see fdtd_pkg) while
// the cell is idle. That the single adder is the cell's only arithmetic
// unit follows the original design; the op order, the schedule and the load format
// are this design's choices.
module yee_cell
  import fp32_pkg::*;
  import fdtd_pkg::*;
#(
  parameter int unsigned ADD_LATENCY = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // host load port
  input  logic       load_en,
  input  field_sel_t load_sel,
  input  logic [31:0] load_data,
  // half-step control
  input  logic       start_h,
  input  logic       start_e,
  output logic       busy,
  // neighbour fields (zero at a perfectly conducting boundary)
  input  fp32_t      ez_xp,   // Ez(i+1, j)
  input  fp32_t      ez_yp,   // Ez(i, j+1)
  input  fp32_t      hy_xm,   // Hy(i-1, j)
  input  fp32_t      hx_ym,   // Hx(i, j-1)
  // own fields
  output fp32_t      ez,
  output fp32_t      hx,
  output fp32_t      hy
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t            state;
  logic [2:0]        pc;
  fp32_t             t0, t1;
  logic signed [7:0] ch_k, ce_k;

  // Operand selection for the current op.
  fp32_t       op_a, op_b_raw, op_b, add_y;
  logic        op_sub, add_v;
  cell_dst_t   op_dst;
  cell_scale_t op_scl;
  logic signed [7:0] scl_k;

  always_comb begin
    op_a     = ez;
    op_b_raw = ez;
    op_sub   = 1'b1;
    op_dst   = DST_T0;
    op_scl   = SCL_NONE;
    unique case (pc)
      3'd0: begin op_a = ez_yp; op_b_raw = ez;    op_sub = 1'b1; op_dst = DST_T0; end
      3'd1: begin op_a = hx;    op_b_raw = t0;    op_sub = 1'b1; op_dst = DST_HX; op_scl = SCL_CH; end
      3'd2: begin op_a = ez_xp; op_b_raw = ez;    op_sub = 1'b1; op_dst = DST_T1; end
      3'd3: begin op_a = hy;    op_b_raw = t1;    op_sub = 1'b0; op_dst = DST_HY; op_scl = SCL_CH; end
      3'd4: begin op_a = hy;    op_b_raw = hy_xm; op_sub = 1'b1; op_dst = DST_T0; end
      3'd5: begin op_a = hx;    op_b_raw = hx_ym; op_sub = 1'b1; op_dst = DST_T1; end
      3'd6: begin op_a = t0;    op_b_raw = t1;    op_sub = 1'b1; op_dst = DST_T0; end
      3'd7: begin op_a = ez;    op_b_raw = t0;    op_sub = 1'b0; op_dst = DST_EZ; op_scl = SCL_CE; end
      default: ;
    endcase
    scl_k = (op_scl == SCL_CE) ? ce_k : ch_k;
  end

  fp32_t scaled_b;

  fp_const_mul u_cmul (
    .a (op_b_raw),
    .k (scl_k),
    .y (scaled_b)
  );

  assign op_b = (op_scl == SCL_NONE) ? op_b_raw : scaled_b;

  fp_add #(.LATENCY(ADD_LATENCY)) u_add (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (state == S_ISSUE),
    .a         (op_a),
    .b         (op_b),
    .sub       (op_sub),
    .out_valid (add_v),
    .y         (add_y)
  );

  // Destination of the op in flight: the op counter does not move while
  // the adder works, so op_dst still names it when the result returns.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      ez    <= FP32_POS_ZERO;
      hx    <= FP32_POS_ZERO;
      hy    <= FP32_POS_ZERO;
      t0    <= FP32_POS_ZERO;
      t1    <= FP32_POS_ZERO;
      ch_k  <= '0;
      ce_k  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (load_en) begin
            unique case (load_sel)
              FLD_EZ:   ez <= load_data;
              FLD_HX:   hx <= load_data;
              FLD_HY:   hy <= load_data;
              FLD_COEF: begin
                ch_k <= load_data[7:0];
                ce_k <= load_data[15:8];
              end
              default: ;
            endcase
          end
          if (start_h) begin
            pc    <= 3'd0;
            state <= S_ISSUE;
          end else if (start_e) begin
            pc    <= 3'd4;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: begin
          if (add_v) begin
            unique case (op_dst)
              DST_T0: t0 <= add_y;
              DST_T1: t1 <= add_y;
              DST_HX: hx <= add_y;
              DST_HY: hy <= add_y;
              DST_EZ: ez <= add_y;
              default: ;
            endcase
            if (pc == 3'd3 || pc == 3'd7) begin
              state <= S_IDLE;
            end else begin
              pc    <= pc + 3'd1;
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Handshake rules: a half step starts only in an idle cell, never both at
  // once, and nothing is loaded during a half step.
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  (start_h || start_e) |-> !busy);
  a_start_one  : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(start_h && start_e));
  a_load_idle  : assert property (@(posedge clk) disable iff (!rst_n)
                                  load_en |-> !busy);

endmodule
