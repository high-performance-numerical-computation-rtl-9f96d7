// euler_solver: integrates the linear first-order differential equation
// dy/dt = a*y + b with the Forward Euler method in single precision.
//
// Each step computes y(n+1) = y(n) + h*(a*y(n) + b) as four dependent
// operations on one pipelined multiplier and one pipelined adder:
//   op 0  t = a * y      (fp_mul)
//   op 1  t = t + b      (fp_add)
//   op 2  t = h * t      (fp_mul)
//   op 3  y = y + t      (fp_add)
// Each op is issued in the cycle after the previous result was written, so
// a step takes 2*(MUL_LATENCY + 1) + 2*(ADD_LATENCY + 1) cycles, 16 with
// the default latencies. The use of Forward Euler for a linear first-order
// equation follows the original design; the equation's form, the operation order and
// the interface are this design's choices.
//
// Interface: start (pulse while idle) loads y0, a, b, h and n_steps (>= 1).
// After every step y_valid pulses for one cycle with y_out = y(k) and
// y_step = k (1..n_steps); done pulses together with the last y_valid.
module euler_solver
  import fp32_pkg::*;
#(
  parameter int unsigned ADD_LATENCY = 3,
  parameter int unsigned MUL_LATENCY = 3,
  parameter int unsigned STEP_W      = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  fp32_t             y0,
  input  fp32_t             coef_a,
  input  fp32_t             coef_b,
  input  fp32_t             h,
  input  logic [STEP_W-1:0] n_steps,
  output logic              busy,
  output logic              done,
  output logic              y_valid,
  output fp32_t             y_out,
  output logic [STEP_W-1:0] y_step
);

  typedef enum logic [1:0] {E_IDLE, E_ISSUE, E_WAIT} estate_t;

  estate_t           state;
  logic [1:0]        op;
  fp32_t             y, t, a_q, b_q, h_q;
  logic [STEP_W-1:0] step, n_q;

  logic  use_mul;
  fp32_t mul_a, mul_b, mul_y, add_a, add_b, add_y;
  logic  mul_v, add_v;

  assign use_mul = !op[0];
  assign mul_a   = op[1] ? h_q : a_q;
  assign mul_b   = op[1] ? t : y;
  assign add_a   = op[1] ? y : t;
  assign add_b   = op[1] ? t : b_q;

  fp_mul #(.LATENCY(MUL_LATENCY)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (state == E_ISSUE && use_mul),
    .a         (mul_a),
    .b         (mul_b),
    .out_valid (mul_v),
    .y         (mul_y)
  );

  fp_add #(.LATENCY(ADD_LATENCY)) u_add (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (state == E_ISSUE && !use_mul),
    .a         (add_a),
    .b         (add_b),
    .sub       (1'b0),
    .out_valid (add_v),
    .y         (add_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      op      <= '0;
      y       <= FP32_POS_ZERO;
      t       <= FP32_POS_ZERO;
      a_q     <= FP32_POS_ZERO;
      b_q     <= FP32_POS_ZERO;
      h_q     <= FP32_POS_ZERO;
      step    <= '0;
      n_q     <= '0;
      y_valid <= 1'b0;
      done    <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        E_IDLE: begin
          if (start && n_steps != '0) begin
            y     <= y0;
            a_q   <= coef_a;
            b_q   <= coef_b;
            h_q   <= h;
            n_q   <= n_steps;
            step  <= '0;
            op    <= 2'd0;
            state <= E_ISSUE;
          end
        end
        E_ISSUE: state <= E_WAIT;
        E_WAIT: begin
          if (use_mul ? mul_v : add_v) begin
            if (op == 2'd3) begin
              y       <= add_y;
              y_valid <= 1'b1;
              step    <= step + 1'b1;
              op      <= 2'd0;
              if (step + 1'b1 == n_q) begin
                done  <= 1'b1;
                state <= E_IDLE;
              end else begin
                state <= E_ISSUE;
              end
            end else begin
              t     <= use_mul ? mul_y : add_y;
              op    <= op + 2'd1;
              state <= E_ISSUE;
            end
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign busy   = (state != E_IDLE);
  assign y_out  = y;
  assign y_step = step;

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(start && busy))
    else $error("euler_solver: start while busy");

endmodule
