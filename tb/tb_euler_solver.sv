// tb_euler_solver: self-checking testbench for the Forward Euler circuit.
// Solves dy/dt = a*y + b for several random decaying and growing equations
// and compares every y(k) with y(k-1) + h*(a*y(k-1) + b) evaluated by
// fp_ref_pkg, step index included. It checks that step k is reported
// 16*k + 1 cycles after the start (16 cycles per step) and that done comes
// with the last step.
module tb_euler_solver;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fp32_t       y0 = '0, coef_a = '0, coef_b = '0, h = '0, y_out;
  logic [15:0] n_steps = '0, y_step;
  logic        busy, done, y_valid;
  int          checks = 0, failures = 0;
  longint      cycle = 0;

  euler_solver #(.ADD_LATENCY(3), .MUL_LATENCY(3), .STEP_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic integrate(logic [31:0] yi, logic [31:0] a, logic [31:0] b, logic [31:0] hh, int n);
    logic [31:0] yr;
    longint      t0;
    int          k;
    y0 = yi; coef_a = a; coef_b = b; h = hh; n_steps = 16'(n);
    start = 1'b1;
    t0 = cycle;
    @(posedge clk);
    #1 start = 1'b0;
    yr = yi;
    k = 0;
    while (k < n) begin
      @(posedge clk);
      #1;
      if (y_valid) begin
        k++;
        yr = add(yr, mul(hh, add(mul(a, yr), b, 1'b0)), 1'b0);
        checks++;
        if (y_out !== yr || int'(y_step) != k)
          fail($sformatf("step %0d: y=%h (step %0d), expected %h", k, y_out, y_step, yr));
        checks++;
        if (cycle - t0 != longint'(16 * k + 1))
          fail($sformatf("step %0d at cycle %0d, expected %0d", k, cycle - t0, 16 * k + 1));
        checks++;
        if (done != (k == n)) fail("done misplaced");
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (busy) fail("busy after the last step");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // dy/dt = -2y + 1, y0 = 0, h = 0.05: relaxes towards 0.5
    integrate(32'h00000000, 32'hC0000000, 32'h3F800000, 32'h3D4CCCCD, 100);
    for (int r = 0; r < 10; r++)
      integrate(rand_fp(120, 130), rand_fp(118, 128), rand_fp(118, 128), rand_fp(115, 122), 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
