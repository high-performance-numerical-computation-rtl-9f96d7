// tb_fpga_numerics_top: end-to-end testbench of the whole design at its
// default size: a 13 x 5 grid of Yee cells running all 512 iterations its
// record RAMs hold, while the Forward Euler engine integrates an equation
// at the same time. Every Ez value of every cell and iteration is read
// back and compared with a reference FDTD computed by fp_ref_pkg; every
// Euler step is compared with its reference. It checks the FDTD run time
// (36 cycles per iteration plus one: 18,433 cycles, 184 us at 100 MHz) and
// the Euler step time (16 cycles), and counts how often each mechanism
// occurred: H and E half steps, Ez records, per-cell coefficients that
// differ, the conducting grid edge, Euler steps and both engines busy at
// once. A mechanism that never occurred counts as a failure.
module tb_fpga_numerics_top;
  import fp32_pkg::*;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned NX = 13, NY = 5, MAX_ITER = 512, N_ITER = 512;
  localparam int unsigned NCELL = NX * NY, CW = 7, IW = 10, AW = 9;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          load_en = 1'b0, start = 1'b0, busy, done;
  logic [CW-1:0] load_cell = '0, rd_cell = '0;
  field_sel_t    load_sel = FLD_EZ;
  logic [31:0]   load_data = '0, rd_data;
  logic [IW-1:0] n_iter = '0, iter;
  logic [AW-1:0] rd_addr = '0;
  int            checks = 0, failures = 0;
  longint        cycle = 0;

  logic [31:0] m_ez [NX][NY], m_hx [NX][NY], m_hy [NX][NY];
  int          m_ch [NX][NY], m_ce [NX][NY];
  logic [31:0] m_hist [NX][NY][MAX_ITER];

  // Euler engine
  logic        ode_start = 1'b0, ode_busy, ode_done, ode_y_valid;
  fp32_t       ode_y0 = '0, ode_a = '0, ode_b = '0, ode_h = '0, ode_y;
  logic [15:0] ode_n_steps = '0, ode_y_step;
  int          n_h = 0, n_e = 0, n_rec = 0, n_ode = 0, n_both = 0, n_edge = 0, n_mixed = 0;

  fpga_numerics_top dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .fdtd_load_en   (load_en),
    .fdtd_load_cell (load_cell),
    .fdtd_load_sel  (load_sel),
    .fdtd_load_data (load_data),
    .fdtd_start     (start),
    .fdtd_n_iter    (n_iter),
    .fdtd_busy      (busy),
    .fdtd_done      (done),
    .fdtd_iter      (iter),
    .fdtd_rd_cell   (rd_cell),
    .fdtd_rd_addr   (rd_addr),
    .fdtd_rd_data   (rd_data),
    .ode_start      (ode_start),
    .ode_y0         (ode_y0),
    .ode_a          (ode_a),
    .ode_b          (ode_b),
    .ode_h          (ode_h),
    .ode_n_steps    (ode_n_steps),
    .ode_busy       (ode_busy),
    .ode_done       (ode_done),
    .ode_y_valid    (ode_y_valid),
    .ode_y          (ode_y),
    .ode_y_step     (ode_y_step)
  );

  // Mechanism counters, read from the controller's outputs.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_fdtd.start_h) n_h++;
    if (dut.u_fdtd.start_e) n_e++;
    if (dut.u_fdtd.rec_we) n_rec++;
    if (busy && ode_busy) n_both++;
  end

  // Euler engine: dy/dt = -2y + 1 with h = 1/16, checked step by step.
  task automatic ode_job(int n);
    logic [31:0] yr;
    longint      t0;
    int          k;
    ode_y0 = 32'h00000000; ode_a = 32'hC0000000; ode_b = 32'h3F800000; ode_h = 32'h3D800000;
    ode_n_steps = 16'(n);
    ode_start = 1'b1;
    t0 = cycle;
    @(posedge clk);
    #1 ode_start = 1'b0;
    yr = ode_y0;
    k = 0;
    while (k < n) begin
      @(posedge clk);
      #1;
      if (ode_y_valid) begin
        k++;
        n_ode++;
        yr = add(yr, mul(ode_h, add(mul(ode_a, yr), ode_b, 1'b0)), 1'b0);
        checks++;
        if (ode_y !== yr || int'(ode_y_step) != k || cycle - t0 != longint'(16 * k + 1)) begin
          failures++;
          if (failures < 20) $display("FAIL: Euler step %0d y=%h expected %h at cycle %0d", k, ode_y, yr, cycle - t0);
        end
      end
    end
    checks++;
    if (to_real(yr) < 0.49 || to_real(yr) > 0.51) begin
      failures++;
      $display("FAIL: Euler solution %f did not settle at 0.5", to_real(yr));
    end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [31:0] ez_at(int i, int j);
    return (i < 0 || j < 0 || i >= NX || j >= NY) ? 32'd0 : m_ez[i][j];
  endfunction

  // One reference iteration of the whole grid.
  task automatic ref_step(int it);
    logic [31:0] nhx [NX][NY], nhy [NX][NY];
    for (int i = 0; i < NX; i++)
      for (int j = 0; j < NY; j++) begin
        nhx[i][j] = yee_hx(m_hx[i][j], m_ez[i][j], ez_at(i, j + 1), m_ch[i][j]);
        nhy[i][j] = yee_hy(m_hy[i][j], m_ez[i][j], ez_at(i + 1, j), m_ch[i][j]);
      end
    m_hx = nhx;
    m_hy = nhy;
    for (int i = 0; i < NX; i++)
      for (int j = 0; j < NY; j++)
        m_ez[i][j] = yee_ez(m_ez[i][j], m_hx[i][j], m_hy[i][j],
                            (j > 0) ? m_hx[i][j-1] : 32'd0,
                            (i > 0) ? m_hy[i-1][j] : 32'd0, m_ce[i][j]);
    for (int i = 0; i < NX; i++)
      for (int j = 0; j < NY; j++) m_hist[i][j][it] = m_ez[i][j];
  endtask

  task automatic load(int c, field_sel_t sel, logic [31:0] d);
    load_en = 1'b1; load_cell = CW'(c); load_sel = sel; load_data = d;
    @(posedge clk);
    #1 load_en = 1'b0;
  endtask

  task automatic init_grid(real width);
    for (int i = 0; i < NX; i++)
      for (int j = 0; j < NY; j++) begin
        real di, dj;
        di = real'(i) - 4.0; dj = real'(j) - 2.0;
        m_ez[i][j] = from_real($exp(-(di * di + dj * dj) / width));
        m_hx[i][j] = 32'd0;
        m_hy[i][j] = 32'd0;
        m_ch[i][j] = -1;
        m_ce[i][j] = (i >= 8) ? -2 : -1;
        if (m_ce[i][j] != m_ch[i][j]) n_mixed++;
        if (i == 0 || j == 0 || i == NX - 1 || j == NY - 1) n_edge++;
        load(j * NX + i, FLD_EZ, m_ez[i][j]);
        load(j * NX + i, FLD_HX, m_hx[i][j]);
        load(j * NX + i, FLD_HY, m_hy[i][j]);
        load(j * NX + i, FLD_COEF, {16'd0, 8'(m_ce[i][j]), 8'(m_ch[i][j])});
      end
  endtask

  task automatic run_and_check(int n);
    longint t0;
    start = 1'b1; n_iter = IW'(n);
    t0 = cycle;
    @(posedge clk);
    #1 start = 1'b0;
    while (!done) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (cycle - t0 != longint'(36 * n + 1)) begin
      failures++;
      $display("FAIL: %0d iterations took %0d cycles, expected %0d", n, cycle - t0, 36 * n + 1);
    end
    for (int it = 0; it < n; it++) ref_step(it);
    for (int it = 0; it < n; it++)
      for (int c = 0; c < int'(NCELL); c++) begin
        rd_cell = CW'(c); rd_addr = AW'(it);
        @(posedge clk);
        #1;
        checks++;
        if (rd_data !== m_hist[c % NX][c / NX][it]) begin
          failures++;
          if (failures < 20) $display("FAIL: cell %0d iteration %0d Ez %h expected %h",
                                      c, it, rd_data, m_hist[c % NX][c / NX][it]);
        end
      end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    init_grid(2.0);
    fork
      run_and_check(N_ITER);
      ode_job(300);
    join
    checks++;
    if (n_h != N_ITER || n_e != N_ITER || n_rec != N_ITER) begin
      failures++;
      $display("FAIL: %0d H, %0d E half steps, %0d records for %0d iterations", n_h, n_e, n_rec, N_ITER);
    end
    $display("mechanisms: H half steps %0d, E half steps %0d, Ez records %0d, edge cells %0d, cells with differing coefficients %0d, Euler steps %0d, cycles both engines busy %0d",
             n_h, n_e, n_rec, n_edge, n_mixed, n_ode, n_both);
    if (n_h == 0 || n_e == 0 || n_rec == 0 || n_edge == 0 || n_mixed == 0 || n_ode == 0 || n_both == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
