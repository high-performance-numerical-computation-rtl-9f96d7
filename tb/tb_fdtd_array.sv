// tb_fdtd_array: self-checking testbench for the Yee-cell array on a small
// 4 x 3 grid. It loads a Gaussian Ez pulse, zero H fields and per-cell
// power-of-two coefficients (a region with a smaller E coefficient stands
// for a denser dielectric), runs N_ITER iterations, and compares the Ez
// record of every cell and iteration with a reference FDTD computed by
// fp_ref_pkg with perfectly conducting edges. It also checks the run time
// of 36 cycles per iteration plus one, and runs a second, shorter job.
module tb_fdtd_array;
  import fp32_pkg::*;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned NX = 4, NY = 3, MAX_ITER = 32, N_ITER = 20;
  localparam int unsigned NCELL = NX * NY, CW = 4, IW = 6, AW = 5;

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

  fdtd_array #(.NX(NX), .NY(NY), .MAX_ITER(MAX_ITER), .ADD_LATENCY(3)) dut (.*);

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
        di = real'(i) - 1.5; dj = real'(j) - 1.0;
        m_ez[i][j] = from_real($exp(-(di * di + dj * dj) / width));
        m_hx[i][j] = 32'd0;
        m_hy[i][j] = 32'd0;
        m_ch[i][j] = -1;
        m_ce[i][j] = (i >= 2) ? -2 : -1;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    init_grid(2.0);
    run_and_check(N_ITER);
    init_grid(0.7);
    run_and_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
