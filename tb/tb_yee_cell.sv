// tb_yee_cell: self-checking testbench for one Yee-cell circuit. Loads
// random fields and power-of-two coefficients, drives random neighbour
// fields, runs H and E half steps and compares Hx, Hy and Ez with the
// update equations evaluated by fp_ref_pkg. It also checks that each half
// step keeps the cell busy for 4 * (ADD_LATENCY + 1) = 16 cycles.
module tb_yee_cell;
  import fp32_pkg::*;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load_en = 1'b0, start_h = 1'b0, start_e = 1'b0, busy;
  field_sel_t  load_sel = FLD_EZ;
  logic [31:0] load_data = '0;
  fp32_t       ez_xp = '0, ez_yp = '0, hy_xm = '0, hx_ym = '0, ez, hx, hy;
  int          checks = 0, failures = 0;

  yee_cell #(.ADD_LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic load(field_sel_t sel, logic [31:0] d);
    load_en = 1'b1; load_sel = sel; load_data = d;
    @(posedge clk);
    #1 load_en = 1'b0;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %h, expected %h", what, got, want);
    end
  endtask

  // Runs one half step and returns the number of cycles busy was high.
  task automatic half_step(bit e_step, output int n);
    if (e_step) start_e = 1'b1; else start_h = 1'b1;
    @(posedge clk);
    #1 start_e = 1'b0; start_h = 1'b0;
    n = 0;
    while (busy) begin
      n++;
      @(posedge clk);
      #1;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      logic [31:0] e_hx, e_hy, e_ez;
      int chk, cek, n;
      chk = int'($urandom_range(4)) - 3;
      cek = int'($urandom_range(4)) - 3;
      if (round % 4 == 0) begin
        load(FLD_EZ, rand_fp(110, 135));
        load(FLD_HX, rand_fp(110, 135));
        load(FLD_HY, rand_fp(110, 135));
      end
      load(FLD_COEF, {16'd0, 8'(cek), 8'(chk)});
      ez_xp = rand_fp(110, 135); ez_yp = rand_fp(110, 135);
      e_hx = yee_hx(hx, ez, ez_yp, chk);
      e_hy = yee_hy(hy, ez, ez_xp, chk);
      half_step(1'b0, n);
      check("Hx", hx, e_hx);
      check("Hy", hy, e_hy);
      checks++;
      if (n != 4 * (LAT + 1)) begin
        failures++;
        $display("FAIL: H half step busy %0d cycles", n);
      end
      hx_ym = rand_fp(110, 135); hy_xm = rand_fp(110, 135);
      e_ez = yee_ez(ez, hx, hy, hx_ym, hy_xm, cek);
      half_step(1'b1, n);
      check("Ez", ez, e_ez);
      checks++;
      if (n != 4 * (LAT + 1)) begin
        failures++;
        $display("FAIL: E half step busy %0d cycles", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
