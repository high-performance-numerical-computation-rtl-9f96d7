// tb_fdtd_control: self-checking testbench for the FDTD control/counter.
// A small model stands in for the cell array: after every start_h or
// start_e pulse it raises cells_busy for BUSY cycles, as the cells do.
// The testbench checks that the half steps alternate H, E, that each one
// starts only with idle cells, that every iteration is recorded once at its
// own address after the E half step, that done comes after exactly n_iter
// iterations and 36*n_iter + 1 cycles, and that a start with n_iter = 0 or
// during a run is ignored.
module tb_fdtd_control;
  localparam int unsigned MAX_ITER = 512;
  localparam int unsigned BUSY     = 16;    // 4 ops x (adder latency 3 + 1)
  localparam int unsigned IW       = 10;
  localparam int unsigned AW       = 9;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0, cells_busy;
  logic [IW-1:0] n_iter = '0, iter;
  logic          start_h, start_e, rec_we, busy, done;
  logic [AW-1:0] rec_addr;
  int            checks = 0, failures = 0;
  int            busy_cnt = 0, n_h = 0, n_e = 0, n_rec = 0, n_done = 0;
  logic          expect_h = 1'b1;
  longint        cycle = 0;

  fdtd_control #(.MAX_ITER(MAX_ITER)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Cell array stand-in.
  assign cells_busy = (busy_cnt != 0);
  always @(posedge clk) begin
    if (start_h || start_e) busy_cnt <= BUSY;
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s (cycle %0d)", msg, cycle);
  endtask

  // Protocol monitor.
  always @(negedge clk) if (rst_n) begin
    if (start_h) begin
      n_h++; checks++;
      if (!expect_h || cells_busy) fail("start_h out of order");
      expect_h = 1'b0;
    end
    if (start_e) begin
      n_e++; checks++;
      if (expect_h || cells_busy) fail("start_e out of order");
    end
    if (rec_we) begin
      n_rec++; checks++;
      if (cells_busy || expect_h || int'(rec_addr) != n_rec - 1 || n_e != n_rec) fail("bad record");
      expect_h = 1'b1;
    end
    if (done) n_done++;
  end

  task automatic run(int n, bit check_time);
    longint t0;
    n_h = 0; n_e = 0; n_rec = 0; n_done = 0;
    start = 1'b1; n_iter = IW'(n);
    t0 = cycle;
    @(posedge clk);
    #1 start = 1'b0;
    // a second start during the run must be ignored
    repeat (5) @(posedge clk);
    #1 start = 1'b1; n_iter = 10'd3;
    @(posedge clk);
    #1 start = 1'b0;
    while (!done) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_h != n || n_e != n || n_rec != n) fail($sformatf("counts h=%0d e=%0d rec=%0d, want %0d", n_h, n_e, n_rec, n));
    checks++;
    if (check_time && cycle - t0 != longint'(36 * n + 1)) fail($sformatf("run took %0d cycles, want %0d", cycle - t0, 36 * n + 1));
    @(posedge clk);
    #1;
    checks++;
    if (busy || n_done != 1) fail("not idle after done");
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // n_iter = 0 is ignored
    start = 1'b1; n_iter = '0;
    @(posedge clk);
    #1 start = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (busy) fail("started with n_iter = 0");
    run(1, 1);
    run(7, 1);
    run(MAX_ITER, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
