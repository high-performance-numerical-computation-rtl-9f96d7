// tb_fp_add: self-checking testbench for the pipelined single-precision
// adder. Streams one operation per cycle (directed special cases, rounding
// ties, cancellations, overflow and underflow, then random operands) and
// compares every result, and the cycle it arrives in, against fp_ref_pkg.
module tb_fp_add;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sub = 1'b0, out_valid;
  fp32_t a = '0, b = '0, y;
  int    checks = 0, failures = 0;
  longint cycle = 0;

  fp_add #(.LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] exp_y; longint due; logic [31:0] a, b; logic sub; } item_t;
  item_t q[$];

  always @(negedge clk) begin
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", y);
      end else begin
        it = q.pop_front();
        if (y !== it.exp_y || cycle != it.due) begin
          failures++;
          if (failures < 20)
            $display("FAIL: %h %s %h -> %h (exp %h), cycle %0d (exp %0d)",
                     it.a, it.sub ? "-" : "+", it.b, y, it.exp_y, cycle, it.due);
        end
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] z, logic s);
    item_t it;
    a = x; b = z; sub = s; in_valid = 1'b1;
    it.exp_y = add(x, z, s); it.due = cycle + LAT; it.a = x; it.b = z; it.sub = s;
    q.push_back(it);
    @(posedge clk);
    #1 in_valid = 1'b0;
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
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    // directed cases
    issue(32'h3F800000, 32'h3F800000, 0);  // 1 + 1
    issue(32'h3F800000, 32'h3F800000, 1);  // 1 - 1 = +0
    issue(32'h3F800000, 32'h33800000, 0);  // 1 + 2^-24: tie, stays 1
    issue(32'h3F800001, 32'h33800000, 0);  // tie rounds up to even
    issue(32'h3F800000, 32'h33800001, 0);  // just above tie
    issue(32'h3F800000, 32'h00000001, 0);  // subnormal operand is zero
    issue(32'h00000000, 32'h80000000, 0);  // +0 + -0 = +0
    issue(32'h80000000, 32'h00000000, 1);  // -0 - +0 = -0
    issue(32'h7F800000, 32'h3F800000, 0);  // inf + 1
    issue(32'h7F800000, 32'h7F800000, 1);  // inf - inf = NaN
    issue(32'h7FC00001, 32'h3F800000, 0);  // NaN
    issue(32'h7F7FFFFF, 32'h7F7FFFFF, 0);  // overflow
    issue(32'h00800001, 32'h00800000, 1);  // underflow to zero
    issue(32'h4B800000, 32'hBF800000, 0);  // 2^24 - 1
    issue(32'h3F800000, 32'hBF7FFFFF, 0);  // massive cancellation
    issue(32'h40490FDB, 32'h2F800000, 1);  // large exponent difference
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(60, 190);
      z = ($urandom_range(3) == 0) ? rand_fp(60, 190)
                                   : {1'($urandom), 8'(int'(x[30:23]) - int'($urandom_range(30))), 23'($urandom)};
      if ($urandom_range(1)) issue(x, z, 1'($urandom)); else issue(z, x, 1'($urandom));
    end
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
