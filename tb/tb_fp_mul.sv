// tb_fp_mul: self-checking testbench for the pipelined single-precision
// multiplier. Streams one operation per cycle (directed special cases, rounding
// ties, cancellations, overflow and underflow, then random operands) and
// compares every result, and the cycle it arrives in, against fp_ref_pkg.
module tb_fp_mul;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sub = 1'b0, out_valid;
  fp32_t a = '0, b = '0, y;
  int    checks = 0, failures = 0;
  longint cycle = 0;

  fp_mul #(.LATENCY(LAT)) dut (.*);

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
            $display("FAIL: %h * %h -> %h (exp %h), cycle %0d (exp %0d)",
                     it.a, it.b, y, it.exp_y, cycle, it.due);
        end
      end
    end
  end

  task automatic issue(logic [31:0] x, logic [31:0] z, logic s);
    item_t it;
    a = x; b = z; sub = s; in_valid = 1'b1;
    it.exp_y = mul(x, z); it.due = cycle + LAT; it.a = x; it.b = z; it.sub = s;
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
    issue(32'h3F800000, 32'h3F800000, 0);  // 1 * 1
    issue(32'h40000000, 32'hC0400000, 0);  // 2 * -3
    issue(32'h3F800001, 32'h3F800001, 0);  // rounding of the low product bits
    issue(32'h3FFFFFFF, 32'h3FFFFFFF, 0);  // product >= 2, mantissa carry
    issue(32'h3F800000, 32'h00000001, 0);  // subnormal operand is zero
    issue(32'h80000000, 32'h3F800000, 0);  // -0 * 1 = -0
    issue(32'h7F800000, 32'h00000000, 0);  // inf * 0 = NaN
    issue(32'h7F800000, 32'hBF800000, 0);  // inf * -1
    issue(32'h7FC00001, 32'h3F800000, 0);  // NaN
    issue(32'h7F000000, 32'h7F000000, 0);  // overflow
    issue(32'h00800000, 32'h00800000, 0);  // underflow to zero
    issue(32'h3F000000, 32'h00800000, 0);  // underflow of min normal / 2
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = rand_fp(64, 190);
      z = rand_fp(64, 190);
      issue(x, z, 0);
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
