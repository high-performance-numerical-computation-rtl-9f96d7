// tb_fp_const_mul: self-checking testbench for the power-of-two coefficient
// multiplier. Applies special values, the exponent limits and random
// operands with random shifts, and compares y with a * 2**k computed by
// fp_ref_pkg. The unit is combinational, so y is checked in the same cycle.
module tb_fp_const_mul;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  fp32_t             a = '0, y;
  logic signed [7:0] k = '0;
  int                checks = 0, failures = 0;

  fp_const_mul dut (.*);

  task automatic try(logic [31:0] x, int sh);
    logic [31:0] e;
    a = x;
    k = 8'(sh);
    #1;
    e = scale(x, sh);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 20) $display("FAIL: %h * 2**%0d -> %h (exp %h)", x, sh, y, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h3F800000, -1);   // 1 * 0.5
    try(32'hBF800000, 3);    // -1 * 8
    try(32'h00000000, 5);    // zero stays zero
    try(32'h80000000, -5);   // -0 stays -0
    try(32'h00000123, 4);    // subnormal reads as zero
    try(32'h7F800000, -3);   // inf passes
    try(32'h7FC12345, 1);    // NaN made canonical
    try(32'h7F000000, 1);    // largest binade
    try(32'h7F000000, 2);    // overflow
    try(32'h00800000, -1);   // underflow to zero
    try(32'h01000000, -1);   // smallest normal result
    for (int i = 0; i < 2000; i++) try(rand_fp(1, 254), int'($urandom_range(40)) - 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
