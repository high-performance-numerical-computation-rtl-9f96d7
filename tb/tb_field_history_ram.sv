// tb_field_history_ram: self-checking testbench for the per-cell record
// RAM. Fills all DEPTH words with random data while reading, then reads
// every address back in random order and checks each word one clock after
// its address (the registered read), plus read-during-write of old data.
module tb_field_history_ram;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned AW    = 9;

  logic          clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0]   wdata = '0, rdata;
  logic [31:0]   model [DEPTH];
  int            checks = 0, failures = 0;

  field_history_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk);
      #1;
    end
    we = 1'b0;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      int ad;
      ad = int'($urandom_range(DEPTH - 1));
      raddr = AW'(ad);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[ad]) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h exp %h", ad, rdata, model[ad]);
      end
    end
    // read during write returns the old word
    we = 1'b1; waddr = 9'd7; raddr = 9'd7; wdata = ~model[7];
    @(posedge clk);
    #1;
    we = 1'b0;
    checks++;
    if (rdata !== model[7]) begin
      failures++;
      $display("FAIL: read-during-write %h exp %h", rdata, model[7]);
    end
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== ~model[7]) begin
      failures++;
      $display("FAIL: new word %h exp %h", rdata, ~model[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
