// field_history_ram: the per-cell record memory of the FDTD array.
//
// After every iteration the array's controller writes each cell's new Ez
// value here at the address given by the iteration number, so a run of up
// to DEPTH iterations leaves the complete time history of the cell's
// field for the host to read back. The default depth of 512 words follows
// the original design's statement that the device held enough RAM for 512
// iterations; storing Ez only, in one 512 x 32 block RAM per cell, is this
// design's choice.
//
// Interface: one write port (we, waddr, wdata) and one read port with a
// registered output: rdata shows the word at raddr one clock after raddr
// is applied. Reading and writing one address in the same cycle returns the
// old word. The memory is not reset.
module field_history_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
