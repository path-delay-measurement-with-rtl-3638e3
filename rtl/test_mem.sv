// test_mem: test internal memory, holding the records of the delay
// measurements (result words written by the test controller).
//
// A DEPTH x WIDTH array with one synchronous write port (test controller)
// and one synchronous read port (I/O controller); the two ports may be used
// in the same cycle. A read of the address written in the same cycle
// returns the old word. The array is not reset: every record word is written
// before it is meant to be read. Depth and width are this design's choices.
// Timing: rdata is valid one clock after raddr.
module test_mem #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  timeunit 1ps; timeprecision 10fs;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
