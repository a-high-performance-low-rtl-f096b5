`timescale 1ps/10fs
// io_bank: slow-speed memory bank of the test chip (input operand bank or
// output result bank).
//
// The chip's memory cell is a pair of cross-coupled inverters written from
// a write bus through a transmission gate (word line W) and read onto a
// separate read bus through a tri-state driver (word line R). A bank of
// such cells has two independent ports. Here: a DEPTH x WIDTH array, written
// on the rising edge of wclk when we is high (the write bus side), read
// combinationally at raddr (the read bus side; the tri-state read bus
// becomes a multiplexer). The input bank is written slowly from outside and
// read at system speed; the output bank is written at system speed and read
// slowly from outside. DEPTH is not given for the chip; 16 words is this
// design's choice. No reset: the cells power up with any value.
module io_bank #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
