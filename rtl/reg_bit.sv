// reg_bit: processor register bit.
//
// Stores one bit; its value is always available on q. When enable write
// (we) is 1 at a rising clock edge the input value d is copied in.
// Synchronous reset rst clears the bit (reset is this design's addition; the
// bit itself has none in the switch-level picture). Built as an edge-triggered
// flip-flop so that the whole CPU is clocked from one clock.
module reg_bit (
  input  logic clk,
  input  logic rst,
  input  logic we,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (we) q <= d;
  end
endmodule
