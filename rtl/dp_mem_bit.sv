// dp_mem_bit: dual-port memory-bank bit, a register bit with two read selects.
//
// Written like mem_bit (d copied in at a rising clock edge when we is 1).
// Two independent outputs: q1 carries the stored value while sel1 is 1,
// q2 while sel2 is 1, each 0 otherwise. This lets the register file put two
// different registers on its two output buses at once. Synchronous reset to
// 0 is this design's addition.
module dp_mem_bit (
  input  logic clk,
  input  logic rst,
  input  logic we,
  input  logic d,
  input  logic sel1,
  input  logic sel2,
  output logic q1,
  output logic q2
);
  logic stored;
  reg_bit u_bit (.clk(clk), .rst(rst), .we(we), .d(d), .q(stored));
  assign q1 = stored & sel1;
  assign q2 = stored & sel2;
endmodule
