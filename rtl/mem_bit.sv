// mem_bit: memory-bank bit, a register bit with a select for read.
//
// The stored bit is written from d at a rising clock edge when we is 1
// (the bank ANDs its enable write with the word's decoder line). The output
// carries the stored value only while sel (select for read) is 1, and 0
// otherwise, so the outputs of all words of a column can be ORed onto one
// output bus. Synchronous reset to 0 is this design's addition.
module mem_bit (
  input  logic clk,
  input  logic rst,
  input  logic we,
  input  logic d,
  input  logic sel,
  output logic q
);
  logic stored;
  reg_bit u_bit (.clk(clk), .rst(rst), .we(we), .d(d), .q(stored));
  assign q = stored & sel;
endmodule
