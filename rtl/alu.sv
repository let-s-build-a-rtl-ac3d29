// alu: arithmetic and logic unit of the TOY-Lite CPU.
//
// Function select op (the low three opcode bits):
//   1 add   a + b          2 subtract  a - b       3 and  a & b
//   4 xor   a ^ b          5 shift left a << b     6 shift right a >> b (arithmetic)
// Every circuit computes its result all the time. A 3-bit decoder turns op
// into one line per function; each result bus is ANDed with its decoder line
// and an OR over all of them collects the one selected answer (the OR of
// one-hot AND terms). op 0 and 7 select nothing and give 0.
// Subtraction uses a second adder fed with ~b and a carry in of 1.
// Results wrap modulo 2**K (two's complement). Purely combinational.
module alu #(
  parameter int K = 10
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [2:0]   op,
  output logic [K-1:0] y
);
  logic [7:0]   line;
  logic [K-1:0] r_add, r_sub, r_shl, r_shr;
  logic         unused_c1, unused_c2;

  decoder #(.N(3)) u_dec (.x(op), .z(line));

  adder #(.K(K)) u_add (.a(a), .b(b),  .cin(1'b0), .sum(r_add), .cout(unused_c1));
  adder #(.K(K)) u_sub (.a(a), .b(~b), .cin(1'b1), .sum(r_sub), .cout(unused_c2));
  shifter #(.K(K)) u_shift (.a(a), .amt(b), .shl(r_shl), .shr(r_shr));

  assign y = (r_add   & {K{line[1]}})
           | (r_sub   & {K{line[2]}})
           | ((a & b) & {K{line[3]}})
           | ((a ^ b) & {K{line[4]}})
           | (r_shl   & {K{line[5]}})
           | (r_shr   & {K{line[6]}});
endmodule
