// adder: K-bit ripple-carry adder.
//
// A chain of K full-adder slices. Each slice forms its sum bit as the odd
// parity of a, b and the incoming carry, and its carry out as the majority
// of the same three bits; the carry ripples from bit 0 upward. The carry
// in lets the ALU subtract by adding the complement plus one.
// Purely combinational; the delay grows with K.
module adder #(
  parameter int K = 10
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [K-1:0] sum,
  output logic         cout
);
  logic [K:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < K; i++) begin : g_slice
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign cout = c[K];
endmodule
