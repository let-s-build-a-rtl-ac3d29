// incrementer: K-bit +1 circuit ("add 0001").
//
// A chain of half adders with a carry of 1 into bit 0: bit i flips when all
// bits below it are 1. The result wraps from all ones to zero. Used by the
// program counter. Purely combinational.
module incrementer #(
  parameter int K = 4
) (
  input  logic [K-1:0] a,
  output logic [K-1:0] y
);
  logic [K:0] c;
  assign c[0] = 1'b1;
  for (genvar i = 0; i < K; i++) begin : g_half
    assign y[i]   = a[i] ^ c[i];
    assign c[i+1] = a[i] & c[i];
  end
endmodule
