// decoder: n-bit decoder, n address inputs and 2**n data outputs.
//
// Output z[i] is 1 exactly when the address x equals i; all others are 0.
// Each output is one product term (an AND of every address bit, true or
// inverted), so the decoder computes 2**n Boolean functions at once, as in
// the sum-of-products construction. x[N-1] is the most significant address
// bit (x0 of the truth table). Purely combinational.
module decoder #(
  parameter int N = 3
) (
  input  logic [N-1:0]      x,
  output logic [2**N-1:0]   z
);
  for (genvar i = 0; i < 2**N; i++) begin : g_term
    localparam logic [N-1:0] CODE = N'(i);
    // AND of the literals: x[b] where CODE[b] is 1, ~x[b] where it is 0
    assign z[i] = &(x ~^ CODE);
  end
endmodule
