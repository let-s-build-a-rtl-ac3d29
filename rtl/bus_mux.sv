// bus_mux: N-way bus multiplexer with one select line per input bus.
//
// Exactly one select line is meant to be active; the output bus then
// carries a copy of the selected input bus. Each input bus is ANDed with its
// select line and the results are ORed bit by bit, so with no select line
// active the output is all zeros. The one-hot rule itself is checked where
// the selects are made (the control unit). Purely combinational.
// Used in the CPU as the register MUX, the address MUX, the PC MUX, the
// memory input MUX and the load/increment MUX inside the program counter.
module bus_mux #(
  parameter int N = 3,   // number of input buses
  parameter int K = 4    // bus width
) (
  input  logic [K-1:0] in_bus [N],
  input  logic [N-1:0] sel,
  output logic [K-1:0] out_bus
);
  always_comb begin
    out_bus = '0;
    for (int i = 0; i < N; i++)
      out_bus |= in_bus[i] & {K{sel[i]}};
  end
endmodule
