// proc_register: K-bit processor register (PC, IR).
//
// K register bits side by side, sharing enable write. The contents are
// always on the output bus; when enable write is 1 at a rising clock edge
// the K bits of the input bus are copied in. Synchronous reset to 0.
// Used for the instruction register (10 bits in TOY-Lite) and inside the
// program counter (4 bits).
module proc_register #(
  parameter int K = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);
  for (genvar i = 0; i < K; i++) begin : g_bit
    reg_bit u_bit (.clk(clk), .rst(rst), .we(we), .d(d[i]), .q(q[i]));
  end
endmodule
