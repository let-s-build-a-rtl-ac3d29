// program_counter: counter built from a register, an incrementer and a MUX.
//
// Control wires: load, increment (the two select lines of the 2-way MUX in
// front of the register) and enable write. When enable write is 1 at a
// rising clock edge the register takes the MUX output: the input bus if load
// is 1, the register value plus one if increment is 1. The value is always on
// the output bus. load and increment are meant to be one-hot; with neither
// set an enable write stores 0. Synchronous reset to 0.
// TOY-Lite: K = 4 (addresses 0..15); the increment wraps from 15 to 0.
module program_counter #(
  parameter int K = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] din,
  input  logic         load,
  input  logic         increment,
  input  logic         we,
  output logic [K-1:0] dout
);
  logic [K-1:0] inc_val, next_val;
  logic [K-1:0] mux_in [2];

  incrementer #(.K(K)) u_inc (.a(dout), .y(inc_val));

  assign mux_in[0] = din;
  assign mux_in[1] = inc_val;
  bus_mux #(.N(2), .K(K)) u_mux (.in_bus(mux_in), .sel({increment, load}), .out_bus(next_val));

  proc_register #(.K(K)) u_reg (.clk(clk), .rst(rst), .we(we), .d(next_val), .q(dout));
endmodule
