// register_file: the TOY registers, 2**RW words of K bits, dual-ported.
//
// Two read ports: raddr1 and raddr2 each drive a decoder whose lines are the
// two select-for-read inputs of every dual-port bit, so two different
// registers (for example both ALU operands) appear at once on dout1 and
// dout2, combinationally. One write port: a third decoder on waddr, ANDed
// with enable write, picks the word that takes din at a rising clock edge.
// A separate write address is this design's choice, so that an instruction
// can read s and t and write d in the same execute cycle.
// Synchronous reset clears all registers.
// TOY-Lite: RW = 2, K = 10 (4 10-bit registers).
module register_file #(
  parameter int RW = 2,   // register-number bits
  parameter int K  = 10   // word width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [RW-1:0] raddr1,
  input  logic [RW-1:0] raddr2,
  input  logic [RW-1:0] waddr,
  input  logic          we,
  input  logic [K-1:0]  din,
  output logic [K-1:0]  dout1,
  output logic [K-1:0]  dout2
);
  localparam int N = 2**RW;
  logic [N-1:0] sel1, sel2, wline;
  logic [K-1:0] q1 [N];
  logic [K-1:0] q2 [N];

  decoder #(.N(RW)) u_dec1 (.x(raddr1), .z(sel1));
  decoder #(.N(RW)) u_dec2 (.x(raddr2), .z(sel2));
  decoder #(.N(RW)) u_decw (.x(waddr),  .z(wline));

  for (genvar w = 0; w < N; w++) begin : g_word
    for (genvar b = 0; b < K; b++) begin : g_bit
      dp_mem_bit u_bit (.clk(clk), .rst(rst), .we(we & wline[w]), .d(din[b]),
                        .sel1(sel1[w]), .sel2(sel2[w]),
                        .q1(q1[w][b]), .q2(q2[w][b]));
    end
  end

  always_comb begin
    dout1 = '0;
    dout2 = '0;
    for (int w = 0; w < N; w++) begin
      dout1 |= q1[w];
      dout2 |= q2[w];
    end
  end
endmodule
