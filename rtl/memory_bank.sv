// memory_bank: bank of 2**AW words of K bits each (main memory).
//
// The address drives an AW-bit decoder. The decoder line of the addressed
// word is its select for read and, ANDed with enable write, its write
// strobe: only the addressed word is connected. Each output bit is the OR of
// that column's memory-bank bits, so the addressed word always appears on
// the output bus (combinational read). When enable write is 1 at a rising
// clock edge the input bus is copied into the addressed word. Built from
// flip-flop bits (mem_bit). Synchronous reset clears every word.
// TOY-Lite main memory: AW = 4, K = 10 (16 10-bit words).
module memory_bank #(
  parameter int AW = 4,   // address bits (log2 of the number of words)
  parameter int K  = 10   // word width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [K-1:0]  din,
  output logic [K-1:0]  dout
);
  localparam int N = 2**AW;
  logic [N-1:0] line;
  logic [K-1:0] word_out [N];

  decoder #(.N(AW)) u_dec (.x(addr), .z(line));

  for (genvar w = 0; w < N; w++) begin : g_word
    for (genvar b = 0; b < K; b++) begin : g_bit
      mem_bit u_bit (.clk(clk), .rst(rst), .we(we & line[w]), .d(din[b]),
                     .sel(line[w]), .q(word_out[w][b]));
    end
  end

  always_comb begin
    dout = '0;
    for (int w = 0; w < N; w++) dout |= word_out[w];
  end
endmodule
