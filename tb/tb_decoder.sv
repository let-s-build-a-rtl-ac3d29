// tb_decoder: exhaustive check of the 3-bit decoder against its truth table
// (exactly the addressed output is 1), plus a 4-bit instance.
module tb_decoder;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [2:0] x3;  logic [7:0]  z3;
  logic [3:0] x4;  logic [15:0] z4;
  decoder #(.N(3)) dut3 (.x(x3), .z(z3));
  decoder #(.N(4)) dut4 (.x(x4), .z(z4));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      x3 = 3'(i); #1;
      checks++;
      if (z3 != 8'(1 << i)) begin failures++; $display("N=3 x=%0d z=%b", i, z3); end
    end
    for (int i = 0; i < 16; i++) begin
      x4 = 4'(i); #1;
      checks++;
      if (z4 != 16'(1 << i) || $countones(z4) != 1) begin failures++; $display("N=4 x=%0d z=%b", i, z4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
