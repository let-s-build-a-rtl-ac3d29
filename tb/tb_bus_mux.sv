// tb_bus_mux: a 3-way 4-bit MUX copies the bus whose select line is active
// (random buses, every select), and gives 0 with no select active.
module tb_bus_mux;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] in_bus [3];
  logic [2:0] sel;
  logic [3:0] out_bus;
  bus_mux #(.N(3), .K(4)) dut (.in_bus(in_bus), .sel(sel), .out_bus(out_bus));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 3; i++) in_bus[i] = 4'($urandom);
      for (int s = 0; s < 3; s++) begin
        sel = 3'(1 << s); #1;
        checks++;
        if (out_bus != in_bus[s]) begin failures++; $display("sel=%b out=%h exp=%h", sel, out_bus, in_bus[s]); end
      end
      sel = '0; #1;
      checks++;
      if (out_bus != '0) begin failures++; $display("no select: out=%h", out_bus); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
