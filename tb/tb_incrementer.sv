// tb_incrementer: every 4-bit value, and random 10-bit values, plus one
// (wrapping at the top).
module tb_incrementer;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] a4, y4;
  logic [9:0] a10, y10;
  incrementer #(.K(4))  dut4  (.a(a4),  .y(y4));
  incrementer #(.K(10)) dut10 (.a(a10), .y(y10));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i); #1; checks++;
      if (y4 != 4'((i + 1) % 16)) begin failures++; $display("%0d+1 = %0d", a4, y4); end
    end
    for (int n = 0; n < 500; n++) begin
      a10 = 10'($urandom); #1; checks++;
      if (y10 != 10'((int'(a10) + 1) % 1024)) begin failures++; $display("%0d+1 = %0d", a10, y10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
