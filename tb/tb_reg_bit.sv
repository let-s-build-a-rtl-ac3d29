// tb_reg_bit: the bit takes d only at a clock edge with enable write, holds
// it otherwise, and clears on reset. A reference bit is kept in the bench.
module tb_reg_bit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, d, q, model;
  reg_bit dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 0; d = 1; model = 0;
    @(negedge clk); rst = 0;
    checks++; if (q != 0) begin failures++; $display("not reset"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); d = 1'($urandom); rst = ($urandom % 20) == 0;
      @(posedge clk);
      if (rst) model = 0; else if (we) model = d;
      #1; checks++;
      if (q != model) begin failures++; $display("n=%0d we=%b d=%b q=%b exp=%b", n, we, d, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
