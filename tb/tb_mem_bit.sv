// tb_mem_bit: stored value appears only while select for read is on; write
// happens only with enable write at a clock edge.
module tb_mem_bit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, d, sel, q, model;
  mem_bit dut (.clk(clk), .rst(rst), .we(we), .d(d), .sel(sel), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 0; d = 0; sel = 1; model = 0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); d = 1'($urandom); sel = 1'($urandom);
      @(posedge clk);
      if (we) model = d;
      #1; checks++;
      if (q != (model & sel)) begin failures++; $display("n=%0d sel=%b q=%b stored=%b", n, sel, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
