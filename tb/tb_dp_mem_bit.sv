// tb_dp_mem_bit: the two outputs follow their own select lines
// independently; writes only with enable write at a clock edge.
module tb_dp_mem_bit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, d, sel1, sel2, q1, q2, model;
  dp_mem_bit dut (.clk(clk), .rst(rst), .we(we), .d(d), .sel1(sel1), .sel2(sel2), .q1(q1), .q2(q2));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 0; d = 0; sel1 = 1; sel2 = 1; model = 0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); d = 1'($urandom); sel1 = 1'($urandom); sel2 = 1'($urandom);
      @(posedge clk);
      if (we) model = d;
      #1; checks++;
      if (q1 != (model & sel1) || q2 != (model & sel2)) begin
        failures++; $display("n=%0d sel=%b%b q=%b%b stored=%b", n, sel1, sel2, q1, q2, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
