// tb_proc_register: 10-bit register (the IR size). Contents always on the
// output; random input words are copied only when enable write is set.
module tb_proc_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [9:0] d, q, model;
  proc_register #(.K(10)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 1; d = '1; model = '0;
    @(negedge clk); rst = 0; we = 0;
    checks++; if (q != 0) begin failures++; $display("not reset"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); d = 10'($urandom);
      @(posedge clk);
      if (we) model = d;
      #1; checks++;
      if (q != model) begin failures++; $display("n=%0d we=%b d=%h q=%h exp=%h", n, we, d, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
