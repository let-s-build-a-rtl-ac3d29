// tb_program_counter: 4-bit counter. Random mix of load (from the input
// bus), increment (with wrap from 15 to 0) and hold (enable write off).
module tb_program_counter;
  int checks = 0, failures = 0, n_load = 0, n_inc = 0;
  logic clk = 0, rst, load, inc, we;
  logic [3:0] din, dout, model;
  program_counter #(.K(4)) dut (.clk(clk), .rst(rst), .din(din), .load(load), .increment(inc), .we(we), .dout(dout));
  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; load = 0; inc = 1; we = 1; din = 0; model = 0;
    @(negedge clk); rst = 0;
    checks++; if (dout != 0) begin failures++; $display("not reset"); end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load = ($urandom % 4) == 0; inc = !load; we = ($urandom % 5) != 0; din = 4'($urandom);
      @(posedge clk);
      if (we) begin
        if (load) begin model = din; n_load++; end
        else begin model = model + 1; n_inc++; end
      end
      #1; checks++;
      if (dout != model) begin failures++; $display("n=%0d load=%b we=%b dout=%0d exp=%0d", n, load, we, dout, model); end
    end
    checks++;
    if (n_load == 0 || n_inc < 16) begin failures++; $display("coverage: loads=%0d incs=%0d", n_load, n_inc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
