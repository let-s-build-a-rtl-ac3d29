// tb_register_file: TOY-Lite registers (4 x 10). Random writes with two
// random read addresses per cycle, both output buses against an array model.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [1:0] ra1, ra2, wa;
  logic [9:0] din, d1, d2;
  logic [9:0] model [4];
  register_file #(.RW(2), .K(10)) dut (.clk(clk), .rst(rst), .raddr1(ra1), .raddr2(ra2), .waddr(wa),
                                       .we(we), .din(din), .dout1(d1), .dout2(d2));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; din = 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ra1 = 2'($urandom); ra2 = 2'($urandom); wa = 2'($urandom); we = 1'($urandom); din = 10'($urandom);
      #1; checks++;
      if (d1 != model[ra1] || d2 != model[ra2]) begin
        failures++; $display("r%0d=%h (exp %h) r%0d=%h (exp %h)", ra1, d1, model[ra1], ra2, d2, model[ra2]);
      end
      @(posedge clk);
      if (we) model[wa] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
