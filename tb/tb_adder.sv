// tb_adder: 10-bit adder, exhaustive over small operands plus random
// operands and carry in; sum and carry out against integer arithmetic.
module tb_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] a, b, sum;
  logic cin, cout;
  adder #(.K(10)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  always #5 clk = ~clk;
  task automatic check();
    logic [10:0] exp;
    #1;
    exp = 11'(a) + 11'(b) + 11'(cin);
    checks++;
    if ({cout, sum} != exp) begin failures++; $display("%0d+%0d+%0d = %0d (exp %0d)", a, b, cin, {cout, sum}, exp); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin a = 10'(i); b = 10'(j); cin = 1'(i+j); check(); end
    for (int n = 0; n < 2000; n++) begin a = 10'($urandom); b = 10'($urandom); cin = 1'($urandom); check(); end
    a = 10'h3FF; b = 10'h001; cin = 0; check();
    a = 10'h3FF; b = 10'h3FF; cin = 1; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
