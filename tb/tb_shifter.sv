// tb_shifter: 10-bit left and arithmetic right shifts for every amount
// 0..15 and some large amounts, on random data; expected values built one
// bit at a time.
module tb_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] a, amt, shl, shr;
  shifter #(.K(10)) dut (.a(a), .amt(amt), .shl(shl), .shr(shr));
  always #5 clk = ~clk;
  task automatic check();
    logic [9:0] el, er;
    int s;
    #1;
    s = int'(amt);
    for (int i = 0; i < 10; i++) begin
      el[i] = (i - s >= 0) ? a[i - s] : 1'b0;
      er[i] = (i + s <= 9) ? a[i + s] : a[9];
    end
    checks++;
    if (shl != el || shr != er) begin failures++; $display("a=%b amt=%0d shl=%b (%b) shr=%b (%b)", a, amt, shl, el, shr, er); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      a = 10'($urandom);
      for (int s = 0; s < 16; s++) begin amt = 10'(s); check(); end
      amt = 10'($urandom); check();
    end
    a = 10'b10_0000_0001; amt = 10'd3; check();
    amt = 10'h200; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
