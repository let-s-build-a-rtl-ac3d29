// tb_sr_flipflop: set, remember 1, reset, remember 0, and the s = r = 1
// case (both outputs 0), against the NOR-latch behaviour.
module tb_sr_flipflop;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic s, r, q, q_n;
  sr_flipflop dut (.s(s), .r(r), .q(q), .q_n(q_n));
  always #5 clk = ~clk;
  task automatic apply(logic ss, logic rr, logic eq, logic eqn);
    s = ss; r = rr; #1;
    checks++;
    if (q != eq || q_n != eqn) begin failures++; $display("s=%b r=%b q=%b q_n=%b exp %b %b", ss, rr, q, q_n, eq, eqn); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 20; n++) begin
      apply(0, 1, 0, 1);   // write 0
      apply(0, 0, 0, 1);   // remember 0
      apply(1, 0, 1, 0);   // write 1
      apply(0, 0, 1, 0);   // remember 1
      apply(1, 0, 1, 0);   // set again
      apply(0, 0, 1, 0);
      apply(1, 1, 0, 0);   // both: outputs both 0
      apply(0, 1, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
