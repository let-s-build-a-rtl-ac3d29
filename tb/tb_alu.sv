// tb_alu: the six TOY arithmetic functions on random 10-bit operands, plus
// the two unused codes (0, 7) which must give 0.
module tb_alu;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] a, b, y, e;
  logic [2:0] op;
  alu #(.K(10)) dut (.a(a), .b(b), .op(op), .y(y));
  always #5 clk = ~clk;
  function automatic logic [9:0] model(logic [2:0] o, logic [9:0] x, logic [9:0] z);
    int s = int'(z);
    case (o)
      3'd1: return 10'(int'(x) + int'(z));
      3'd2: return 10'(int'(x) - int'(z));
      3'd3: return x & z;
      3'd4: return x ^ z;
      3'd5: return (s >= 10) ? 10'd0 : 10'(int'(x) * (1 << s));
      3'd6: begin
        int v = int'(x) - (x[9] ? 1024 : 0);   // signed value
        if (s >= 10) s = 10;
        return 10'(v >>> s);
      end
      default: return 10'd0;
    endcase
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 400; n++) begin
      a = 10'($urandom);
      b = (n % 2 == 0) ? 10'($urandom % 12) : 10'($urandom);
      for (int o = 0; o < 8; o++) begin
        op = 3'(o); #1;
        e = model(op, a, b);
        checks++;
        if (y != e) begin failures++; $display("op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
