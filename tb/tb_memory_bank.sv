// tb_memory_bank: TOY-Lite main memory (16 x 10) and the 4 x 6 lecture
// example. Random writes and reads against an array model; the addressed
// word must be on the output in the same cycle (combinational read) and a
// write must touch only the addressed word.
module tb_memory_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, we_s;
  logic [3:0] addr;  logic [9:0] din, dout;
  logic [1:0] addr_s; logic [5:0] din_s, dout_s;
  logic [9:0] model [16];
  logic [5:0] model_s [4];
  memory_bank #(.AW(4), .K(10)) dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .din(din), .dout(dout));
  memory_bank #(.AW(2), .K(6))  dut_s (.clk(clk), .rst(rst), .addr(addr_s), .we(we_s), .din(din_s), .dout(dout_s));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; we = 0; we_s = 0; addr = 0; addr_s = 0; din = 0; din_s = 0;
    foreach (model[i]) model[i] = '0;
    foreach (model_s[i]) model_s[i] = '0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      addr = 4'($urandom); we = 1'($urandom); din = 10'($urandom);
      addr_s = 2'($urandom); we_s = 1'($urandom); din_s = 6'($urandom);
      #1; checks++;
      if (dout != model[addr] || dout_s != model_s[addr_s]) begin
        failures++; $display("read a=%0d got %h exp %h / a=%0d got %h exp %h", addr, dout, model[addr], addr_s, dout_s, model_s[addr_s]);
      end
      @(posedge clk);
      if (we) model[addr] = din;
      if (we_s) model_s[addr_s] = din_s;
    end
    // sweep every word
    @(negedge clk); we = 0; we_s = 0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); addr_s = 2'(i); #1; checks++;
      if (dout != model[i] || dout_s != model_s[i % 4]) begin failures++; $display("sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
