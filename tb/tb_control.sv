// tb_control: the control unit alone. Checks the front-panel mode while
// stopped, that RUN starts an alternating fetch/execute sequence, the
// fetch-cycle control word, the execute-cycle control word of every opcode
// (including taken and untaken branches), and that halt stops the machine.
module tb_control;
  import toy_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, run, dep, ldpc;
  logic [9:0] ir, port1;
  ctrl_t ctrl;
  logic [1:0] ra1, ra2, wa;
  logic running;
  phase_e phase;
  control #(.RW(2)) dut (.clk(clk), .rst(rst), .ir(ir), .port1(port1), .panel_run(run),
    .panel_deposit(dep), .panel_load_pc(ldpc), .ctrl(ctrl), .raddr1(ra1), .raddr2(ra2),
    .waddr(wa), .running(running), .phase(phase));
  always #5 clk = ~clk;

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b exp %b (ir=%h)", what, got, exp, ir); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; run = 0; dep = 0; ldpc = 0; ir = '0; port1 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // stopped: front panel owns memory address, data and the PC input
    dep = 1; ldpc = 1; #1;
    expect_bit("stopped", running, 0);
    expect_bit("panel addr", ctrl.addr_sel[AMUX_PANEL], 1);
    expect_bit("panel data", ctrl.min_sel[MMUX_PANEL], 1);
    expect_bit("deposit", ctrl.mem_we, 1);
    expect_bit("load pc", ctrl.pc_we & ctrl.pc_load & ctrl.pc_sel[PMUX_PANEL], 1);
    expect_bit("no ir write", ctrl.ir_we, 0);
    dep = 0; ldpc = 0; #1;
    expect_bit("no deposit", ctrl.mem_we, 0);
    expect_bit("no pc write", ctrl.pc_we, 0);

    for (int o = 1; o < 16; o++) begin
      for (int cond = 0; cond < 3; cond++) begin
        logic taken;
        // start the machine
        // IR is loaded at the fetch edge, so present the instruction now
        @(negedge clk); run = 1;
        ir = {4'(o), 2'd3, 2'd1, 2'd2};
        port1 = (cond == 0) ? 10'd0 : (cond == 1) ? 10'd5 : 10'h3F0;
        #1;
        expect_bit("running", running, 1);
        expect_bit("fetch phase", phase == PH_FETCH, 1);
        expect_bit("fetch ir_we", ctrl.ir_we, 1);
        expect_bit("fetch pc inc", ctrl.pc_we & ctrl.pc_inc & !ctrl.pc_load, 1);
        expect_bit("fetch addr from pc", ctrl.addr_sel[AMUX_PC], 1);
        expect_bit("fetch no writes", ctrl.reg_we | ctrl.mem_we, 0);
        @(negedge clk); run = 0; #1;
        expect_bit("execute phase", phase == PH_EXECUTE, 1);
        expect_bit("execute no ir_we", ctrl.ir_we, 0);
        expect_bit("raddr2 = t", ra2 == 2'd2, 1);
        expect_bit("waddr = d", wa == 2'd3, 1);
        taken = (o == 12 && cond == 0) || (o == 13 && cond == 1);
        expect_bit("reg_we", ctrl.reg_we, (o <= 8) || o == 10 || o == 15);
        expect_bit("mem_we", ctrl.mem_we, o == 9 || o == 11);
        expect_bit("pc_we", ctrl.pc_we, taken || o == 14 || o == 15);
        if (ctrl.pc_we) expect_bit("pc load", ctrl.pc_load & !ctrl.pc_inc, 1);
        expect_bit("port1 = d", ra1 == ((o == 9 || o == 11 || (o >= 12 && o <= 14)) ? 2'd3 : 2'd1), 1);
        if (o <= 6) begin
          expect_bit("alu op", ctrl.alu_op == 3'(o), 1);
          expect_bit("reg from alu", ctrl.reg_sel[RMUX_ALU], 1);
        end
        if (o == 7)  expect_bit("reg from ir", ctrl.reg_sel[RMUX_IR], 1);
        if (o == 8 || o == 10) expect_bit("reg from mem", ctrl.reg_sel[RMUX_MEM], 1);
        if (o == 15) expect_bit("reg from pc", ctrl.reg_sel[RMUX_PC], 1);
        if (o == 8 || o == 9)   expect_bit("addr from ir", ctrl.addr_sel[AMUX_IR], 1);
        if (o == 10 || o == 11) expect_bit("addr from reg", ctrl.addr_sel[AMUX_REG], 1);
        if (o == 9 || o == 11)  expect_bit("mem from reg", ctrl.min_sel[MMUX_REG], 1);
        if (o == 14) expect_bit("pc from reg", ctrl.pc_sel[PMUX_REG], 1);
        if (taken || o == 15) expect_bit("pc from ir", ctrl.pc_sel[PMUX_IR], 1);
        // next cycle is fetch again; then halt
        @(negedge clk); #1;
        expect_bit("back to fetch", phase == PH_FETCH && running, 1);
        @(negedge clk); ir = '0; #1;
        expect_bit("halt stops", running, 0);
        expect_bit("halt no writes", ctrl.reg_we | ctrl.ir_we, 0);
        @(negedge clk); #1;
        expect_bit("stopped in fetch", phase == PH_FETCH && !running, 1);
      end
    end
    // reset also stops a running machine
    @(negedge clk); run = 1; ir = {4'd1, 6'd0}; @(negedge clk); run = 0;
    @(negedge clk); expect_bit("running before reset", running, 1);
    rst = 1; #1; expect_bit("reset stops", running, 0);
    @(negedge clk); rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
