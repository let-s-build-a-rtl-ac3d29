// tb_toy_lite: end-to-end test of the TOY-Lite computer at its default size.
//
// Programs are loaded through the front panel (deposit), started at an
// address set with load-PC, and run until the machine halts. An
// instruction-level model of the TOY-Lite instruction set, kept in this
// bench, runs the same program; afterwards every memory word and the PC are
// compared, and the number of clock cycles must be exactly two per executed
// instruction (fetch + execute). Four directed programs exercise all sixteen
// opcodes, taken and untaken branches and PC wrap-around; then random
// programs that the model shows to halt are run. Each mechanism is counted
// and one that never occurred is a failure.
module tb_toy_lite;
  import toy_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  logic [3:0] panel_addr;
  logic [9:0] panel_data;
  logic panel_deposit, panel_load_pc, panel_run;
  logic running;
  phase_e phase;
  logic [3:0] pc;
  logic [9:0] ir, mem_out;

  toy_lite dut (.clk(clk), .rst(rst), .panel_addr(panel_addr), .panel_data(panel_data),
    .panel_deposit(panel_deposit), .panel_load_pc(panel_load_pc), .panel_run(panel_run),
    .running(running), .phase(phase), .pc(pc), .ir(ir), .mem_out(mem_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- reference model ----------------
  logic [9:0] m_mem [16];
  logic [9:0] m_reg [4];
  logic [3:0] m_pc;
  int cnt_op [16];
  int cnt_bz_taken, cnt_bz_not, cnt_bp_taken, cnt_bp_not, cnt_wrap, cnt_deposit, cnt_loadpc;

  // Execute one instruction; returns 1 if it was halt.
  function automatic bit model_step(bit count);
    logic [9:0] w, a, b, r;
    logic [3:0] op, addr;
    logic [1:0] d, s, t;
    int sh;
    w = m_mem[m_pc];
    if (count && m_pc == 4'd15) cnt_wrap++;
    m_pc = m_pc + 4'd1;
    op = w[9:6]; d = w[5:4]; s = w[3:2]; t = w[1:0]; addr = w[3:0];
    a = m_reg[s]; b = m_reg[t];
    sh = int'(b);
    if (count) cnt_op[op]++;
    case (op)
      4'h0: return 1'b1;
      4'h1: m_reg[d] = a + b;
      4'h2: m_reg[d] = a - b;
      4'h3: m_reg[d] = a & b;
      4'h4: m_reg[d] = a ^ b;
      4'h5: m_reg[d] = (sh >= 10) ? 10'd0 : 10'(int'(a) << sh);
      4'h6: begin
        r = a;
        for (int i = 0; i < 10 && i < sh; i++) r = {r[9], r[9:1]};
        m_reg[d] = r;
      end
      4'h7: m_reg[d] = {6'd0, addr};
      4'h8: m_reg[d] = m_mem[addr];
      4'h9: m_mem[addr] = m_reg[d];
      4'hA: m_reg[d] = m_mem[m_reg[t][3:0]];
      4'hB: m_mem[m_reg[t][3:0]] = m_reg[d];
      4'hC: begin
        if (m_reg[d] == 0) begin m_pc = addr; if (count) cnt_bz_taken++; end
        else if (count) cnt_bz_not++;
      end
      4'hD: begin
        if (!m_reg[d][9] && m_reg[d] != 0) begin m_pc = addr; if (count) cnt_bp_taken++; end
        else if (count) cnt_bp_not++;
      end
      4'hE: m_pc = m_reg[d][3:0];
      4'hF: begin m_reg[d] = {6'd0, m_pc}; m_pc = addr; end
      default: ;
    endcase
    return 1'b0;
  endfunction

  // Run the model from its present state; returns the number of executed
  // instructions including the halt, or -1 if it does not halt in limit steps.
  function automatic int model_run(int limit, bit count);
    for (int n = 1; n <= limit; n++)
      if (model_step(count)) return n;
    return -1;
  endfunction

  // ---------------- assembler helpers ----------------
  function automatic logic [9:0] rrr(logic [3:0] op, logic [1:0] d, logic [1:0] s, logic [1:0] t);
    return {op, d, s, t};
  endfunction
  function automatic logic [9:0] ra(logic [3:0] op, logic [1:0] d, logic [3:0] addr);
    return {op, d, addr};
  endfunction

  // ---------------- front panel ----------------
  task automatic deposit(logic [3:0] a, logic [9:0] v);
    @(negedge clk);
    panel_addr = a; panel_data = v; panel_deposit = 1;
    @(negedge clk);
    panel_deposit = 0;
    cnt_deposit++;
  endtask

  task automatic load_pc(logic [3:0] a);
    @(negedge clk);
    panel_addr = a; panel_load_pc = 1;
    @(negedge clk);
    panel_load_pc = 0;
    cnt_loadpc++;
  endtask

  logic [9:0] prog [16];
  logic [9:0] m_reg_save [4];

  // Load prog, start at start_pc, compare with the model. Registers carry
  // over from the previous program in both the machine and the model.
  task automatic run_program(logic [3:0] start_pc, string name, int limit);
    int n_instr, cycles;
    logic [9:0] mem_save [16];
    logic [3:0] pc_save;
    // model first, on a scratch copy, to learn whether it halts
    foreach (prog[i]) m_mem[i] = prog[i];
    m_reg_save = m_reg;
    m_pc = start_pc;
    n_instr = model_run(limit, 1'b1);
    checks++;
    if (n_instr < 0) begin failures++; $display("%s: program does not halt", name); return; end
    mem_save = m_mem; pc_save = m_pc;
    for (int i = 0; i < 16; i++) deposit(4'(i), prog[i]);
    load_pc(start_pc);
    checks++;
    if (pc != start_pc) begin failures++; $display("%s: load-PC gave %0d", name, pc); end
    @(negedge clk); panel_run = 1;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
      if (cycles == 1) panel_run = 0;
      #1;
    end while ((running || phase != PH_FETCH) && cycles < 4 * limit + 10);
    @(negedge clk);
    checks++;
    if (cycles != 2 * n_instr) begin
      failures++; $display("%s: %0d cycles for %0d instructions", name, cycles, n_instr);
    end
    checks++;
    if (pc != pc_save) begin failures++; $display("%s: PC %0d exp %0d", name, pc, pc_save); end
    for (int i = 0; i < 16; i++) begin
      panel_addr = 4'(i); #1;
      checks++;
      if (mem_out != mem_save[i]) begin
        failures++; $display("%s: M[%0d] = %h exp %h", name, i, mem_out, mem_save[i]);
      end
    end
    m_mem = mem_save;
  endtask

  task automatic expect_word(string name, int a, logic [9:0] v);
    @(negedge clk);
    panel_addr = 4'(a); #1;
    checks++;
    if (mem_out != v) begin failures++; $display("%s: M[%0d] = %h, worked out %h", name, a, mem_out, v); end
  endtask

  // hand-worked results for the directed programs, independent of the model
  initial begin
    int tried, halted;
    rst = 1; panel_addr = 0; panel_data = 0; panel_deposit = 0; panel_load_pc = 0; panel_run = 0;
    foreach (cnt_op[i]) cnt_op[i] = 0;
    {cnt_bz_taken, cnt_bz_not, cnt_bp_taken, cnt_bp_not, cnt_wrap, cnt_deposit, cnt_loadpc} = '0;
    foreach (m_reg[i]) m_reg[i] = '0;
    foreach (m_mem[i]) m_mem[i] = '0;
    m_pc = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // A: arithmetic and logic
    prog = '{default: 10'd0};
    prog[0] = ra(4'h7, 1, 5);        // R1 <- 5
    prog[1] = ra(4'h7, 2, 3);        // R2 <- 3
    prog[2] = rrr(4'h1, 3, 1, 2);    // R3 <- R1 + R2
    prog[3] = ra(4'h9, 3, 15);       // M[15] <- R3
    prog[4] = rrr(4'h2, 3, 2, 1);    // R3 <- R2 - R1
    prog[5] = ra(4'h9, 3, 14);
    prog[6] = rrr(4'h3, 3, 1, 2);    // R3 <- R1 & R2
    prog[7] = ra(4'h9, 3, 13);
    prog[8] = rrr(4'h4, 3, 1, 2);    // R3 <- R1 ^ R2
    prog[9] = ra(4'h9, 3, 12);
    prog[10] = 10'h000;              // halt
    run_program(0, "arith", 100);
    expect_word("arith", 15, 10'd8);
    expect_word("arith", 14, 10'h3FE);
    expect_word("arith", 13, 10'd1);
    expect_word("arith", 12, 10'd6);

    // B: shifts, load, load/store indirect
    prog = '{default: 10'd0};
    prog[0]  = ra(4'h7, 1, 5);       // R1 <- 5
    prog[1]  = ra(4'h7, 2, 2);       // R2 <- 2
    prog[2]  = rrr(4'h5, 3, 1, 2);   // R3 <- R1 << R2 = 20
    prog[3]  = ra(4'h9, 3, 15);
    prog[4]  = ra(4'h8, 3, 14);      // R3 <- M[14] = 0x3F0
    prog[5]  = rrr(4'h6, 3, 3, 2);   // R3 <- R3 >> 2 = 0x3FC
    prog[6]  = ra(4'h9, 3, 14);
    prog[7]  = ra(4'h7, 1, 12);      // R1 <- 12
    prog[8]  = rrr(4'hA, 3, 0, 1);   // R3 <- M[R1]
    prog[9]  = ra(4'h7, 2, 13);      // R2 <- 13
    prog[10] = rrr(4'hB, 3, 0, 2);   // M[R2] <- R3
    prog[11] = 10'h000;
    prog[12] = 10'h155;
    prog[14] = 10'h3F0;
    run_program(0, "shift/load", 100);
    expect_word("shift/load", 15, 10'd20);
    expect_word("shift/load", 14, 10'h3FC);
    expect_word("shift/load", 13, 10'h155);

    // C: branches and jumps
    prog = '{default: 10'd0};
    prog[0]  = ra(4'h7, 1, 0);       // R1 <- 0
    prog[1]  = ra(4'hC, 1, 4);       // R1 == 0: to 4 (taken)
    prog[4]  = ra(4'h7, 2, 7);       // R2 <- 7
    prog[5]  = ra(4'hD, 2, 8);       // R2 > 0: to 8 (taken)
    prog[8]  = ra(4'hC, 2, 6);       // R2 == 0? no
    prog[9]  = rrr(4'h2, 3, 1, 2);   // R3 <- 0 - 7
    prog[10] = ra(4'hD, 3, 6);       // R3 > 0? no
    prog[11] = ra(4'hF, 0, 14);      // R0 <- 12, to 14
    prog[12] = ra(4'h9, 0, 15);      // M[15] <- R0
    prog[13] = 10'h000;
    prog[14] = rrr(4'hE, 0, 0, 0);   // to R0 (12)
    run_program(0, "branch", 100);
    expect_word("branch", 15, 10'd12);
    checks++;
    if (pc != 4'd14) begin failures++; $display("branch: halted with PC %0d, worked out 14", pc); end

    // D: start from load-PC near the top, PC wraps from 15 to 0
    prog = '{default: 10'd0};
    prog[14] = ra(4'h7, 1, 9);       // R1 <- 9
    prog[15] = ra(4'h7, 2, 1);       // R2 <- 1
    prog[0]  = ra(4'h9, 1, 13);      // M[13] <- R1
    prog[1]  = 10'h000;
    run_program(14, "wrap", 100);
    expect_word("wrap", 13, 10'd9);

    // Random programs that the model shows to halt.
    tried = 0; halted = 0;
    while (halted < 150 && tried < 5000) begin
      logic [3:0] sp;
      int n;
      tried++;
      foreach (prog[i]) prog[i] = 10'($urandom);
      // favour halting: a few halt words
      for (int k = 0; k < 2; k++) prog[$urandom % 16] = 10'h000;
      sp = 4'($urandom);
      foreach (prog[i]) m_mem[i] = prog[i];
      m_reg_save = m_reg;
      m_pc = sp;
      n = model_run(60, 1'b0);
      m_reg = m_reg_save;
      if (n > 0) begin
        halted++;
        run_program(sp, $sformatf("random%0d", halted), 60);
      end
    end

    // Mechanism coverage.
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (cnt_op[o] == 0) begin failures++; $display("opcode %h never executed", o); end
    end
    checks++;
    if (cnt_bz_taken == 0 || cnt_bz_not == 0 || cnt_bp_taken == 0 || cnt_bp_not == 0 ||
        cnt_wrap == 0 || cnt_deposit == 0 || cnt_loadpc == 0) begin
      failures++; $display("mechanism not covered");
    end
    $display("coverage: ops %p", cnt_op);
    $display("coverage: bz taken %0d not %0d, bp taken %0d not %0d, pc wrap %0d, deposits %0d, load-pc %0d, random programs %0d",
             cnt_bz_taken, cnt_bz_not, cnt_bp_taken, cnt_bp_not, cnt_wrap, cnt_deposit, cnt_loadpc, halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
