// tb_toy_classic: the same computer built at RW = 4, the 16-bit TOY machine
// (256 words of memory, 16 registers, 8-bit PC).
//
// Programs are loaded through the front panel and run to halt; an
// instruction-level model in this bench runs them too, and every memory
// word, the PC and the cycle count (two per instruction) are compared.
// A directed program uses the full 16-bit word, registers above R3 and
// addresses above 15; then random programs that the model shows to halt.
module tb_toy_classic;
  import toy_pkg::*;
  localparam int RW = 4;
  localparam int W  = 4 + 3*RW;    // 16
  localparam int AW = 2*RW;        // 8
  localparam int NW = 2**AW;       // 256
  localparam int NR = 2**RW;       // 16
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  logic [AW-1:0] panel_addr;
  logic [W-1:0]  panel_data;
  logic panel_deposit, panel_load_pc, panel_run;
  logic running;
  phase_e phase;
  logic [AW-1:0] pc;
  logic [W-1:0]  ir, mem_out;

  toy_lite #(.RW(RW)) dut (.clk(clk), .rst(rst), .panel_addr(panel_addr), .panel_data(panel_data),
    .panel_deposit(panel_deposit), .panel_load_pc(panel_load_pc), .panel_run(panel_run),
    .running(running), .phase(phase), .pc(pc), .ir(ir), .mem_out(mem_out));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0]  m_mem [NW];
  logic [W-1:0]  m_reg [NR];
  logic [AW-1:0] m_pc;
  int cnt_op [16];

  function automatic bit model_step(bit count);
    logic [W-1:0] w, a, b, r;
    logic [3:0] op;
    logic [AW-1:0] addr;
    logic [RW-1:0] d, s, t;
    int sh;
    w = m_mem[m_pc];
    m_pc = m_pc + 1'b1;
    op = w[W-1 -: 4]; d = w[3*RW-1 -: RW]; s = w[2*RW-1 -: RW]; t = w[RW-1:0]; addr = w[AW-1:0];
    a = m_reg[s]; b = m_reg[t]; sh = int'(b);
    if (count) cnt_op[op]++;
    case (op)
      4'h0: return 1'b1;
      4'h1: m_reg[d] = a + b;
      4'h2: m_reg[d] = a - b;
      4'h3: m_reg[d] = a & b;
      4'h4: m_reg[d] = a ^ b;
      4'h5: m_reg[d] = (sh >= W) ? '0 : W'(a << sh);
      4'h6: begin
        r = a;
        for (int i = 0; i < W && i < sh; i++) r = {r[W-1], r[W-1:1]};
        m_reg[d] = r;
      end
      4'h7: m_reg[d] = W'(addr);
      4'h8: m_reg[d] = m_mem[addr];
      4'h9: m_mem[addr] = m_reg[d];
      4'hA: m_reg[d] = m_mem[m_reg[t][AW-1:0]];
      4'hB: m_mem[m_reg[t][AW-1:0]] = m_reg[d];
      4'hC: if (m_reg[d] == 0) m_pc = addr;
      4'hD: if (!m_reg[d][W-1] && m_reg[d] != 0) m_pc = addr;
      4'hE: m_pc = m_reg[d][AW-1:0];
      4'hF: begin m_reg[d] = W'(m_pc); m_pc = addr; end
      default: ;
    endcase
    return 1'b0;
  endfunction

  function automatic int model_run(int limit, bit count);
    for (int n = 1; n <= limit; n++)
      if (model_step(count)) return n;
    return -1;
  endfunction

  task automatic panel_write(logic [AW-1:0] a, logic [W-1:0] v);
    @(negedge clk);
    panel_addr = a; panel_data = v; panel_deposit = 1;
    @(negedge clk);
    panel_deposit = 0;
  endtask

  logic [W-1:0] prog [NW];
  logic [W-1:0] m_reg_save [NR];

  task automatic run_program(logic [AW-1:0] start_pc, string name, int limit);
    int n_instr, cycles;
    logic [W-1:0] mem_save [NW];
    logic [AW-1:0] pc_save;
    m_mem = prog;
    m_pc = start_pc;
    n_instr = model_run(limit, 1'b1);
    checks++;
    if (n_instr < 0) begin failures++; $display("%s: program does not halt", name); return; end
    mem_save = m_mem; pc_save = m_pc;
    // only deposit the words that differ from what memory holds now
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); panel_addr = AW'(i); #1;
      if (mem_out != prog[i]) panel_write(AW'(i), prog[i]);
    end
    @(negedge clk); panel_addr = start_pc; panel_load_pc = 1;
    @(negedge clk); panel_load_pc = 0; panel_run = 1;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
      if (cycles == 1) panel_run = 0;
      #1;
    end while ((running || phase != PH_FETCH) && cycles < 4 * limit + 10);
    @(negedge clk);
    checks++;
    if (cycles != 2 * n_instr) begin failures++; $display("%s: %0d cycles for %0d instructions", name, cycles, n_instr); end
    checks++;
    if (pc != pc_save) begin failures++; $display("%s: PC %h exp %h", name, pc, pc_save); end
    for (int i = 0; i < NW; i++) begin
      panel_addr = AW'(i); #1;
      checks++;
      if (mem_out != mem_save[i]) begin failures++; $display("%s: M[%h] = %h exp %h", name, i, mem_out, mem_save[i]); end
    end
    m_mem = mem_save;
  endtask

  initial begin
    int tried, halted;
    rst = 1; panel_addr = 0; panel_data = 0; panel_deposit = 0; panel_load_pc = 0; panel_run = 0;
    foreach (cnt_op[i]) cnt_op[i] = 0;
    foreach (m_reg[i]) m_reg[i] = '0;
    m_pc = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // Directed: 16-bit arithmetic in high registers, results to high addresses.
    prog = '{default: '0};
    prog[8'h10] = {4'h8, 4'hA, 8'hF0};          // RA <- M[F0] = 0x7FFF
    prog[8'h11] = {4'h7, 4'hB, 8'h01};          // RB <- 1
    prog[8'h12] = {4'h1, 4'hC, 4'hA, 4'hB};     // RC <- RA + RB = 0x8000
    prog[8'h13] = {4'h9, 4'hC, 8'hF1};          // M[F1] <- RC
    prog[8'h14] = {4'h7, 4'hD, 8'h0C};          // RD <- 12
    prog[8'h15] = {4'h6, 4'hE, 4'hC, 4'hD};     // RE <- RC >> 12 = 0xFFF8
    prog[8'h16] = {4'hD, 4'hE, 8'h40};          // RE > 0? no
    prog[8'h17] = {4'hF, 4'hF, 8'hC0};          // RF <- 0x18, to C0
    prog[8'hC0] = {4'h9, 4'hE, 8'hF2};          // M[F2] <- RE
    prog[8'hC1] = {4'h9, 4'hF, 8'hF3};          // M[F3] <- RF
    prog[8'hC2] = 16'h0000;
    prog[8'hF0] = 16'h7FFF;
    run_program(8'h10, "toy16", 100);
    foreach (prog[i]) if (i == 'hF1 || i == 'hF2 || i == 'hF3) begin
      logic [W-1:0] exp;
      exp = (i == 'hF1) ? 16'h8000 : (i == 'hF2) ? 16'hFFF8 : 16'h0018;
      @(negedge clk); panel_addr = AW'(i); #1;
      checks++;
      if (mem_out != exp) begin failures++; $display("toy16: M[%h] = %h, worked out %h", i, mem_out, exp); end
    end

    tried = 0; halted = 0;
    while (halted < 20 && tried < 2000) begin
      logic [AW-1:0] sp;
      int n;
      tried++;
      foreach (prog[i]) prog[i] = W'($urandom);
      sp = AW'($urandom);
      m_mem = prog;
      m_reg_save = m_reg;
      m_pc = sp;
      n = model_run(200, 1'b0);
      m_reg = m_reg_save;
      if (n > 0) begin
        halted++;
        run_program(sp, $sformatf("random%0d", halted), 200);
      end
    end
    checks++;
    if (halted < 20) begin failures++; $display("only %0d random programs halted", halted); end
    $display("coverage: ops %p, random programs %0d", cnt_op, halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
