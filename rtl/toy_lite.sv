// toy_lite: the TOY-Lite computer, a complete CPU with its memory.
//
// Datapath (one bus per arrow):
//   PC (program counter)  --> address MUX --> main memory (16 x 10)
//   IR addr field         --> address MUX, register MUX, PC MUX
//   register port 2 (R[t])--> address MUX (indirect), ALU input b
//   register port 1       --> ALU input a, memory input, PC MUX (jump register)
//   memory output         --> IR, register MUX (load)
//   ALU, memory, IR, PC   --> register MUX --> registers (4 x 10)
// The control unit reads IR and drives every select and enable write.
// Timing: two clock cycles per instruction (fetch, then execute); results
// are written at the rising clock edge that ends the execute cycle.
//
// Front panel (switches and lights): with the machine stopped, panel_deposit
// writes panel_data into memory at panel_addr, panel_load_pc sets the PC to
// panel_addr, and mem_out shows memory at panel_addr. panel_run starts the
// machine; a halt instruction stops it, leaving PC after the halt.
//
// Parameter RW (register-number bits) sets every size: words are 4+3*RW bits
// and addresses 2*RW bits. The default RW = 2 is TOY-Lite (10-bit words,
// 4 registers, 16 words, 4-bit PC). The block structure follows the TOY-Lite
// layout; the front-panel wiring and the memory input MUX are this design's.
module toy_lite
  import toy_pkg::*;
#(
  parameter int RW = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [2*RW-1:0]   panel_addr,
  input  logic [3+3*RW:0]   panel_data,
  input  logic              panel_deposit,
  input  logic              panel_load_pc,
  input  logic              panel_run,
  output logic              running,
  output phase_e            phase,
  output logic [2*RW-1:0]   pc,
  output logic [3+3*RW:0]   ir,
  output logic [3+3*RW:0]   mem_out
);
  localparam int W  = 4 + 3*RW;   // word width
  localparam int AW = 2 * RW;     // address width

  ctrl_t         ctrl;
  logic [RW-1:0] raddr1, raddr2, waddr;
  logic [W-1:0]  port1, port2, alu_y, reg_in, mem_in;
  logic [AW-1:0] mem_addr, pc_in;

  logic [AW-1:0] amux_in [AMUX_N];
  logic [AW-1:0] pmux_in [PMUX_N];
  logic [W-1:0]  rmux_in [RMUX_N];
  logic [W-1:0]  mmux_in [MMUX_N];

  control #(.RW(RW)) u_control (
    .clk(clk), .rst(rst), .ir(ir), .port1(port1),
    .panel_run(panel_run), .panel_deposit(panel_deposit), .panel_load_pc(panel_load_pc),
    .ctrl(ctrl), .raddr1(raddr1), .raddr2(raddr2), .waddr(waddr),
    .running(running), .phase(phase));

  // Program counter and its input MUX
  assign pmux_in[PMUX_IR]    = ir[AW-1:0];
  assign pmux_in[PMUX_REG]   = port1[AW-1:0];
  assign pmux_in[PMUX_PANEL] = panel_addr;
  bus_mux #(.N(PMUX_N), .K(AW)) u_pc_mux (.in_bus(pmux_in), .sel(ctrl.pc_sel), .out_bus(pc_in));

  program_counter #(.K(AW)) u_pc (
    .clk(clk), .rst(rst), .din(pc_in), .load(ctrl.pc_load), .increment(ctrl.pc_inc),
    .we(ctrl.pc_we), .dout(pc));

  // Memory address MUX, memory input MUX and main memory
  assign amux_in[AMUX_PC]    = pc;
  assign amux_in[AMUX_IR]    = ir[AW-1:0];
  assign amux_in[AMUX_REG]   = port2[AW-1:0];
  assign amux_in[AMUX_PANEL] = panel_addr;
  bus_mux #(.N(AMUX_N), .K(AW)) u_addr_mux (.in_bus(amux_in), .sel(ctrl.addr_sel), .out_bus(mem_addr));

  assign mmux_in[MMUX_REG]   = port1;
  assign mmux_in[MMUX_PANEL] = panel_data;
  bus_mux #(.N(MMUX_N), .K(W)) u_mem_in_mux (.in_bus(mmux_in), .sel(ctrl.min_sel), .out_bus(mem_in));

  memory_bank #(.AW(AW), .K(W)) u_memory (
    .clk(clk), .rst(rst), .addr(mem_addr), .we(ctrl.mem_we), .din(mem_in), .dout(mem_out));

  // Instruction register
  proc_register #(.K(W)) u_ir (.clk(clk), .rst(rst), .we(ctrl.ir_we), .d(mem_out), .q(ir));

  // TOY registers, their input MUX and the ALU
  assign rmux_in[RMUX_ALU] = alu_y;
  assign rmux_in[RMUX_MEM] = mem_out;
  assign rmux_in[RMUX_IR]  = W'(ir[AW-1:0]);
  assign rmux_in[RMUX_PC]  = W'(pc);
  bus_mux #(.N(RMUX_N), .K(W)) u_reg_mux (.in_bus(rmux_in), .sel(ctrl.reg_sel), .out_bus(reg_in));

  register_file #(.RW(RW), .K(W)) u_registers (
    .clk(clk), .rst(rst), .raddr1(raddr1), .raddr2(raddr2), .waddr(waddr),
    .we(ctrl.reg_we), .din(reg_in), .dout1(port1), .dout2(port2));

  alu #(.K(W)) u_alu (.a(port1), .b(port2), .op(ctrl.alu_op), .y(alu_y));
endmodule
