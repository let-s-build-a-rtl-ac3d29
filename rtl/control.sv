// control: the control unit of the TOY-Lite CPU.
//
// The machine alternates between two phases, one clock cycle each:
//   fetch:   the address MUX puts PC on the memory address; at the clock edge
//            the instruction register takes Memory[PC] and the PC increments.
//   execute: the opcode in IR selects the control lines; the registers feed
//            the ALU (or memory, or the PC); at the clock edge the result is
//            written to a register, to memory or to the PC.
// So every instruction takes exactly two clock cycles.
//
// Whether the machine runs is held in an SR flip-flop: the RUN switch sets
// it; reset, or the execute phase of a halt instruction, clears it. While it
// is clear the phase stays at fetch and the front-panel switches own the
// datapath: deposit writes the data switches to memory at the address
// switches, load-PC copies the address switches into the PC, and memory at
// the address switches is shown on the memory output bus.
//
// Execute, per opcode (d, s, t are the register fields of IR, addr the low
// 2*RW bits):
//   1-6 R[d] <- R[s] op R[t] (ALU)     7 R[d] <- addr
//   8   R[d] <- M[addr]                9 M[addr] <- R[d]
//   A   R[d] <- M[R[t]]                B M[R[t]] <- R[d]
//   C   if R[d] == 0 then PC <- addr   D if R[d] > 0 (signed) then PC <- addr
//   E   PC <- R[d]                     F R[d] <- PC; PC <- addr
//   0   halt
// Register read port 1 carries R[s], or R[d] for store, branch and jump
// register; port 2 carries R[t]. The opcode meanings come from the TOY
// instruction set; the phase sequencing follows the two-cycle clocking; the
// front-panel wiring, the control word layout and the run/halt flip-flop are
// this design's choices.
module control
  import toy_pkg::*;
#(
  parameter int RW = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [3+3*RW:0] ir,          // instruction register
  input  logic [3+3*RW:0] port1,       // register read port 1 (R[d] for branches)
  input  logic            panel_run,
  input  logic            panel_deposit,
  input  logic            panel_load_pc,
  output ctrl_t           ctrl,
  output logic [RW-1:0]   raddr1,
  output logic [RW-1:0]   raddr2,
  output logic [RW-1:0]   waddr,
  output logic            running,
  output phase_e          phase
);
  localparam int W = 4 + 3*RW;

  opcode_e       op;
  logic [RW-1:0] fd, fs, ft;
  logic          halt_now;
  logic          is_zero, is_pos;

  assign op = opcode_e'(ir[W-1 -: 4]);
  assign fd = ir[3*RW-1 -: RW];
  assign fs = ir[2*RW-1 -: RW];
  assign ft = ir[RW-1:0];

  // Run/halt state.
  assign halt_now = (phase == PH_EXECUTE) && (op == OP_HALT);
  sr_flipflop u_run (.s(panel_run), .r(rst | halt_now), .q(running), .q_n());

  always_ff @(posedge clk) begin
    if (rst || !running)          phase <= PH_FETCH;
    else if (phase == PH_FETCH)   phase <= PH_EXECUTE;
    else                          phase <= PH_FETCH;
  end

  assign is_zero = (port1 == '0);
  assign is_pos  = !port1[W-1] && !is_zero;

  always_comb begin
    ctrl          = '0;
    ctrl.pc_inc   = 1'b1;
    ctrl.pc_sel   = PMUX_N'(1) << PMUX_IR;
    ctrl.addr_sel = AMUX_N'(1) << AMUX_PC;
    ctrl.min_sel  = MMUX_N'(1) << MMUX_REG;
    ctrl.reg_sel  = RMUX_N'(1) << RMUX_ALU;
    raddr1 = fs;
    raddr2 = ft;
    waddr  = fd;
    if (!running) begin
      ctrl.addr_sel = AMUX_N'(1) << AMUX_PANEL;
      ctrl.min_sel  = MMUX_N'(1) << MMUX_PANEL;
      ctrl.mem_we   = panel_deposit;
      ctrl.pc_sel   = PMUX_N'(1) << PMUX_PANEL;
      ctrl.pc_inc   = 1'b0;
      ctrl.pc_load  = 1'b1;
      ctrl.pc_we    = panel_load_pc;
    end else if (phase == PH_FETCH) begin
      ctrl.ir_we = 1'b1;
      ctrl.pc_we = 1'b1;
    end else begin
      unique case (op)
        OP_HALT: ;
        OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SHL, OP_SHR: begin
          ctrl.alu_op = ir[W-2 -: 3];
          ctrl.reg_we = 1'b1;
        end
        OP_LDA: begin
          ctrl.reg_sel = RMUX_N'(1) << RMUX_IR;
          ctrl.reg_we  = 1'b1;
        end
        OP_LD: begin
          ctrl.addr_sel = AMUX_N'(1) << AMUX_IR;
          ctrl.reg_sel  = RMUX_N'(1) << RMUX_MEM;
          ctrl.reg_we   = 1'b1;
        end
        OP_ST: begin
          raddr1        = fd;
          ctrl.addr_sel = AMUX_N'(1) << AMUX_IR;
          ctrl.mem_we   = 1'b1;
        end
        OP_LDI: begin
          ctrl.addr_sel = AMUX_N'(1) << AMUX_REG;
          ctrl.reg_sel  = RMUX_N'(1) << RMUX_MEM;
          ctrl.reg_we   = 1'b1;
        end
        OP_STI: begin
          raddr1        = fd;
          ctrl.addr_sel = AMUX_N'(1) << AMUX_REG;
          ctrl.mem_we   = 1'b1;
        end
        OP_BZ, OP_BP: begin
          raddr1 = fd;
          if ((op == OP_BZ) ? is_zero : is_pos) begin
            ctrl.pc_inc  = 1'b0;
            ctrl.pc_load = 1'b1;
            ctrl.pc_we   = 1'b1;
          end
        end
        OP_JR: begin
          raddr1       = fd;
          ctrl.pc_sel  = PMUX_N'(1) << PMUX_REG;
          ctrl.pc_inc  = 1'b0;
          ctrl.pc_load = 1'b1;
          ctrl.pc_we   = 1'b1;
        end
        OP_JL: begin
          ctrl.reg_sel = RMUX_N'(1) << RMUX_PC;
          ctrl.reg_we  = 1'b1;
          ctrl.pc_inc  = 1'b0;
          ctrl.pc_load = 1'b1;
          ctrl.pc_we   = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // Every multiplexer has exactly one select line active, and the counter
  // is told either to load or to increment.
  a_onehot: assert property (@(posedge clk) disable iff (rst)
      $onehot(ctrl.addr_sel) && $onehot(ctrl.reg_sel) && $onehot(ctrl.pc_sel)
      && $onehot(ctrl.min_sel) && $onehot({ctrl.pc_load, ctrl.pc_inc}));
  // The RUN switch and a halt never act on the run flip-flop together.
  a_sr_legal: assert property (@(posedge clk) !(panel_run && halt_now));
endmodule
