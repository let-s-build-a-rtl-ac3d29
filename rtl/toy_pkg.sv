// toy_pkg: shared types and constants of the TOY-Lite CPU.
//
// The sixteen opcodes and their order follow the TOY instruction table
// (0 halt ... F jump and link). The instruction layout is set by one
// parameter, RW, the width of a register-number field: a word is
// W = 4 + 3*RW bits (opcode, d, s, t) and a memory address is AW = 2*RW bits,
// the width of the s and t fields together. RW = 2 gives TOY-Lite (10-bit
// words, 4 registers, 16 memory words); RW = 4 gives the 16-bit TOY.
// The one-hot select positions of the three datapath multiplexers and the
// control-word struct are this design's own encoding.
package toy_pkg;

  typedef enum logic [3:0] {
    OP_HALT = 4'h0,
    OP_ADD  = 4'h1,
    OP_SUB  = 4'h2,
    OP_AND  = 4'h3,
    OP_XOR  = 4'h4,
    OP_SHL  = 4'h5,
    OP_SHR  = 4'h6,
    OP_LDA  = 4'h7,
    OP_LD   = 4'h8,
    OP_ST   = 4'h9,
    OP_LDI  = 4'hA,
    OP_STI  = 4'hB,
    OP_BZ   = 4'hC,
    OP_BP   = 4'hD,
    OP_JR   = 4'hE,
    OP_JL   = 4'hF
  } opcode_e;

  // Machine cycle: every instruction takes one fetch and one execute clock.
  typedef enum logic {PH_FETCH = 1'b0, PH_EXECUTE = 1'b1} phase_e;

  // Register MUX sources (what a register write takes).
  localparam int RMUX_ALU = 0, RMUX_MEM = 1, RMUX_IR = 2, RMUX_PC = 3, RMUX_N = 4;
  // Address MUX sources (memory address).
  localparam int AMUX_PC = 0, AMUX_IR = 1, AMUX_REG = 2, AMUX_PANEL = 3, AMUX_N = 4;
  // PC MUX sources (value loaded into the program counter).
  localparam int PMUX_IR = 0, PMUX_REG = 1, PMUX_PANEL = 2, PMUX_N = 3;
  // Memory input sources (value written to memory).
  localparam int MMUX_REG = 0, MMUX_PANEL = 1, MMUX_N = 2;

  // The control wires that the control unit drives into the datapath.
  typedef struct packed {
    logic              ir_we;     // instruction register enable write
    logic              pc_load;   // PC counter: take the input bus
    logic              pc_inc;    // PC counter: take PC + 1
    logic              pc_we;     // PC counter: enable write
    logic [PMUX_N-1:0] pc_sel;    // PC MUX one-hot select
    logic [AMUX_N-1:0] addr_sel;  // address MUX one-hot select
    logic              mem_we;    // main memory enable write
    logic [MMUX_N-1:0] min_sel;   // memory input one-hot select
    logic              reg_we;    // TOY register enable write
    logic [RMUX_N-1:0] reg_sel;   // register MUX one-hot select
    logic [2:0]        alu_op;    // ALU function: low opcode bits, 1..6
  } ctrl_t;

endpackage
