// mips_pkg: shared types and constants of the single-cycle processor.
//
// Holds the instruction-field positions, the opcode and function-code values
// of the seven supported instructions (add, sub, ori, lw, sw, beq, j), the
// ALU operation code and the struct that carries the control signals from the
// main control to the datapath and the instruction fetch unit.
//
// The opcode and function values follow the MIPS encoding of the instruction
// set. The 3-bit ALU operation codes (010 add, 110 subtract, 001 or) are this
// design's choice: only the operations themselves are fixed by the
// architecture.
package mips_pkg;

  // Opcodes, Instruction<31:26>
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_ORI   = 6'b001101,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011,
    OP_BEQ   = 6'b000100,
    OP_J     = 6'b000010
  } opcode_e;

  // Function codes of R-type instructions, Instruction<5:0>
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;

  // ALUctr<2:0>
  typedef enum logic [2:0] {
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110
  } alu_ctr_e;

  // Control signals, one instruction's worth, valid for the whole cycle.
  typedef struct packed {
    logic     reg_dst;    // 1: write rd, 0: write rt
    logic     alu_src;    // 1: extended immediate, 0: busB
    logic     mem_to_reg; // 1: busW from data memory, 0: from ALU
    logic     reg_wr;     // write the register file
    logic     mem_wr;     // write the data memory
    logic     npc_sel;    // 1: branch instruction (taken when Zero)
    logic     jump;       // 1: jump to {PC[31:28], target, 00}
    logic     ext_op;     // 1: sign-extend imm16, 0: zero-extend
    alu_ctr_e alu_ctr;
  } ctrl_t;

endpackage
