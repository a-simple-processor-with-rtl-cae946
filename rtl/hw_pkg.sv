// Shared types and constants of the HW ISA single-cycle processor.
//
// The machine is a 16-bit load/store design: 16-bit words, 16 registers
// (R0 fixed at 0, R1 fixed at 1), a byte-addressed data memory accessed by
// little-endian 16-bit words, and a separate instruction memory holding one
// 16-bit instruction per byte pair.  Every instruction carries a 4-bit opcode
// in bits 15:12; the remaining 12 bits are read in one of three formats:
//   arithmetic : Rs[11:8] Rt[7:4] Rd[3:0]
//   memory/BEQ : Rs[11:8] Rt[7:4] offset[3:0]   (signed, 4 bits)
//   JMP        : offset[11:0]                   (unsigned, 12 bits)
// The opcode values follow the ISA definition.  The ALU operation encoding is
// this design's own choice: the control unit translates opcodes into it.
package hw_pkg;

  localparam int unsigned WORD_W = 16;   // word, register and ALU width
  localparam int unsigned NREGS  = 16;   // R0..R15
  localparam int unsigned RIDX_W = 4;    // register index width

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [3:0] {
    OP_LW   = 4'b0000,
    OP_SW   = 4'b0001,
    OP_ADD  = 4'b0010,
    OP_SUB  = 4'b0011,
    OP_AND  = 4'b0100,
    OP_OR   = 4'b0101,
    OP_BEQ  = 4'b0111,
    OP_JMP  = 4'b1000,
    OP_HALT = 4'b1111
  } opcode_t;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_OR  = 2'd3
  } alu_op_t;

  // Control word produced by the control unit for one instruction.
  typedef struct packed {
    alu_op_t alu_op;     // operation the ALU performs
    logic    reg_write;  // write the register file (ADD, SUB, AND, OR, LW)
    logic    mem_store;  // write the data memory (SW)
    logic    mem;        // memory-format instruction: selects offset as ALU
                         // operand B, Rt as destination, memory as write data
    logic    branch;     // BEQ: take the branch when the ALU result is zero
    logic    jump;       // JMP: PC <- offset * 2
    logic    halt;       // HALT: stop executing
  } ctrl_t;

  // Instruction field accessors.
  function automatic ridx_t ins_rs(word_t ins);
    return ins[11:8];
  endfunction

  function automatic ridx_t ins_rt(word_t ins);
    return ins[7:4];
  endfunction

  function automatic ridx_t ins_rd(word_t ins);
    return ins[3:0];
  endfunction

  // 4-bit signed offset of LW, SW and BEQ, sign-extended to a word.
  function automatic word_t ins_off4(word_t ins);
    return {{(WORD_W-4){ins[3]}}, ins[3:0]};
  endfunction

  // 12-bit unsigned offset of JMP.
  function automatic logic [11:0] ins_off12(word_t ins);
    return ins[11:0];
  endfunction

endpackage
