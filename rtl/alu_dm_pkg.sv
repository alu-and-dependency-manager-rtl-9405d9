// Shared definitions of the parallel ALU / dependency-manager processing unit.
//
// The unit takes a set of NUM_INST instructions at a time, each of the form
// [opcode][address A][address B][address Q], and runs them on NUM_INST ALUs
// in parallel, holding back only those that read a register an earlier
// instruction of the same set writes. Data registers are DATA_W bits wide and
// are addressed 1..NUM_REGS; address 0 (and any address above NUM_REGS) names
// no register. The sizes (four instructions, twelve 4-bit registers, 3-bit
// opcodes, 4-bit addresses) and the opcode encoding follow the original
// design; the instruction record and the helper functions are this design's.
package alu_dm_pkg;

  localparam int unsigned NUM_INST = 4;   // instructions per set = number of ALUs
  localparam int unsigned NUM_REGS = 12;  // data registers
  localparam int unsigned DATA_W   = 4;   // bits per data register
  localparam int unsigned ADDR_W   = 4;   // bits per register address
  localparam int unsigned OP_W     = 3;   // bits per opcode

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [OP_W-1:0] {
    OP_NOP = 3'b000,  // no operation: the instruction is bypassed
    OP_OR  = 3'b001,  // Q = A | B
    OP_AND = 3'b010,  // Q = A & B
    OP_ADD = 3'b011,  // Q = A + B (modulo 2**DATA_W)
    OP_SUB = 3'b100,  // Q = A - B (modulo 2**DATA_W)
    OP_SHL = 3'b101,  // Q = A logically shifted left by one bit
    OP_SHR = 3'b110,  // Q = A logically shifted right by one bit
    OP_ROR = 3'b111   // Q = A rotated right by one bit
  } opcode_e;

  typedef struct packed {
    opcode_e op;
    addr_t   a;   // first source register
    addr_t   b;   // second source register
    addr_t   q;   // destination register
  } instr_t;

  // True when the address names one of the data registers (1..NUM_REGS).
  function automatic logic addr_valid(addr_t addr);
    return (addr != '0) && (int'(addr) <= NUM_REGS);
  endfunction

  // An instruction is executed only if it has an operation and a register to
  // write; otherwise it is bypassed.
  function automatic logic instr_active(opcode_e op, addr_t q);
    return (op != OP_NOP) && addr_valid(q);
  endfunction

endpackage
