// risc_pkg: types and constants shared by the accumulator CPU.
//
// The CPU has an 8-bit word: an instruction is a 3-bit opcode in bits [7:5]
// and a 5-bit operand address in bits [4:0]. Every instruction takes the
// same eight clock phases, counted by the phase generator. The opcode
// encoding below and the phase names are this design's choice; the word
// widths follow the 8-bit ALU the CPU is built around.
package risc_pkg;

  localparam int unsigned DWIDTH   = 8;  // data and instruction word
  localparam int unsigned OPWIDTH  = 3;  // opcode field
  localparam int unsigned AWIDTH   = 5;  // operand address field and memory address
  localparam int unsigned PHWIDTH  = 3;  // eight phases per instruction

  // Instruction set.
  typedef enum logic [OPWIDTH-1:0] {
    HLT = 3'd0,  // stop the machine
    SKZ = 3'd1,  // skip the next instruction if the accumulator is zero
    ADD = 3'd2,  // acc <= acc + mem[a]
    AND = 3'd3,  // acc <= acc & mem[a]
    XOR = 3'd4,  // acc <= acc ^ mem[a]
    LDA = 3'd5,  // acc <= mem[a]
    STO = 3'd6,  // mem[a] <= acc
    JMP = 3'd7   // pc <= a
  } opcode_t;

  // Phases of one instruction.
  typedef enum logic [PHWIDTH-1:0] {
    INST_ADDR  = 3'd0,  // PC on the address bus
    INST_FETCH = 3'd1,  // memory read of the instruction
    INST_LOAD  = 3'd2,  // instruction register loads
    IDLE       = 3'd3,  // instruction register loads again, decode settles
    OP_ADDR    = 3'd4,  // operand address on the bus, PC increments or halt
    OP_FETCH   = 3'd5,  // memory read of the operand
    ALU_OP     = 3'd6,  // ALU works, SKZ skips, JMP loads PC
    STORE      = 3'd7   // accumulator or memory is written
  } phase_t;

  // True for the opcodes that read an operand and load the accumulator.
  function automatic logic is_alu_op(opcode_t op);
    return (op == ADD) || (op == AND) || (op == XOR) || (op == LDA);
  endfunction

endpackage
